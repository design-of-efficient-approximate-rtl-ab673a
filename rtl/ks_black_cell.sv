// ks_black_cell: prefix operator producing group generate and propagate.
//
// Combines the group (i:k) at the upper input with the adjacent lower group
// (k-1:j) into the group (i:j):
//   g_out = g_hi | (p_hi & g_lo)     G(i:j) = G(i:k) + P(i:k) G(k-1:j)
//   p_out = p_hi & p_lo              P(i:j) = P(i:k) P(k-1:j)
// Two AND terms and one OR, combinational. Follows the published cell.
module ks_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  always_comb begin
    g_out = g_hi | (p_hi & g_lo);
    p_out = p_hi & p_lo;
  end
endmodule
