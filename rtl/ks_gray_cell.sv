// ks_gray_cell: prefix operator producing only the group generate.
//
// Used where the resulting group reaches bit 0, so its generate is already
// the final carry and no group propagate is needed:
//   g_out = g_hi | (p_hi & g_lo)     G(i:j) = G(i:k) + P(i:k) G(k-1:j)
// Combinational. Follows the published cell.
module ks_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  always_comb g_out = g_hi | (p_hi & g_lo);
endmodule
