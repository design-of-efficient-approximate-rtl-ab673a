// ks_carry_tree: carry generation stage of the Kogge-Stone adder.
//
// A radix-2 Kogge-Stone prefix tree of log2(W) levels. At level l every
// bit i combines its group with the group that ends 2^l bits below it:
// a black cell where the combined group still stops short of bit 0, a gray
// cell where it reaches bit 0 (its generate is then a final carry), and a
// plain wire (the buffer of the published figure) for the bits i < 2^l,
// whose carries are already final. The carry-in is folded into bit 0 by
// one extra gray cell ahead of the tree, so G(i:0) is the carry out of
// bit i including the carry-in.
//
// Ports: g, p  per-bit generate and propagate from pre-processing
//        cin   carry into bit 0
//        c     c[0] = cin, c[i+1] = carry out of bit i; c[W] is the carry out
// Combinational; log2(W) + 1 cell delays. The cell types and the three
// stages follow the published description; folding the carry-in into bit 0
// is this design's choice.
module ks_carry_tree #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic         cin,
  output logic [W:0]   c
);
  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // gl[l][i], pl[l][i]: group generate/propagate of bit i entering level l.
  logic [LEVELS:0][W-1:0] gl;
  logic [LEVELS:0][W-1:0] pl;

  ks_gray_cell u_cin (
    .g_hi  (g[0]),
    .p_hi  (p[0]),
    .g_lo  (cin),
    .g_out (gl[0][0])
  );
  assign pl[0][0] = p[0];

  if (W > 1) begin : g_in
    assign gl[0][W-1:1] = g[W-1:1];
    assign pl[0][W-1:1] = p[W-1:1];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i < D) begin : g_buf
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end else if (i < 2 * D) begin : g_gray
        ks_gray_cell u_gray (
          .g_hi  (gl[l][i]),
          .p_hi  (pl[l][i]),
          .g_lo  (gl[l][i-D]),
          .g_out (gl[l+1][i])
        );
        assign pl[l+1][i] = pl[l][i];
      end else begin : g_black
        ks_black_cell u_black (
          .g_hi  (gl[l][i]),
          .p_hi  (pl[l][i]),
          .g_lo  (gl[l][i-D]),
          .p_lo  (pl[l][i-D]),
          .g_out (gl[l+1][i]),
          .p_out (pl[l+1][i])
        );
      end
    end
  end

  assign c = {gl[LEVELS], cin};
endmodule
