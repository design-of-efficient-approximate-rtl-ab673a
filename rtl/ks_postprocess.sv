// ks_postprocess: post-processing stage of the Kogge-Stone adder.
//
// Each sum bit is the bit's propagate XOR the carry into that bit. The
// published text allows XOR gates or a conditional-sum selection here; this
// design uses the XOR gates. c[i] is the carry into bit i (c[0] is the
// adder's carry-in). Combinational, one gate delay.
module ks_postprocess #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] c,
  output logic [W-1:0] s
);
  always_comb s = p ^ c;
endmodule
