// ks_preprocess: pre-processing stage of the Kogge-Stone adder.
//
// Forms, for every bit, the propagate p = a XOR b and generate g = a AND b
// that the prefix tree combines into carries. W parallel gate pairs,
// combinational, one gate delay. Follows the published equations; the
// default width of 16 is the upper half of the 32-bit hybrid adder.
module ks_preprocess #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] g
);
  always_comb begin
    p = a ^ b;
    g = a & b;
  end
endmodule
