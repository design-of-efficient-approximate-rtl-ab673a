// ks_adder: exact W-bit Kogge-Stone parallel-prefix adder.
//
// Three stages: pre-processing forms per-bit propagate and generate,
// the carry tree turns them into all carries in log2(W) levels of black and
// gray cells, and post-processing XORs each propagate with its carry.
//
// Ports: a, b  W-bit operands; cin carry-in
//        sum   W-bit sum; cout carry out (sum + 2^W * cout = a + b + cin)
// Combinational. The structure follows the published three-stage
// description; the default width 16 is the upper half of the 32-bit
// hybrid adder.
module ks_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p;
  logic [W-1:0] g;
  logic [W:0]   c;

  ks_preprocess #(.W(W)) u_pre (
    .a (a),
    .b (b),
    .p (p),
    .g (g)
  );

  ks_carry_tree #(.W(W)) u_tree (
    .g   (g),
    .p   (p),
    .cin (cin),
    .c   (c)
  );

  ks_postprocess #(.W(W)) u_post (
    .p (p),
    .c (c[W-1:0]),
    .s (sum)
  );

  assign cout = c[W];
endmodule
