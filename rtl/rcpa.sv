// rcpa: W-bit approximate reverse carry propagate adder (chain of rcpfa).
//
// Bit i is an rcpfa cell. Forecasts run upward (F[i] -> F[i+1]); the top
// forecast F[W] is both the carry this adder hands to whatever sits above
// it (f_out) and the carry C[W] that starts the reverse chain, so the top
// cell's forecast output feeds its own carry input. Carries then run
// downward C[W] -> C[W-1] -> ... -> C[0]; C[0] leaves the adder unused.
// The longest path is F[W] down the whole carry chain to S[0].
//
// Ports: a, b    W-bit operands
//        f_in    F[0], forecast into the lowest bit
//        s       W-bit approximate sum
//        c       C[W-1:0], the carries each bit requires from below
//        f       F[W:1], the forecast each bit sends upward
//        f_out   F[W] (= C[W]), carry handed to the exact upper part
// Combinational. The chain structure and the F[W] -> C[W] link follow the
// published architecture; W's default of 16 is the lower half of the
// 32-bit adder presented as the main configuration.
module rcpa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         f_in,
  output logic [W-1:0] s,
  output logic [W-1:0] c,
  output logic [W-1:0] f,
  output logic         f_out
);
  // cw[i] is C[i]; fw[i] is F[i].
  logic [W:0] cw;
  logic [W:0] fw;

  assign fw[0] = f_in;
  assign cw[W] = fw[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    rcpfa u_cell (
      .a    (a[i]),
      .b    (b[i]),
      .c_hi (cw[i+1]),
      .f_lo (fw[i]),
      .s    (s[i]),
      .c_lo (cw[i]),
      .f_hi (fw[i+1])
    );
  end

  assign c     = cw[W-1:0];
  assign f     = fw[W:1];
  assign f_out = fw[W];
endmodule
