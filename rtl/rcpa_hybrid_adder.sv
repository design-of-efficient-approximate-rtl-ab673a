// rcpa_hybrid_adder: N-bit approximate hybrid adder.
//
// The operands are split in two. The lower K bits are added by an
// approximate reverse carry propagate adder (rcpa), whose carries run from
// its top bit down to bit 0, so a wrong carry guess costs only low-weight
// sum bits. The upper N-K bits are added exactly by a Kogge-Stone
// parallel-prefix adder (ks_adder). The two meet at the joining point: the
// forecast F[K] of the top approximate bit is the carry into the exact part,
// and the same signal starts the reverse carry chain (C[K] = F[K]). Since
// F[K] is simply A[K-1], the exact part never waits for the approximate
// part, and the longest path is the reverse chain inside the lower part.
//
// Ports: a, b  N-bit operands
//        s     N+1-bit result (s[N] is the carry out)
//        c     C[K-1:0], reverse carries of the approximate part
//        f     F[K:1], forecasts of the approximate part
// Combinational, no clock. The split into an exact upper and approximate
// lower half, the adder types and the port set (a, b, s, c, f) follow the
// published 32-bit design. Tying the lowest forecast F[0] to 0 is this
// design's reading of the published simulation output.
module rcpa_hybrid_adder #(
  parameter int unsigned N = 32,
  parameter int unsigned K = N / 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s,
  output logic [K-1:0] c,
  output logic [K-1:0] f
);
  logic         joint;
  logic [K-1:0] s_lo;
  logic [N-K-1:0] s_hi;
  logic         cout;

  rcpa #(.W(K)) u_approx (
    .a     (a[K-1:0]),
    .b     (b[K-1:0]),
    .f_in  (1'b0),
    .s     (s_lo),
    .c     (c),
    .f     (f),
    .f_out (joint)
  );

  ks_adder #(.W(N-K)) u_exact (
    .a    (a[N-1:K]),
    .b    (b[N-1:K]),
    .cin  (joint),
    .sum  (s_hi),
    .cout (cout)
  );

  assign s = {cout, s_hi, s_lo};
endmodule
