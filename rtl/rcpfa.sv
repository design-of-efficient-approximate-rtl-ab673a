// rcpfa: approximate reverse carry propagate full adder cell.
//
// An ordinary full adder takes its carry from the bit below and hands one
// to the bit above. This cell works the other way round: it receives, from
// the bit above, the carry c_hi (C[i+1]) that the upper bit has already
// assumed, and it tells the bit below which carry c_lo (C[i]) it needs so
// that 2*C[i+1] + S[i] = A[i] + B[i] + C[i] holds. The carry therefore
// travels from MSB to LSB, and any error it causes lands at ever lower
// weight. A forecast f_lo (F[i]) arrives from the bit below and a forecast
// f_hi (F[i+1]) goes to the bit above; it is the cell's guess of the carry
// it will send upward, and seeds the reverse chain at its top end.
//
// Ports: a, b   operand bits A[i], B[i]
//        c_hi   C[i+1], carry required by the next higher bit (input)
//        f_lo   F[i], forecast from the next lower bit (input)
//        s      S[i], sum bit
//        c_lo   C[i], carry this cell requires from the next lower bit
//        f_hi   F[i+1], forecast sent to the next higher bit
// Purely combinational; the delay from c_hi to c_lo is one 2:1 selection.
//
// Follows the published cell: four inputs, three outputs, the reverse
// carry relation and, from its 32-bit simulation, the observed values of
// C and F. The equations themselves are this design's own reading:
//   f_hi = a                      (exact when a == b, a guess when a != b)
//   c_lo = (a ^ b) ? c_hi : f_lo  (a propagating bit passes the carry down;
//                                  otherwise the lower forecast is used)
//   s    = a ^ b ^ c_lo
// With these, the relation above is exact except when a == b != c_hi; then
// the output claims 2^(i+1) too much (a == b == 0) or too little
// (a == b == 1).
module rcpfa (
  input  logic a,
  input  logic b,
  input  logic c_hi,
  input  logic f_lo,
  output logic s,
  output logic c_lo,
  output logic f_hi
);
  logic p;

  always_comb begin
    p    = a ^ b;
    f_hi = a;
    c_lo = p ? c_hi : f_lo;
    s    = p ^ c_lo;
  end
endmodule
