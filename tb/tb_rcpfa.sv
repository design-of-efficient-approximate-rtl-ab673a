// tb_rcpfa: exhaustive check of the reverse carry propagate full adder cell.
// All 16 input combinations are applied. For every one the forecast must
// equal A, and where the cell can satisfy 2*C[i+1] + S = A + B + C[i]
// exactly it must; in the two conflict cases (A == B != C[i+1]) the sum
// must be the parity of A + B + C[i] with C[i] taken from the forecast.
module tb_rcpfa;
  logic a, b, c_hi, f_lo, s, c_lo, f_hi;
  int checks = 0, failures = 0;

  rcpfa dut (.a(a), .b(b), .c_hi(c_hi), .f_lo(f_lo), .s(s), .c_lo(c_lo), .f_hi(f_hi));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c_hi=%0b f_lo=%0b -> s=%0b c_lo=%0b f_hi=%0b",
               what, a, b, c_hi, f_lo, s, c_lo, f_hi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c, lhs, rhs;
    for (int v = 0; v < 16; v++) begin
      {a, b, c_hi, f_lo} = 4'(v);
      #1;
      check(f_hi == a, "forecast");
      if (a + b == 1)              exp_c = c_hi;  // only one carry makes it exact
      else if (a == b && a == c_hi) exp_c = f_lo; // carry free: use the forecast
      else                          exp_c = f_lo; // conflict
      check(c_lo == exp_c[0], "carry");
      lhs = 2 * c_hi + s;
      rhs = a + b + c_lo;
      if (!(a == b && a != c_hi)) check(lhs == rhs, "exact relation");
      else                        check(s == (rhs % 2), "conflict sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
