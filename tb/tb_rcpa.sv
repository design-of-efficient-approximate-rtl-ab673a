// tb_rcpa: self-checking test of the W-bit reverse carry propagate adder.
// Checks the two lower-half vectors of the published 32-bit simulation
// (A = 0xAAAA with B = 0x5555 and with B = 0xCCCC), a long propagate run,
// and random operands against a bit-level reference, and checks the
// arithmetic error identity (error = sum of +-2^(i+1) over conflict bits).
// Also runs a 7-bit instance to cover an odd width.
module tb_rcpa;
  import rcpa_ref_pkg::*;
  localparam int W = 16;
  localparam int W2 = 7;

  logic [W-1:0] a, b, s, c, f;
  logic         f_in, f_out;
  logic [W2-1:0] a2, b2, s2, c2, f2;
  logic          f_out2;
  int checks = 0, failures = 0;

  rcpa #(.W(W)) dut (.a(a), .b(b), .f_in(f_in), .s(s), .c(c), .f(f), .f_out(f_out));
  rcpa #(.W(W2)) dut2 (.a(a2), .b(b2), .f_in(1'b0), .s(s2), .c(c2), .f(f2), .f_out(f_out2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h f_in=%0b -> s=%h c=%h f=%h f_out=%0b",
               what, a, b, f_in, s, c, f, f_out);
    end
  endtask

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vf);
    rcpa_res_t r;
    longint e, lhs, rhs;
    a = va; b = vb; f_in = vf;
    #1;
    r = rcpa_ref(W, va, vb, vf);
    check(s == r.s[W-1:0], "sum");
    check(c == r.c[W-1:0], "carries");
    check(f == r.f[W-1:0] && f_out == r.f_out, "forecasts");
    e = rcpa_err(W, va, vb, c, f_out);
    lhs = longint'(s) + (longint'(f_out) << W);
    rhs = longint'(va) + longint'(vb) + longint'(r.c0);
    check(lhs - rhs == e, "error identity");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published lower-half values.
    apply(16'hAAAA, 16'h5555, 1'b0);
    check(c == 16'hFFFF && f == 16'hAAAA && s == 16'h0000 && f_out, "figure vector 1");
    apply(16'hAAAA, 16'hCCCC, 1'b0);
    check(c == 16'h1110 && f == 16'hAAAA && s == 16'h7776 && f_out, "figure vector 2");
    // Full-length reverse chain: every bit propagates.
    apply(16'h8000, 16'h7FFF, 1'b0);
    check(c == 16'hFFFF, "full chain");
    apply(16'h0000, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    for (int n = 0; n < 2000; n++) begin
      rcpa_res_t r;
      a2 = W2'($urandom); b2 = W2'($urandom);
      #1;
      r = rcpa_ref(W2, a2, b2, 1'b0);
      checks++;
      if (s2 != r.s[W2-1:0] || c2 != r.c[W2-1:0] || f2 != r.f[W2-1:0] || f_out2 != r.f_out) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h", W2, a2, b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
