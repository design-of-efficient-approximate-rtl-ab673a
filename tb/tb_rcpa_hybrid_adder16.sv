// tb_rcpa_hybrid_adder16: end-to-end test of the 16-bit configuration of
// the hybrid adder (exact 8-bit Kogge-Stone upper half, approximate 8-bit
// reverse carry lower half).
//
// Directed corners and random operands are checked bit for bit against a
// reference model, through the error identity
//   s - (a + b) = C[0] + sum over conflict bits of +-2^(i+1)
// and against the bound |s - (a + b)| < 2^(K+1). It counts how often each
// mechanism occurred (joint carry 0 and 1, a reverse chain through all K
// bits, conflicts of either sign, a dangling C[0] = 1, exact and inexact
// results), fails if any never did, and prints the error rate.
module tb_rcpa_hybrid_adder16;
  import rcpa_ref_pkg::*;
  localparam int N = 16;
  localparam int K = N / 2;

  logic [N-1:0] a, b;
  logic [N:0]   s;
  logic [K-1:0] c, f;
  int checks = 0, failures = 0;

  int n_joint1 = 0, n_joint0 = 0, n_full_chain = 0, n_conf_pos = 0,
      n_conf_neg = 0, n_c0 = 0, n_exact = 0, n_inexact = 0;
  longint sum_abs_err = 0;

  rcpa_hybrid_adder #(.N(N)) dut (.a(a), .b(b), .s(s), .c(c), .f(f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d -> s=%0d c=%0d f=%0d", what, a, b, s, c, f);
    end
  endtask

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    rcpa_res_t r;
    longint unsigned lo_a, lo_b, hi;
    longint e, diff, exp_s;
    bit joint;
    a = va; b = vb;
    #1;
    lo_a = longint'(va) & ((longint'(1) << K) - 1);
    lo_b = longint'(vb) & ((longint'(1) << K) - 1);
    r = rcpa_ref(K, lo_a, lo_b, 1'b0);
    joint = r.f_out;
    hi = (longint'(va) >> K) + (longint'(vb) >> K) + longint'(joint);
    exp_s = longint'((hi << K) | r.s);
    check(longint'(s) == exp_s, "reference");
    check(c == r.c[K-1:0] && f == r.f[K-1:0], "c/f vectors");
    e = rcpa_err(K, lo_a, lo_b, longint'(c), joint);
    diff = longint'(s) - (longint'(va) + longint'(vb));
    check(diff == e + longint'(r.c0), "error identity");
    check(diff < (longint'(1) << (K + 1)) && diff > -(longint'(1) << (K + 1)), "error bound");
    if (joint) n_joint1++; else n_joint0++;
    if (c == '1 && (va[K-1:0] ^ vb[K-1:0]) == '1) n_full_chain++;
    if (r.c0) n_c0++;
    for (int i = 0; i < K; i++) begin
      bit chi = (i == K - 1) ? joint : c[i+1];
      if (va[i] == vb[i] && va[i] != chi) begin
        if (va[i]) n_conf_neg++; else n_conf_pos++;
      end
    end
    if (diff == 0) n_exact++; else n_inexact++;
    sum_abs_err += (diff < 0) ? -diff : diff;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'd1);
    apply(16'h0080, 16'h007F);
    apply(16'h0080, 16'h0000);   // conflict, positive error
    apply(16'h007F, 16'h007F);   // conflict, negative error
    for (int n = 0; n < 50000; n++) apply(N'($urandom), N'($urandom));
    $display("mechanisms: joint1=%0d joint0=%0d full_chain=%0d conflict+=%0d conflict-=%0d c0=%0d exact=%0d inexact=%0d",
             n_joint1, n_joint0, n_full_chain, n_conf_pos, n_conf_neg, n_c0, n_exact, n_inexact);
    total = n_exact + n_inexact;
    $display("error rate %0d/%0d, mean |error| x1000 = %0d", n_inexact, total,
             sum_abs_err * 1000 / longint'(total));
    check(n_joint1 > 0, "joint carry 1 seen");
    check(n_joint0 > 0, "joint carry 0 seen");
    check(n_full_chain > 0, "full reverse chain seen");
    check(n_conf_pos > 0, "positive conflict seen");
    check(n_conf_neg > 0, "negative conflict seen");
    check(n_c0 > 0, "dangling C[0] seen");
    check(n_exact > 0, "exact result seen");
    check(n_inexact > 0, "inexact result seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
