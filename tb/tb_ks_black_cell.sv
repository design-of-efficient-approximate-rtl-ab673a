// tb_ks_black_cell: exhaustive check of the black prefix cell against the
// group generate/propagate rule G = Ghi + Phi*Glo, P = Phi*Plo.
module tb_ks_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  ks_black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo),
                     .g_out(g_out), .p_out(p_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit eg, ep;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      // A carry leaves the group if the upper part makes one, or passes
      // one made by the lower part.
      eg = (g_hi == 1'b1) || (p_hi == 1'b1 && g_lo == 1'b1);
      ep = (p_hi + p_lo) == 2;
      checks += 2;
      if (g_out != eg) begin failures++; $display("FAIL g v=%0d", v); end
      if (p_out != ep) begin failures++; $display("FAIL p v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
