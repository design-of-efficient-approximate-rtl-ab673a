// tb_ks_gray_cell: exhaustive check of the gray prefix cell against the
// group generate rule G = Ghi + Phi*Glo.
module tb_ks_gray_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  ks_gray_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      bit eg;
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      eg = (g_hi == 1'b1) || (p_hi == 1'b1 && g_lo == 1'b1);
      checks++;
      if (g_out != eg) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
