// tb_ks_preprocess: random check of the per-bit propagate and generate.
// Each bit is checked through the arithmetic of a single-bit sum:
// a + b = 2*g + p.
module tb_ks_preprocess;
  localparam int W = 16;
  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  ks_preprocess #(.W(W)) dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (int'(a[i]) + int'(b[i]) != 2 * int'(g[i]) + int'(p[i])) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h p=%h g=%h", i, a, b, p, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
