// tb_ks_postprocess: random check of the sum stage. With p = a ^ b and the
// true carries c of a + b + cin, the output must be the low W bits of the
// sum a + b + cin.
module tb_ks_postprocess;
  localparam int W = 16;
  logic [W-1:0] p, c, s;
  int checks = 0, failures = 0;

  ks_postprocess #(.W(W)) dut (.p(p), .c(c), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b;
    logic cin;
    logic [W:0] full;
    for (int n = 0; n < 5000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      p = a ^ b;
      c = full[W-1:0] ^ a ^ b;   // carry into each bit
      #1;
      checks++;
      if (s != full[W-1:0]) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b s=%h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
