// tb_ks_carry_tree: checks every carry of the prefix tree against the
// carries of a plain binary addition (carry into bit i = bit i of
// (a + b + cin) ^ a ^ b), for the 16-bit default and for 5- and 32-bit
// trees.
module tb_ks_carry_tree;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16; logic cin16; logic [16:0] c16;
  logic [4:0]  a5,  b5;  logic cin5;  logic [5:0]  c5;
  logic [31:0] a32, b32; logic cin32; logic [32:0] c32;

  ks_carry_tree #(.W(16)) dut16 (.g(a16 & b16), .p(a16 ^ b16), .cin(cin16), .c(c16));
  ks_carry_tree #(.W(5))  dut5  (.g(a5 & b5),   .p(a5 ^ b5),   .cin(cin5),  .c(c5));
  ks_carry_tree #(.W(32)) dut32 (.g(a32 & b32), .p(a32 ^ b32), .cin(cin32), .c(c32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e16; logic [5:0] e5; logic [32:0] e32;
    logic [16:0] f16; logic [5:0] f5; logic [32:0] f32;
    for (int n = 0; n < 5000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      a5 = 5'($urandom);   b5 = 5'($urandom);   cin5 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      cin32 = 1'($urandom);
      if (n == 0) begin a16 = 16'hFFFF; b16 = 0; cin16 = 1; a32 = '1; b32 = 0; cin32 = 1; end
      #1;
      f16 = {1'b0, a16} + {1'b0, b16} + 17'(cin16);
      e16 = f16 ^ {1'b0, a16} ^ {1'b0, b16};
      f5 = {1'b0, a5} + {1'b0, b5} + 6'(cin5);
      e5 = f5 ^ {1'b0, a5} ^ {1'b0, b5};
      f32 = {1'b0, a32} + {1'b0, b32} + 33'(cin32);
      e32 = f32 ^ {1'b0, a32} ^ {1'b0, b32};
      e16[16] = f16[16]; e5[5] = f5[5]; e32[32] = f32[32];
      checks += 3;
      if (c16 != e16) begin failures++; $display("FAIL W16 a=%h b=%h cin=%0b c=%h exp=%h", a16, b16, cin16, c16, e16); end
      if (c5 != e5)   begin failures++; $display("FAIL W5 a=%h b=%h cin=%0b c=%h exp=%h", a5, b5, cin5, c5, e5); end
      if (c32 != e32) begin failures++; $display("FAIL W32 a=%h b=%h cin=%0b c=%h exp=%h", a32, b32, cin32, c32, e32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
