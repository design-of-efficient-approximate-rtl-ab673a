// tb_ks_adder: checks the exact Kogge-Stone adder against a + b + cin for
// the 16-bit default and a 13-bit instance, including the longest carry
// (all propagate with carry-in).
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [15:0] a, b, sum; logic cin, cout;
  logic [12:0] a13, b13, sum13; logic cin13, cout13;

  ks_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  ks_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin13), .sum(sum13), .cout(cout13));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] va, logic [15:0] vb, logic vc);
    logic [16:0] e;
    a = va; b = vb; cin = vc;
    #1;
    e = 17'(va) + 17'(vb) + 17'(vc);
    checks++;
    if ({cout, sum} != e) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> %h exp %h", va, vb, vc, {cout, sum}, e);
    end
  endtask

  initial begin
    logic [13:0] e13;
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    for (int n = 0; n < 20000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int n = 0; n < 5000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); cin13 = 1'($urandom);
      #1;
      e13 = 14'(a13) + 14'(b13) + 14'(cin13);
      checks++;
      if ({cout13, sum13} != e13) begin
        failures++;
        $display("FAIL W13 a=%h b=%h cin=%0b", a13, b13, cin13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
