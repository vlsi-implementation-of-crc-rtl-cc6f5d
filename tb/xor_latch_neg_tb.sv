// xor_latch_neg_tb - checks the XOR negative latch: transparent (q = a ^ b)
// while clk is low, holding while clk is high.
module xor_latch_neg_tb;
  logic a, b, clk = 1'b0;
  logic q, held;
  int checks = 0, failures = 0;

  xor_latch_neg dut (.a(a), .b(b), .clk(clk), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int n = 0; n < 50; n++) begin
      clk = 1'b0;
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v); #1;
        checks++;
        if (q !== (a ^ b)) begin failures++; $display("FAIL transparent %b%b q=%b", a, b, q); end
      end
      {a, b} = 2'($urandom); #1;
      held = a ^ b;
      clk = 1'b1; #1;
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v); #1;
        checks++;
        if (q !== held) begin failures++; $display("FAIL hold q=%b exp=%b", q, held); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
