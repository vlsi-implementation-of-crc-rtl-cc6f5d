// xor_latch_pos_tb - checks the XOR positive latch: transparent (q = a ^ b)
// while clk is high, holding while clk is low, and forced to SET_VAL by
// set_n low with the clock low, for both the set and the reset variant.
module xor_latch_pos_tb;
  logic a, b, clk = 1'b0, set_n = 1'b1;
  logic q1, q0, held;
  int checks = 0, failures = 0;

  xor_latch_pos #(.SET_VAL(1'b1)) dut1 (.a(a), .b(b), .clk(clk), .set_n(set_n), .q(q1));
  xor_latch_pos #(.SET_VAL(1'b0)) dut0 (.a(a), .b(b), .clk(clk), .set_n(set_n), .q(q0));

  task automatic chk(input logic e, input string what);
    checks++;
    if (q1 !== e || q0 !== e) begin failures++; $display("FAIL %s q1=%b q0=%b exp=%b", what, q1, q0, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int n = 0; n < 50; n++) begin
      // Transparent phase: all four input combinations.
      clk = 1'b1;
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v); #1;
        chk(a ^ b, "transparent");
      end
      {a, b} = 2'($urandom); #1;
      held = a ^ b;
      clk = 1'b0; #1;
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v); #1;
        chk(held, "hold");
      end
      set_n = 1'b0; #1;
      checks++;
      if (q1 !== 1'b1 || q0 !== 1'b0) begin failures++; $display("FAIL set"); end
      {a, b} = 2'($urandom); #1;
      checks++;
      if (q1 !== 1'b1 || q0 !== 1'b0) begin failures++; $display("FAIL set hold"); end
      set_n = 1'b1; #1;
      checks++;
      if (q1 !== 1'b1 || q0 !== 1'b0) begin failures++; $display("FAIL after set"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
