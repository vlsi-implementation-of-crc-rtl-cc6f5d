// crc_par_ff_tb - checks both copies of the parallelized flip-flop: preset
// to SET_VAL while set_n is low (clock low), then both follow D on each
// rising edge and hold in between.
module crc_par_ff_tb;
  logic clk = 1'b0, set_n = 1'b1, d;
  logic qc1, qo1, qc0, qo0;
  logic exp;
  int checks = 0, failures = 0;

  crc_par_ff #(.SET_VAL(1'b1)) dut1 (.clk(clk), .set_n(set_n), .d_i(d), .q_crit_o(qc1), .q_other_o(qo1));
  crc_par_ff #(.SET_VAL(1'b0)) dut0 (.clk(clk), .set_n(set_n), .d_i(~d), .q_crit_o(qc0), .q_other_o(qo0));

  task automatic check(input logic e1, input string what);
    checks++;
    if (qc1 !== e1 || qo1 !== e1 || qc0 !== ~e1 || qo0 !== ~e1) begin
      failures++;
      $display("FAIL %s: %b %b %b %b exp %b", what, qc1, qo1, qc0, qo0, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      d = 1'b0; #2; clk = 1'b1; #2; clk = 1'b0; #2;       // load 0 / 1
      check(1'b0, "load");
      set_n = 1'b0; #2;
      checks++;
      if (qc1 !== 1'b1 || qo1 !== 1'b1 || qc0 !== 1'b0 || qo0 !== 1'b0) begin
        failures++; $display("FAIL preset");
      end
      set_n = 1'b1; #2;
      check(1'b1, "after preset");
      for (int n = 0; n < 20; n++) begin
        exp = 1'($urandom);
        d = exp; #2; clk = 1'b1; #2;
        check(exp, "edge");
        d = ~exp; #1;
        check(exp, "hold");
        clk = 1'b0; #2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
