// crc_reg_tb - checks the CRC register: asynchronous preset to 46AF6449 on
// both outputs, loading on rising edges, and that the duplicated bits give
// the same value on q_o and crit_o.
module crc_reg_tb;
  logic        clk = 1'b0, set_n = 1'b1;
  logic [31:0] d, q, crit, exp;
  int checks = 0, failures = 0;

  crc_reg #(.INIT(32'h46AF_6449), .DUP_MASK(32'hFF00_0000)) dut (
    .clk(clk), .set_n(set_n), .d_i(d), .q_o(q), .crit_o(crit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 10; r++) begin
      d = $urandom; #2; clk = 1'b1; #2; clk = 1'b0; #2;
      checks++;
      if (q !== d || crit !== d) begin failures++; $display("FAIL load %h", q); end
      set_n = 1'b0; #2;
      checks++;
      if (q !== 32'h46AF_6449 || crit !== 32'h46AF_6449) begin
        failures++; $display("FAIL preset q=%h crit=%h", q, crit);
      end
      set_n = 1'b1; #2;
      checks++;
      if (q !== 32'h46AF_6449) begin failures++; $display("FAIL preset hold"); end
      for (int n = 0; n < 30; n++) begin
        exp = $urandom;
        d = exp; #2; clk = 1'b1; #2;
        d = ~exp; #1;
        checks++;
        if (q !== exp || crit !== exp) begin
          failures++; $display("FAIL q=%h crit=%h exp=%h", q, crit, exp);
        end
        clk = 1'b0; #2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
