// crc_out_latch_reg_tb - checks the latch-built output register: on each
// rising edge fcs_o takes the complement of what crc_i held while the clock
// was low, even when crc_i changes right after the edge (as the full-custom
// CRC latches do), and it holds through the rest of the cycle.
module crc_out_latch_reg_tb;
  logic        clk = 1'b0;
  logic [31:0] d, q, prev;
  int checks = 0, failures = 0;

  crc_out_latch_reg dut (.clk(clk), .crc_i(d), .fcs_o(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int n = 0; n < 300; n++) begin
      prev = $urandom;
      d = prev; #2;
      clk = 1'b1;
      d = $urandom;        // input changes in the same step as the edge
      #1;
      checks++;
      if (q !== ~prev) begin failures++; $display("FAIL edge q=%h exp=%h", q, ~prev); end
      d = $urandom; #1;
      clk = 1'b0; #1;
      d = $urandom; #1;
      checks++;
      if (q !== ~prev) begin failures++; $display("FAIL hold q=%h exp=%h", q, ~prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
