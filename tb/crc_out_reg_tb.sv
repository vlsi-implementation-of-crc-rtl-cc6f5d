// crc_out_reg_tb - checks that the output register stores the complement of
// its input on each rising edge and holds it in between.
module crc_out_reg_tb;
  logic        clk = 1'b0;
  logic [31:0] d, q, prev;
  int checks = 0, failures = 0;

  crc_out_reg #(.W(32)) dut (.clk(clk), .crc_i(d), .fcs_o(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      prev = $urandom;
      d    = prev;
      @(posedge clk); #1;
      checks++;
      if (q !== ~prev) begin failures++; $display("FAIL q=%h exp=%h", q, ~prev); end
      d = $urandom;
      #2;
      checks++;
      if (q !== ~prev) begin failures++; $display("FAIL hold q=%h", q); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
