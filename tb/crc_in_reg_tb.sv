// crc_in_reg_tb - checks that the input register delays each byte by one
// clock edge and holds it in between.
module crc_in_reg_tb;
  logic       clk = 1'b0;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;

  crc_in_reg #(.W(8)) dut (.clk(clk), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h00;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      prev = 8'($urandom);
      d    = prev;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q=%h exp=%h", q, prev); end
      d = ~prev;          // change D between edges: output must hold
      #2;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL hold q=%h exp=%h", q, prev); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
