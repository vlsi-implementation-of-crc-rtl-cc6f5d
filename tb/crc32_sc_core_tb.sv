// crc32_sc_core_tb - checks the standard-cell core (flip-flop register with parallelized flip-flops).
//
// Frames of random length and content are fed one byte per clock after an
// asynchronous preset with the clock held low. After every edge the register
// is compared with a long-division model of the augmented CRC; after the
// four zero tail bytes its complement is compared with the ordinary
// reflected CRC-32 of the frame, bit-reversed.
module crc32_sc_core_tb;
  import crc_ref_pkg::*;
  logic        clk = 1'b0, set_n = 1'b1;
  logic [7:0]  d;
  logic [31:0] crc, model, zl;
  int checks = 0, failures = 0;
  int len;
  string check_str = "123456789";
  logic [7:0] frame [$];

  crc32_sc_core dut (.clk(clk), .set_n(set_n), .d_i(d), .crc_o(crc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic byte_in(input logic [7:0] b);
    d = b; #2;
    clk = 1'b1; #3;
    clk = 1'b0; #3;
    model = ref_step(model, b);
    checks++;
    if (crc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL state %h exp %h", crc, model);
    end
  endtask

  initial begin
    d = 8'h00;
    for (int f = 0; f < 60; f++) begin
      // Clock low, preset.
      set_n = 1'b0; #3;
      checks++;
      if (crc !== 32'h46AF_6449) begin failures++; $display("FAIL preset %h", crc); end
      set_n = 1'b1; #3;
      model = 32'h46AF_6449;
      frame.delete();
      if (f == 0) begin
        for (int i = 0; i < check_str.len(); i++) frame.push_back(8'(check_str[i]));
      end else begin
        len = 1 + ($urandom % 100);
        for (int i = 0; i < len; i++) frame.push_back(8'($urandom));
      end
      zl = 32'hFFFF_FFFF;
      foreach (frame[i]) begin
        byte_in(frame[i]);
        zl = crc32_byte(zl, frame[i]);
      end
      repeat (4) byte_in(8'h00);
      zl = ~zl;
      checks++;
      if (rev32(~crc) !== zl) begin
        failures++; $display("FAIL frame %0d crc %h exp %h", f, rev32(~crc), zl);
      end
      if (f == 0) begin
        checks++;
        if (rev32(~crc) !== 32'hCBF4_3926) begin failures++; $display("FAIL check value"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
