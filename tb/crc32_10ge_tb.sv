// crc32_10ge_tb - end-to-end test of the CRC-32 generator at its only
// (default) configuration.
//
// Sends Ethernet-sized frames (64 to 1518 bytes, including the minimum and
// maximum, plus the "123456789" check string and short frames) through the
// input register. Each frame: the first byte is clocked into the input
// register, the clock is held low while set_n is pulsed, the rest of the
// frame and four zero bytes follow one per clock, and the FCS is read from
// both output registers. Checks:
//   - both FCS outputs equal the bit-reversed reflected CRC-32 of the frame
//   - the FCS appears exactly two edges after the last zero byte enters the
//     input register, and the generator takes one byte every clock edge
//     (frame length + 4 + 2 edges after the preset)
//   - the standard-cell and full-custom outputs agree on every cycle
// It also counts that each mechanism happened: presets, zero tails, frames
// of minimum and maximum Ethernet length, the check string.
module crc32_10ge_tb;
  import crc_ref_pkg::*;
  logic        clk = 1'b0, set_n = 1'b1;
  logic [7:0]  data;
  logic [31:0] fcs, fcs_fc, zl;
  int checks = 0, failures = 0;
  int edges;
  int n_preset = 0, n_tail = 0, n_min = 0, n_max = 0, n_check = 0, n_frames = 0;
  logic [7:0] frame [$];
  string check_str = "123456789";

  crc32_10ge dut (.clk(clk), .set_n(set_n), .data_i(data), .fcs_o(fcs), .fcs_fc_o(fcs_fc));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic edge_in(input logic [7:0] b);
    data = b; #2;
    clk = 1'b1; #3;
    clk = 1'b0; #3;
    edges++;
    if (edges < 2) return;        // output registers not yet filled
    checks++;
    if (fcs !== fcs_fc) begin
      failures++;
      if (failures < 10) $display("FAIL cores differ %h %h", fcs, fcs_fc);
    end
  endtask

  task automatic run_frame();
    int lat;
    zl = 32'hFFFF_FFFF;
    foreach (frame[i]) zl = crc32_byte(zl, frame[i]);
    zl = ~zl;
    edges = 0;
    // First byte into the input register, then preset with the clock low.
    edge_in(frame[0]);
    edges = 0;
    set_n = 1'b0; #3; set_n = 1'b1; #3;
    n_preset++;
    for (int i = 1; i < frame.size(); i++) edge_in(frame[i]);
    repeat (4) edge_in(8'h00);
    n_tail++;
    // Bytes are taken one per edge: frame.size() bytes + 4 tail bytes, the
    // first having been loaded before the preset.
    checks++;
    if (edges != frame.size() + 3) begin failures++; $display("FAIL edge count %0d", edges); end
    // Wait for the result: CRC register then output register.
    lat = 0;
    while (lat < 2) begin edge_in(8'($urandom)); lat++; end
    checks++;
    if (rev32(fcs) !== zl) begin
      failures++; $display("FAIL frame len %0d fcs %h exp %h", frame.size(), rev32(fcs), zl);
    end
    checks++;
    if (fcs_fc !== fcs) begin failures++; $display("FAIL fc fcs %h sc %h", fcs_fc, fcs); end
    n_frames++;
    if (frame.size() == 64) n_min++;
    if (frame.size() == 1518) n_max++;
  endtask

  initial begin
    int len;
    data = 8'h00;
    // One edge too early must not yet show the result.
    for (int f = 0; f < 40; f++) begin
      frame.delete();
      if (f == 0) begin
        for (int i = 0; i < check_str.len(); i++) frame.push_back(8'(check_str[i]));
      end else begin
        case (f)
          1: len = 64;
          2: len = 1518;
          3: len = 1;
          default: len = 64 + ($urandom % (1518 - 64 + 1));
        endcase
        for (int i = 0; i < len; i++) frame.push_back(8'($urandom));
      end
      run_frame();
      if (f == 0) begin
        n_check++;
        checks++;
        if (rev32(fcs) !== 32'hCBF4_3926) begin failures++; $display("FAIL check value %h", rev32(fcs)); end
      end
    end
    // Latency: one edge after the tail the output register must not yet
    // hold the FCS of a new frame; two edges after, it must.
    frame.delete();
    for (int i = 0; i < 100; i++) frame.push_back(8'($urandom));
    zl = 32'hFFFF_FFFF;
    foreach (frame[i]) zl = crc32_byte(zl, frame[i]);
    zl = ~zl;
    edge_in(frame[0]);
    set_n = 1'b0; #3; set_n = 1'b1; #3;
    n_preset++;
    for (int i = 1; i < frame.size(); i++) edge_in(frame[i]);
    repeat (4) edge_in(8'h00);
    edge_in(8'h00);
    checks++;
    if (rev32(fcs) === zl) begin failures++; $display("FAIL FCS one edge early"); end
    edge_in(8'h00);
    checks++;
    if (rev32(fcs) !== zl || fcs_fc !== fcs) begin failures++; $display("FAIL FCS at two edges"); end

    $display("mechanisms: frames=%0d presets=%0d tails=%0d min64=%0d max1518=%0d check=%0d",
             n_frames, n_preset, n_tail, n_min, n_max, n_check);
    if (n_preset == 0) failures++;
    if (n_tail == 0) failures++;
    if (n_min == 0) failures++;
    if (n_max == 0) failures++;
    if (n_check == 0) failures++;
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
