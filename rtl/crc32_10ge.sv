// crc32_10ge - CRC-32 generator for 10 Gigabit Ethernet, 8 bits per clock.
//
// Ethernet frames are made of whole bytes, so the generator takes one byte
// per clock, which avoids any special handling of a partial first or last
// word. At 10 Gb/s this means a 1.25 GHz clock, so the next-state logic is
// kept to three levels of 2-input XOR gates by using the augmented CRC form
// (see crc32_pkg): the CRC register is preset to 46AF6449, the frame is
// followed by four zero bytes, and the register is inverted into the output
// register to give the FCS.
//
// Structure: input register -> CRC core -> inverter -> output register. The
// design was laid out in two ways, and both cores are built here side by
// side, fed by the same input register, each with its own output register:
//   - crc32_sc_core: standard cells, flip-flop CRC register whose high-fan-out
//     bits use parallelized flip-flops;   result on fcs_o
//   - crc32_fc_core: full-custom style, XOR gates merged into a negative and
//     a positive latch stage;              result on fcs_fc_o
//     Its output register is a negative/positive latch pair as well, so that
//     it samples the CRC latches while they are stable (clock low).
// The loop that lint reports through crc32_fc_core is its latch register
// (see there). Both give the same value every cycle. Input and output registers have no
// set or reset; only the CRC registers are preset.
//
// Interface:
//   clk      clock; must be held low while set_n is low
//   set_n    active-low asynchronous preset of the CRC registers
//   data_i   byte, bit 0 first on the wire
//   fcs_o    inverted CRC register of the standard-cell core, bit 31 sent
//            first (bit-reversed it is the familiar CRC-32 value)
//   fcs_fc_o the same from the full-custom core
//
// An assertion flags a rising clock edge while set_n is low.
//
// Operation and timing: load the first byte into the input register with one
// clock edge, hold clk low and pulse set_n, then clock in the remaining
// bytes followed by four zero bytes, one per edge. Two edges after the last
// zero byte was taken into the input register, fcs_o holds the FCS.
module crc32_10ge
  import crc32_pkg::*;
(
  input  logic              clk,
  input  logic              set_n,
  input  logic [DATA_W-1:0] data_i,
  output logic [CRC_W-1:0]  fcs_o,
  output logic [CRC_W-1:0]  fcs_fc_o
);

  logic [DATA_W-1:0] data_q;
  logic [CRC_W-1:0]  crc_sc, crc_fc;

  crc_in_reg #(.W(DATA_W)) u_in (
    .clk (clk),
    .d_i (data_i),
    .q_o (data_q)
  );

  crc32_sc_core u_sc (
    .clk   (clk),
    .set_n (set_n),
    .d_i   (data_q),
    .crc_o (crc_sc)
  );

  crc32_fc_core u_fc (
    .clk   (clk),
    .set_n (set_n),
    .d_i   (data_q),
    .crc_o (crc_fc)
  );

  crc_out_reg #(.W(CRC_W)) u_out_sc (
    .clk   (clk),
    .crc_i (crc_sc),
    .fcs_o (fcs_o)
  );

  crc_out_latch_reg #(.W(CRC_W)) u_out_fc (
    .clk   (clk),
    .crc_i (crc_fc),
    .fcs_o (fcs_fc_o)
  );

  // The preset is only defined with the clock held low: no rising edge may
  // arrive while set_n is active.
  always @(posedge clk) begin
    assert (set_n) else $error("crc32_10ge: clock edge while set_n is low");
  end

endmodule
