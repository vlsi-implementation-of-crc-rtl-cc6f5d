// crc32_fc_core - CRC-32 core of the full-custom implementation.
//
// Computes the same next state as crc32_sc_core, R' = (R * x^8 + D) mod G,
// but the CRC register is two stages of latches with the XOR tree merged
// into them instead of a flip-flop register after the tree. Each next-state
// bit has at most eight inputs, i.e. a tree of depth three of 2-input XOR
// gates, and the three levels are placed as follows:
//
//   level 1: plain XOR gates on pairs of inputs (register and data bits)
//   level 2: two XOR gates merged into negative latches (transparent clk low)
//   level 3: one XOR gate merged into a positive latch (transparent clk high)
//
// The positive latches are the CRC register outputs. The path positive latch
// -> XOR -> XOR with negative latch -> XOR with positive latch is the
// critical path of the design. While clk is low the positive latches hold
// R and the negative latches compute the two half-sums of each bit; on the
// rising edge the negative latches close and the positive latches produce
// the new R. The pair therefore behaves as a rising-edge register.
//
// The positive latches carry the set/reset that loads 46AF6449 while set_n
// is low with the clock held low. The pairing of inputs into the quarter
// trees (inputs taken in index order, two at a time) is this design's
// choice; bits with fewer than eight inputs simply get smaller trees.
//
// The latches are intended; tools that report them report the design. For
// the same reason lint and synthesis report a combinational loop from the
// positive latches through the XOR trees and negative latches back to the
// positive latches: the loop is closed only through latches of opposite
// clock phase, which are never transparent together, so it is the
// master-slave register of the design and not a real combinational loop.
//
// Interface: clk, set_n, d_i (byte from the input register), crc_o (the
// positive-latch outputs). Timing: one byte per clock; crc_o changes while
// clk is high after the edge that takes the byte and is stable while clk is
// low.
module crc32_fc_core
  import crc32_pkg::*;
(
  input  logic              clk,
  input  logic              set_n,
  input  logic [DATA_W-1:0] d_i,
  output logic [CRC_W-1:0]  crc_o
);

  logic [NIN-1:0] v;

  assign v = {d_i, crc_o};

  for (genvar i = 0; i < CRC_W; i++) begin : g_bit
    logic [3:0] pair;   // level 1: XOR of up to two inputs each
    logic [1:0] half;   // level 2: negative-latch outputs

    for (genvar q = 0; q < 4; q++) begin : g_pair
      localparam logic [NIN-1:0] QM = quarter_mask(i, q);
      assign pair[q] = ^(v & QM);
    end

    xor_latch_neg u_neg0 (.a(pair[0]), .b(pair[1]), .clk(clk), .q(half[0]));
    xor_latch_neg u_neg1 (.a(pair[2]), .b(pair[3]), .clk(clk), .q(half[1]));

    xor_latch_pos #(.SET_VAL(CRC_INIT[i])) u_pos (
      .a     (half[0]),
      .b     (half[1]),
      .clk   (clk),
      .set_n (set_n),
      .q     (crc_o[i])
    );
  end

endmodule
