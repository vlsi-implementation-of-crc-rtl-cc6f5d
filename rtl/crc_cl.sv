// crc_cl - combinational next-state logic ("CL") of the CRC-32 generator.
//
// Computes R' = (R * x^8 + D) mod G for the Ethernet polynomial G = 04C11DB7
// in one step: a pure XOR network in which every output bit is the XOR of at
// most eight inputs (register bits 31:24 fed back through x^32 mod G, the
// register bit eight places down, and for bits 7:0 one data bit). With
// 2-input XOR gates this is a tree of depth three, which the design relies
// on for its clock rate. The network is derived at elaboration time from the
// bit-serial definition in crc32_pkg::crc_step.
//
// The critical output bits (the ones whose tree needs all three XOR levels,
// i.e. more than four inputs) may take the high register bits from a
// separate copy, crit_i, as produced by the parallelized flip-flops of
// crc_reg. The other bits use crc_i. Feeding the same value on both gives
// the plain architecture.
//
// Interface: crc_i / crit_i (current register), d_i (input byte, bit 0 first
// on the wire), next_o (next register value). Purely combinational.
module crc_cl
  import crc32_pkg::*;
#(
  // An output bit whose tree has at least this many inputs is critical.
  parameter int unsigned CRIT_MIN_IN = 5
) (
  input  logic [CRC_W-1:0]  crc_i,
  input  logic [CRC_W-1:0]  crit_i,
  input  logic [DATA_W-1:0] d_i,
  output logic [CRC_W-1:0]  next_o
);

  for (genvar i = 0; i < CRC_W; i++) begin : g_bit
    localparam logic [NIN-1:0] MASK = input_mask(i);
    localparam bit             CRIT = popcount(MASK) >= CRIT_MIN_IN;
    logic [NIN-1:0] v;
    assign v         = {d_i, (CRIT ? crit_i : crc_i)};
    assign next_o[i] = ^(v & MASK);
  end

endmodule
