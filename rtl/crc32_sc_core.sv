// crc32_sc_core - CRC-32 core of the standard-cell implementation.
//
// The next-state logic crc_cl and the flip-flop CRC register crc_reg in a
// loop: every rising clock edge the register takes (R * x^8 + D) mod G for
// the byte d_i from the input register. set_n low presets the register to
// 46AF6449 (clock held low meanwhile). After the frame and four zero bytes
// the register holds the remainder; the caller inverts it.
//
// The fed-back high byte comes from parallelized flip-flops: one copy drives
// only the critical (three-level) XOR trees, the other the rest.
//
// Interface: clk, set_n, d_i (byte), crc_o (register contents).
// Timing: one byte per clock; crc_o reflects a byte one edge after it is
// presented on d_i.
module crc32_sc_core
  import crc32_pkg::*;
#(
  parameter logic [CRC_W-1:0] DUP_MASK    = 32'hFF00_0000,
  parameter int unsigned      CRIT_MIN_IN = 5
) (
  input  logic              clk,
  input  logic              set_n,
  input  logic [DATA_W-1:0] d_i,
  output logic [CRC_W-1:0]  crc_o
);

  logic [CRC_W-1:0] crc_q, crit_q, crc_d;

  crc_cl #(.CRIT_MIN_IN(CRIT_MIN_IN)) u_cl (
    .crc_i  (crc_q),
    .crit_i (crit_q),
    .d_i    (d_i),
    .next_o (crc_d)
  );

  crc_reg #(.INIT(CRC_INIT), .DUP_MASK(DUP_MASK)) u_reg (
    .clk    (clk),
    .set_n  (set_n),
    .d_i    (crc_d),
    .q_o    (crc_q),
    .crit_o (crit_q)
  );

  assign crc_o = crc_q;

endmodule
