// crc_out_reg - inverter and output register of the CRC-32 generator.
//
// Ethernet transmits the complement of the CRC remainder. The design inverts
// the CRC register in front of the output register so the register holds
// the finished FCS. Like the input register it has no set or reset.
//
// Interface: clk, crc_i (CRC register contents), fcs_o (inverted, registered).
// Timing: one cycle of latency; fcs_o shows the register value of the
// previous cycle.
module crc_out_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] crc_i,
  output logic [W-1:0] fcs_o
);

  logic [W-1:0] crc_n;

  assign crc_n = ~crc_i;

  always_ff @(posedge clk) fcs_o <= crc_n;

endmodule
