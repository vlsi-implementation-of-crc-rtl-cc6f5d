// crc_in_reg - input register of the CRC-32 generator.
//
// Captures one data byte on every rising clock edge and presents it to the
// next-state logic during the following cycle. As in the design, it has no
// set or reset: it is only read after it has been loaded.
//
// Interface: clk, d_i (byte from the line), q_o (registered byte).
// Timing: one cycle of latency.
module crc_in_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);

  always_ff @(posedge clk) q_o <= d_i;

endmodule
