// crc_out_latch_reg - inverter and output register built from latches, for
// the full-custom core.
//
// The full-custom CRC register changes while the clock is high, right after
// the rising edge, so an edge-triggered register sampling it on that same
// edge would depend on the latch's clock-to-output delay. This register is
// instead built the way the full-custom core builds its own: a negative latch
// with the inversion merged in (an XOR with a constant one) takes ~crc_i while
// the clock is low, when the CRC register is stable, and a positive latch
// passes it on while the clock is high. The pair acts as a rising-edge
// register with the same timing as crc_out_reg. Building it from latches is
// this design's choice; the design leaves input and output registers out of
// the full-custom layout.
//
// The latches are intended; tools that report them report the design.
//
// Interface: clk, crc_i (full-custom CRC register), fcs_o (inverted,
// registered). Timing: fcs_o changes on the rising edge to the complement of
// the value crc_i had while the clock was low before it.
module crc_out_latch_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] crc_i,
  output logic [W-1:0] fcs_o
);

  logic [W-1:0] mid;

  for (genvar i = 0; i < W; i++) begin : g_bit
    xor_latch_neg u_neg (.a(crc_i[i]), .b(1'b1), .clk(clk), .q(mid[i]));
    xor_latch_pos #(.SET_VAL(1'b0)) u_pos (
      .a(mid[i]), .b(1'b0), .clk(clk), .set_n(1'b1), .q(fcs_o[i]));
  end

endmodule
