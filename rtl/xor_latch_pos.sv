// xor_latch_pos - 2-input XOR merged into a positive latch, with set.
//
// Logic view of the full-custom cell: the XOR's last stage is the latch's
// own inverter, followed by a transmission gate. While clk is high the latch
// is transparent and q follows a ^ b; while clk is low it holds. set_n low
// forces q to SET_VAL regardless of the data; the design holds the clock low
// while set_n is active. The cell drawn in the design has an active-low set;
// a cell with SET_VAL = 0 is the matching reset variant, needed for the zero
// bits of the CRC preset (this design's reading of "set or reset").
//
// This is a level-sensitive latch by intent: paired with xor_latch_neg it
// forms the master-slave CRC register of the full-custom core, so tools
// reporting a latch here report the design, not a coding slip.
//
// Interface: a, b, clk, set_n, q. Timing: transparent on clk high.
module xor_latch_pos #(
  parameter bit SET_VAL = 1'b1
) (
  input  logic a,
  input  logic b,
  input  logic clk,
  input  logic set_n,
  output logic q
);

  always_latch begin
    if (!set_n)   q = SET_VAL;
    else if (clk) q = a ^ b;
  end

endmodule
