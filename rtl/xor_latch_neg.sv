// xor_latch_neg - 2-input XOR merged into a negative latch.
//
// Logic view of the full-custom cell that forms the first latch stage of the
// CRC register: transparent while clk is low (q follows a ^ b), holding
// while clk is high. It has no set or reset; while the preset is applied the
// clock is low, so it simply passes the tree value computed from the preset
// positive-latch stage.
//
// A level-sensitive latch by intent (see xor_latch_pos).
//
// Interface: a, b, clk, q. Timing: transparent on clk low.
module xor_latch_neg (
  input  logic a,
  input  logic b,
  input  logic clk,
  output logic q
);

  always_latch begin
    if (!clk) q = a ^ b;
  end

endmodule
