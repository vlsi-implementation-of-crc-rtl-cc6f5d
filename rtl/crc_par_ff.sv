// crc_par_ff - parallelized flip-flop.
//
// Two flip-flops share one D input. One copy (q_crit_o) drives only the gate
// on the critical path, the other (q_other_o) drives every other load. The
// critical path then starts from a lightly loaded flip-flop, while the extra
// load on D is harmless because D is not on a critical path. This is the
// standard-cell technique of the design; it has to be written out by hand
// because synthesis does not do it (and a synthesis flow may need a "keep"
// constraint on the two copies so it does not merge them again).
//
// Both copies carry the asynchronous preset used by the CRC register: while
// set_n is low both hold SET_VAL. The preset value and its active-low polarity
// are this design's choice (the clock is held low during preset).
//
// Interface: clk, set_n, d_i; q_crit_o and q_other_o hold the same value.
// Timing: ordinary rising-edge flip-flop.
module crc_par_ff #(
  parameter bit SET_VAL = 1'b0
) (
  input  logic clk,
  input  logic set_n,
  input  logic d_i,
  output logic q_crit_o,
  output logic q_other_o
);

  always_ff @(posedge clk or negedge set_n) begin
    if (!set_n) q_crit_o <= SET_VAL;
    else        q_crit_o <= d_i;
  end

  always_ff @(posedge clk or negedge set_n) begin
    if (!set_n) q_other_o <= SET_VAL;
    else        q_other_o <= d_i;
  end

endmodule
