// crc_reg - 32-bit CRC register of the standard-cell generator.
//
// Holds the running remainder. Each bit has an asynchronous set or reset so
// that set_n low loads the preset 46AF6449 required by the augmented CRC
// form; the clock is expected to stay low while set_n is low, as the design
// requires.
//
// Bits selected by DUP_MASK are built from crc_par_ff, the parallelized
// flip-flop: their critical copy appears on crit_o and drives only the
// critical next-state trees, their other copy appears on q_o. For bits not
// in DUP_MASK, crit_o and q_o are the same flip-flop. Which bits to duplicate
// is not given; by default the eight fed-back bits 31:24 are duplicated,
// since each of them fans out to many next-state trees.
//
// Interface: clk, set_n (active-low preset), d_i (next value), q_o, crit_o.
// Timing: rising-edge register, preset asynchronous.
module crc_reg
  import crc32_pkg::*;
#(
  parameter logic [CRC_W-1:0] INIT     = CRC_INIT,
  parameter logic [CRC_W-1:0] DUP_MASK = 32'hFF00_0000
) (
  input  logic             clk,
  input  logic             set_n,
  input  logic [CRC_W-1:0] d_i,
  output logic [CRC_W-1:0] q_o,
  output logic [CRC_W-1:0] crit_o
);

  for (genvar i = 0; i < CRC_W; i++) begin : g_bit
    if (DUP_MASK[i]) begin : g_dup
      crc_par_ff #(.SET_VAL(INIT[i])) u_ff (
        .clk       (clk),
        .set_n     (set_n),
        .d_i       (d_i[i]),
        .q_crit_o  (crit_o[i]),
        .q_other_o (q_o[i])
      );
    end else begin : g_one
      always_ff @(posedge clk or negedge set_n) begin
        if (!set_n) q_o[i] <= INIT[i];
        else        q_o[i] <= d_i[i];
      end
      assign crit_o[i] = q_o[i];
    end
  end

endmodule
