// drc_gain_stage: static compression curve, G_dB(n) = (CF - 1)(s(n) - CT).
//
// A comparator checks s(n) > CT. Above threshold the excess s - CT is multiplied
// by the (1 - CF) register, otherwise a constant 0 is selected, and the result is
// stored in the Gain_dB Reg. The value held is the attenuation (1-CF)(s-CT) >= 0,
// i.e. the gain with its sign removed; the antilog stage applies it as a loss.
// Structure and formula follow the published design; storing 1-CF (0.5 for a 2:1 ratio),
// the Q7.9 format and rounding are this design's choices.
//
// Timing: att_db and comp update on the rising edge where en is high.
module drc_gain_stage
  import drc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [15:0]       s,
  input  logic [15:0]       ct,
  input  logic [COEF_W-1:0] one_m_cf,
  output logic [15:0]       att_db,
  output logic              comp
);

  logic        above;
  logic [15:0] excess;
  logic [31:0] prod;
  logic [15:0] att_next;

  always_comb begin
    above    = s > ct;
    excess   = s - ct;
    prod     = 32'(excess) * 32'(one_m_cf) + 32'(1 << (COEF_W - 1));
    att_next = above ? prod[COEF_W +: 16] : 16'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      att_db <= '0;
      comp   <= 1'b0;
    end else if (en) begin
      att_db <= att_next;
      comp   <= above;
    end
  end

endmodule
