// drc_gain_apply: output multiplier and Output Reg, y(n) = G(n) * x(n - D).
//
// Multiplies the delayed signed sample by the unsigned Q1.15 gain, rounds to
// nearest and saturates to 16 bits (a gain of exactly 1.0 on -32768 is the only
// case that could overflow otherwise). The multiplier and output register follow
// the published design; rounding and saturation are this design's choice.
//
// Timing: y updates on the rising edge where en is high.
module drc_gain_apply
  import drc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x_del,
  input  logic [15:0]              g,
  output logic signed [DATA_W-1:0] y
);

  logic signed [33:0] prod;
  logic signed [33:0] r;
  logic signed [DATA_W-1:0] y_next;

  always_comb begin
    prod = 34'(x_del) * 34'(signed'({1'b0, g}));
    r    = (prod + 34'sd16384) >>> 15;
    if (r > 34'sd32767)       y_next = 16'sh7FFF;
    else if (r < -34'sd32768) y_next = 16'sh8000;
    else                      y_next = r[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_next;
  end

endmodule
