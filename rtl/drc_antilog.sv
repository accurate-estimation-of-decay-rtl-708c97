// drc_antilog: dB gain to linear gain, G_lin = 10^(-att_db/20), in the Gain_lin Reg.
//
// The attenuation in dB (Q7.9) is multiplied by log2(10)/20 to give octaves,
// rounded to W fraction bits. The fraction indexes a table of 2^W entries holding
// 2^(-k/2^W) in Q1.15, and the table output is shifted right by the integer part.
// The antilog table with a shifter driven by the integer part follows the
// document; converting to octaves with a constant multiplier first, the table
// contents' format and the rounding are this design's choices. A shift of 16 or
// more yields 0. The table is computed at elaboration from the formula above.
//
// Timing: g_lin updates on the rising edge where en is high; it resets to 1.0.
module drc_antilog
  import drc_pkg::*;
#(
  parameter int W = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] att_db,
  output logic [15:0] g_lin
);

  typedef logic [15:0] lut_t [2**W];

  function automatic lut_t make_antilog_lut();
    lut_t t;
    for (int k = 0; k < 2**W; k++)
      t[k] = 16'($rtoi($pow(2.0, -real'(k) / real'(2**W)) * real'(GAIN_ONE) + 0.5));
    return t;
  endfunction

  localparam lut_t ANTILOG_LUT = make_antilog_lut();
  localparam int   SH = SPL_FRAC + COEF_W - W;   // product LSBs below the W-bit fraction

  logic [31:0]  prod;     // octaves, Q7.25
  logic [31:0]  oct;      // octaves, Q(32-W).W, rounded
  logic [W-1:0] frac;
  logic [31:0]  ipart;
  logic [15:0]  g_next;

  always_comb begin
    prod   = 32'(att_db) * 32'(OCT_PER_DB);
    oct    = (prod + 32'(1 << (SH - 1))) >> SH;
    frac   = oct[W-1:0];
    ipart  = oct >> W;
    g_next = (ipart >= 32'd16) ? 16'd0 : (ANTILOG_LUT[frac] >> ipart[3:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  g_lin <= 16'(GAIN_ONE);
    else if (en) g_lin <= g_next;
  end

endmodule
