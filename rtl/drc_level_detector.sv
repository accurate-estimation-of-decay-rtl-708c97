// drc_level_detector: envelope follower of the compressor (p Reg and its filter).
//
// The detector input d is |x| (DETECTOR = DET_ABS) or x^2 (DET_RMS). A comparator
// chooses the coefficient pair: when d > p(n-1) the attack pair (Beta1, 1-Beta1)
// is used, otherwise the release pair (Beta2, 1-Beta2):
//     p(n) = beta * p(n-1) + (1 - beta) * d(n)
// Four multipliers and two adders form both candidates and a multiplexer picks
// one, as in the published design's absolute-detector architecture; the squarer that
// replaces the absolute value for the RMS detector also follows the published design.
// Coefficients are Q0.16, the sum is rounded to nearest and saturated to PW bits
// (this design's choice). |x| of -32768 and its square saturate likewise.
//
// Timing: p and attack update on the rising edge where en is high, from the x
// presented in that cycle (x is the output of the Input Reg).
module drc_level_detector
  import drc_pkg::*;
#(
  parameter detector_e DETECTOR = DET_ABS,
  parameter int        PW       = env_width(DETECTOR)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [DATA_W-1:0] x,
  input  logic [COEF_W-1:0]       beta1,
  input  logic [COEF_W-1:0]       one_m_beta1,
  input  logic [COEF_W-1:0]       beta2,
  input  logic [COEF_W-1:0]       one_m_beta2,
  output logic [PW-1:0]           p,
  output logic                    attack
);

  localparam int SW = PW + COEF_W + 1;           // width of one filter sum
  localparam logic [PW-1:0] PMAX = '1;

  logic [DATA_W-1:0]   mag;    // |x|, 16 bits before saturation
  logic [2*DATA_W-1:0] sq;     // x^2
  logic [PW-1:0]       d;      // detector input
  logic                att;    // comparator: d > p(n-1)
  logic [SW-1:0]       sum_att, sum_rel, sum_sel;
  logic [SW-1:0]       rounded;

  always_comb begin
    mag = x[DATA_W-1] ? DATA_W'(-x) : DATA_W'(x);
    sq  = (2*DATA_W)'(mag) * (2*DATA_W)'(mag);
    if (DETECTOR == DET_RMS)
      d = (sq > (2*DATA_W)'(PMAX)) ? PMAX : PW'(sq);
    else
      d = (mag > DATA_W'(PMAX)) ? PMAX : PW'(mag);

    att     = d > p;
    sum_att = SW'(beta1) * SW'(p) + SW'(one_m_beta1) * SW'(d);
    sum_rel = SW'(beta2) * SW'(p) + SW'(one_m_beta2) * SW'(d);
    sum_sel = att ? sum_att : sum_rel;
    rounded = (sum_sel + SW'(1 << (COEF_W - 1))) >> COEF_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p      <= '0;
      attack <= 1'b0;
    end else if (en) begin
      p      <= (rounded > SW'(PMAX)) ? PMAX : PW'(rounded);
      attack <= att;
    end
  end

endmodule
