// drc_smoothing: optional gain smoothing filter (GainSm Reg).
//
// Two subtractors compare the new linear gain G_lin(n) with the smoothed gain
// G_sm(n-1) against the threshold G_th (Thresh Reg):
//   G_sm - G_lin > G_th : G_sm(n) = b1 * G_sm(n-1) + (1-b1) * G_lin(n)  (attack)
//   G_lin - G_sm > G_th : G_sm(n) = b2 * G_sm(n-1) + (1-b2) * G_lin(n)  (release)
//   otherwise           : G_sm(n) = G_lin(n)
// Two filters and two multiplexers implement this. The filter equation, the two
// comparators against the threshold and the register set follow the published design;
// that a difference within the threshold passes G_lin straight through is this
// design's reading of it (with G_th = 0 it reduces to the published design's two-branch
// equation). Gains are Q1.15, coefficients Q0.16, sums rounded to nearest.
//
// Timing: g_sm and phase update on the rising edge where en is high; g_sm resets
// to 1.0.
module drc_smoothing
  import drc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [15:0]       g_lin,
  input  logic [COEF_W-1:0] beta1sm,
  input  logic [COEF_W-1:0] one_m_beta1sm,
  input  logic [COEF_W-1:0] beta2sm,
  input  logic [COEF_W-1:0] one_m_beta2sm,
  input  logic [15:0]       gth,
  output logic [15:0]       g_sm,
  output sm_phase_e         phase
);

  logic signed [17:0] d_fall, d_rise;   // G_sm - G_lin, G_lin - G_sm
  logic [32:0]        f_att, f_rel;
  logic [15:0]        y_att, y_rel, mux1;
  sm_phase_e          ph;
  logic [15:0]        g_next;

  function automatic logic [15:0] round_sat(logic [32:0] v);
    logic [32:0] r;
    r = (v + 33'(1 << (COEF_W - 1))) >> COEF_W;
    return (r > 33'hFFFF) ? 16'hFFFF : r[15:0];
  endfunction

  always_comb begin
    d_fall = 18'(signed'({2'b00, g_sm})) - 18'(signed'({2'b00, g_lin}));
    d_rise = -d_fall;
    f_att  = 33'(beta1sm) * 33'(g_sm) + 33'(one_m_beta1sm) * 33'(g_lin);
    f_rel  = 33'(beta2sm) * 33'(g_sm) + 33'(one_m_beta2sm) * 33'(g_lin);
    y_att  = round_sat(f_att);
    y_rel  = round_sat(f_rel);
    // First multiplexer: release filter or the new gain itself.
    mux1   = (d_rise > 18'(signed'({2'b00, gth}))) ? y_rel : g_lin;
    // Second multiplexer: attack filter overrides.
    if (d_fall > 18'(signed'({2'b00, gth}))) begin
      g_next = y_att;
      ph     = SM_ATTACK;
    end else begin
      g_next = mux1;
      ph     = (d_rise > 18'(signed'({2'b00, gth}))) ? SM_RELEASE : SM_PASS;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_sm  <= 16'(GAIN_ONE);
      phase <= SM_PASS;
    end else if (en) begin
      g_sm  <= g_next;
      phase <= ph;
    end
  end

endmodule
