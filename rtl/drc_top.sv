// drc_top: feed-forward dynamic range compressor for a hearing aid, one sample
// per clock.
//
// The level of the input is tracked by a one-pole envelope follower with
// separate attack and release coefficients, converted to dB through a base-2
// log table, compared with the compression threshold CT, and any excess above
// it is scaled by (1 - CF) to give the attenuation. An antilog table and a
// shifter turn that into a linear gain, optionally smoothed, which multiplies
// the input delayed by the same number of stages:
//
//   x_in -> Input Reg -> |x| or x^2 -> p Reg -> log2, x dB/oct -> s Reg
//        -> (1-CF)(s-CT) if s > CT -> Gain_dB Reg -> 2^-f >> int -> Gain_lin Reg
//        -> [GainSm Reg] -> x  x(n-D) -> Output Reg -> y_out
//
// Parameters: DETECTOR (absolute or RMS level detector), LOG_W (log and antilog
// table index width, 8 or 4) and SMOOTH (include the gain smoothing stage).
// The defaults, an absolute detector with 8 bit tables and no smoothing, are the
// configuration the published design recommends; the other settings give the
// architectures it compares against.
//
// Interface: the registers are written through cfg_we/cfg_addr/cfg_wdata (map in
// drc_pkg). Until every needed register has been written run is low and the
// whole pipeline holds; afterwards a sample is taken from x_in on every rising
// clock edge. attack and compressing report the branch taken by the level
// detector and the gain stage on their last update. y_out carries the sample taken 5 edges earlier (6 with SMOOTH),
// i.e. the sample x_in held before edge k appears on y_out after edge k+5.
module drc_top
  import drc_pkg::*;
#(
  parameter detector_e DETECTOR = DET_ABS,
  parameter int        LOG_W    = 8,
  parameter bit        SMOOTH   = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [3:0]               cfg_addr,
  input  logic [15:0]              cfg_wdata,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     run,
  output logic                     attack,      // level detector took the attack branch
  output logic                     compressing  // level above CT on the last gain update
);

  localparam int PW    = env_width(DETECTOR);
  localparam int DEPTH = SMOOTH ? 5 : 4;

  drc_cfg_t                 cfg;
  logic signed [DATA_W-1:0] x_q;        // Input Reg
  logic [PW-1:0]            p;
  logic [15:0]              s;
  logic [15:0]              att_db;
  logic [15:0]              g_lin;
  logic [15:0]              g_out;
  logic [DATA_W-1:0]        x_del;

  drc_cfg_regs #(.SMOOTH(SMOOTH)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg, .run
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   x_q <= '0;
    else if (run) x_q <= x_in;
  end

  drc_level_detector #(.DETECTOR(DETECTOR), .PW(PW)) u_det (
    .clk, .rst_n, .en(run), .x(x_q),
    .beta1(cfg.beta1), .one_m_beta1(cfg.one_m_beta1),
    .beta2(cfg.beta2), .one_m_beta2(cfg.one_m_beta2),
    .p, .attack
  );

  drc_log2 #(.DETECTOR(DETECTOR), .PW(PW), .W(LOG_W)) u_log (
    .clk, .rst_n, .en(run), .p, .s
  );

  drc_gain_stage u_gain (
    .clk, .rst_n, .en(run), .s, .ct(cfg.ct), .one_m_cf(cfg.one_m_cf),
    .att_db, .comp(compressing)
  );

  drc_antilog #(.W(LOG_W)) u_antilog (
    .clk, .rst_n, .en(run), .att_db, .g_lin
  );

  generate
    if (SMOOTH) begin : g_smooth
      sm_phase_e phase;
      drc_smoothing u_sm (
        .clk, .rst_n, .en(run), .g_lin,
        .beta1sm(cfg.beta1sm), .one_m_beta1sm(cfg.one_m_beta1sm),
        .beta2sm(cfg.beta2sm), .one_m_beta2sm(cfg.one_m_beta2sm),
        .gth(cfg.gth), .g_sm(g_out), .phase
      );
    end else begin : g_direct
      assign g_out = g_lin;
    end
  endgenerate

  drc_delay_line #(.W(DATA_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .en(run), .d(x_q), .q(x_del)
  );

  drc_gain_apply u_out (
    .clk, .rst_n, .en(run), .x_del(signed'(x_del)), .g(g_out), .y(y_out)
  );

endmodule
