// drc_cfg_regs: the programmable parameter registers of the compressor.
//
// Every coefficient and threshold of the datapath (Beta1/1-Beta1 for attack,
// Beta2/1-Beta2 for release, CT, 1-CF and, with the smoothing stage, the four
// smoothing coefficients and the gain error threshold) lives in a 16 bit register
// written through a plain write port: cfg_we with cfg_addr/cfg_wdata is taken on
// the rising clock edge, addresses follow drc_pkg::reg_addr_e, unused addresses
// are ignored. That the parameters sit in programmable registers and that
// processing begins only once all of them are stored follows the published design; the
// port and map are this design's own.
//
// run rises on the clock edge after the last needed register has been written
// (each needed register written at least once) and stays high until reset. With
// SMOOTH = 0 the smoothing registers are not needed.
module drc_cfg_regs
  import drc_pkg::*;
#(
  parameter bit SMOOTH = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_addr,
  input  logic [15:0] cfg_wdata,
  output drc_cfg_t    cfg,
  output logic        run
);

  localparam logic [NUM_REGS-1:0] NEED = SMOOTH ? NEED_SMOOTH : NEED_BASIC;

  logic [NUM_REGS-1:0] written_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      written_q <= '0;
    end else if (cfg_we && int'(cfg_addr) < NUM_REGS) begin
      written_q[cfg_addr] <= 1'b1;
      unique case (reg_addr_e'(cfg_addr))
        REG_BETA1:      cfg.beta1         <= cfg_wdata;
        REG_1M_BETA1:   cfg.one_m_beta1   <= cfg_wdata;
        REG_BETA2:      cfg.beta2         <= cfg_wdata;
        REG_1M_BETA2:   cfg.one_m_beta2   <= cfg_wdata;
        REG_CT:         cfg.ct            <= cfg_wdata;
        REG_1M_CF:      cfg.one_m_cf      <= cfg_wdata;
        REG_BETA1SM:    cfg.beta1sm       <= cfg_wdata;
        REG_1M_BETA1SM: cfg.one_m_beta1sm <= cfg_wdata;
        REG_BETA2SM:    cfg.beta2sm       <= cfg_wdata;
        REG_1M_BETA2SM: cfg.one_m_beta2sm <= cfg_wdata;
        REG_GTH:        cfg.gth           <= cfg_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= 1'b0;
    else if ((written_q & NEED) == NEED) run <= 1'b1;
  end

endmodule
