// drc_pkg: types and constants shared by the blocks of the feed-forward dynamic
// range compressor (DRC).
//
// Number formats (all unsigned unless stated):
//   input / output samples : 16 bit two's complement
//   decay coefficients     : Q0.16  (beta = 0.9914 -> 64972), as are 1-beta and 1-CF
//   log2 values            : Q5.11
//   levels and gains in dB : Q7.9   (0 dB = an amplitude of one input LSB,
//                                    so a full-scale input is 90.3 dB)
//   linear gains           : Q1.15  (1.0 = 32768)
// The 16 bit width of the input and of the coefficient registers follows the
// document; the binary points, the dB reference and the register map below are
// this design's own choices.
package drc_pkg;

  localparam int DATA_W   = 16;  // input sample width
  localparam int COEF_W   = 16;  // coefficient register width (Q0.16)
  localparam int LOG_FRAC = 11;  // fraction bits of log2 values
  localparam int SPL_FRAC = 9;   // fraction bits of dB values
  localparam int GAIN_ONE = 32768; // 1.0 in Q1.15

  // Level detector flavour: |x| (absolute) or x^2 (RMS).
  typedef enum logic {DET_ABS = 1'b0, DET_RMS = 1'b1} detector_e;

  // Envelope width: 15 bits of magnitude, 30 bits once squared.
  function automatic int env_width(detector_e det);
    return (det == DET_RMS) ? 30 : 15;
  endfunction

  // dB per octave of the envelope: 20/log2(10) for amplitude, 10/log2(10) for
  // power, in Q3.13.
  function automatic int db_per_oct(detector_e det);
    return (det == DET_RMS) ? 24661 : 49321;
  endfunction

  // log2(10)/20 in Q0.16: turns a dB value into octaves.
  localparam int OCT_PER_DB = 10885;

  // Programmable register map (write port of drc_cfg_regs).
  typedef enum logic [3:0] {
    REG_BETA1      = 4'd0,   // attack coefficient alpha
    REG_1M_BETA1   = 4'd1,   // 1 - alpha
    REG_BETA2      = 4'd2,   // release coefficient beta
    REG_1M_BETA2   = 4'd3,   // 1 - beta
    REG_CT         = 4'd4,   // compression threshold, dB Q7.9
    REG_1M_CF      = 4'd5,   // 1 - compression factor
    REG_BETA1SM    = 4'd6,   // smoothing attack coefficient
    REG_1M_BETA1SM = 4'd7,
    REG_BETA2SM    = 4'd8,   // smoothing release coefficient
    REG_1M_BETA2SM = 4'd9,
    REG_GTH        = 4'd10   // smoothing gain error threshold, Q1.15
  } reg_addr_e;

  localparam int NUM_REGS = 11;
  // Registers that must be written before processing starts.
  localparam logic [NUM_REGS-1:0] NEED_BASIC  = 11'b000_0011_1111;
  localparam logic [NUM_REGS-1:0] NEED_SMOOTH = 11'b111_1111_1111;

  typedef struct packed {
    logic [COEF_W-1:0] beta1;
    logic [COEF_W-1:0] one_m_beta1;
    logic [COEF_W-1:0] beta2;
    logic [COEF_W-1:0] one_m_beta2;
    logic [15:0]       ct;
    logic [COEF_W-1:0] one_m_cf;
    logic [COEF_W-1:0] beta1sm;
    logic [COEF_W-1:0] one_m_beta1sm;
    logic [COEF_W-1:0] beta2sm;
    logic [COEF_W-1:0] one_m_beta2sm;
    logic [15:0]       gth;
  } drc_cfg_t;

  // Branch taken by the smoothing filter.
  typedef enum logic [1:0] {SM_PASS = 2'd0, SM_ATTACK = 2'd1, SM_RELEASE = 2'd2} sm_phase_e;

endpackage
