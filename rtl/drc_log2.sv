// drc_log2: input level in dB, s(n) = 20*log10(p) (10*log10(p) for the RMS
// detector), registered in the s Reg.
//
// The address generator splits p into an exponent e and a W-bit mantissa index i
// (p ~ (2^W + i) * 2^e). A table of 2^W entries holds log2(1 + i/2^W) in Q0.11;
// adding the integer W + e gives log2(p) in Q5.11. Multiplying by 20/log2(10)
// (10/log2(10) for RMS, both Q3.13) turns octaves into dB, rounded to Q7.9. The
// base-2 table, the leading-one address generator and the scaling multiplier
// follow the published design; the table word width and rounding are this design's
// choices. The table is computed at elaboration from the formula above.
//
// Timing: s updates on the rising edge where en is high, from the p of that cycle.
module drc_log2
  import drc_pkg::*;
#(
  parameter detector_e DETECTOR = DET_ABS,
  parameter int        PW       = env_width(DETECTOR),
  parameter int        W        = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [PW-1:0] p,
  output logic [15:0]   s
);

  typedef logic [LOG_FRAC-1:0] lut_t [2**W];

  function automatic lut_t make_log_lut();
    lut_t t;
    for (int i = 0; i < 2**W; i++)
      t[i] = LOG_FRAC'($rtoi($ln(1.0 + real'(i) / real'(2**W)) / $ln(2.0)
                            * real'(2**LOG_FRAC) + 0.5));
    return t;
  endfunction

  localparam lut_t LOG_LUT = make_log_lut();
  localparam int   K       = db_per_oct(DETECTOR);

  logic [4:0]   e;
  logic [W-1:0] idx;
  logic         below_w;
  logic [15:0]  log2_p;     // Q5.11
  logic [31:0]  prod;       // Q8.24
  logic [31:0]  s_next;

  drc_log_addr_gen #(.PW(PW), .W(W)) u_addr (
    .p(p), .e(e), .idx(idx), .below_w(below_w)
  );

  always_comb begin
    log2_p = {5'(e + 5'(W)), LOG_FRAC'(0)} + 16'(LOG_LUT[idx]);
    prod   = 32'(log2_p) * 32'(K);
    s_next = (prod + 32'(1 << 14)) >> 15;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= '0;
    else if (en) s <= s_next[15:0];
  end

endmodule
