// tb_drc_conventional: the same step test as tb_drc_top, but with decay
// coefficients from the uncompensated formulas, which ignore the effect of the
// compression factor on the time constants:
//   1 - a^(Na+1) = 10^(-3/20),  b^(Nr+1) = (10^((CT+4)/20) - 10^(FV/20)) /
//                                           (10^(IV/20) - 10^(FV/20))
// giving a = 0.985 and b = 0.9763 (used in the detector and, where present, the
// smoothing stage). With these the output misses the 83 dB / 51 dB targets 81
// samples after each step. Checked: every architecture misses the 83 dB attack
// target by more than 1 dB; the output stays within 0.3 dB of a floating-point
// model during both transients; the attack level lies within 0.6 dB and the
// release level within 1.1 dB (same side of 51 dB) of these reference
// floating-point figures:
//   attack  Abs 81.47  RMS 80.75  AbsSm 86.06  RMSSm 85.16 dB
//   release Abs 52.548 RMS 49.533 AbsSm 48.96  RMSSm 47.27 dB
// The four architectures use 8 bit tables.
module tb_drc_conventional;
  import drc_pkg::*;

  localparam int NSAMP = 2600;
  localparam int NCFG  = 4;
  localparam real ATT_REF [4] = '{81.47, 80.75, 86.06, 85.16};
  localparam real REL_REF [4] = '{52.548, 49.533, 48.96, 47.27};

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_addr = '0;

  int checks = 0, failures = 0;
  int done_mask = 0;
  int n_att [NCFG], n_rel [NCFG], n_comp [NCFG], n_nocomp [NCFG];
  int n_sm_att [NCFG], n_sm_rel [NCFG], n_sm_pass [NCFG];
  real y_hw [NCFG][NSAMP];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int amp(int n);
    int a;
    a = (n >= 600 && n < 1800) ? 31623 : 562;
    return (n % 2 != 0) ? -a : a;
  endfunction

  function automatic real db(real v);
    if (v < 0.0) v = -v;
    return 20.0 * $log10((v < 1e-9) ? 1e-9 : v);
  endfunction

  function automatic int q16(real c);
    return $rtoi(c * 65536.0 + 0.5);
  endfunction

  // Register contents for configuration i (bit 0: RMS, bit 1: smoothing).
  function automatic int reg_val(int i, int a);
    real b1, b2, s1, s2;
    b1 = 0.985; b2 = 0.9763; s1 = 0.985; s2 = 0.9763;
    case (a)
      0:  return q16(b1);
      1:  return 65536 - q16(b1);
      2:  return q16(b2);
      3:  return 65536 - q16(b2);
      4:  return 70 * 512;
      5:  return 32768;
      6:  return q16(s1);
      7:  return 65536 - q16(s1);
      8:  return q16(s2);
      9:  return 65536 - q16(s2);
      default: return 0;    // gain error threshold
    endcase
  endfunction


  // Floating-point model of architecture i with the programmed (quantised)
  // coefficients; returns the output level in dB for every sample.
  task automatic float_model(input int i, output real lvl [NSAMP]);
    real p, gsm, s, att, g, d, ax;
    real b1, b2, s1, s2;
    bit  rms, sm;
    rms = (i % 2) != 0;
    sm  = ((i / 2) % 2) != 0;
    b1 = real'(reg_val(i, 0)) / 65536.0;  b2 = real'(reg_val(i, 2)) / 65536.0;
    s1 = real'(reg_val(i, 6)) / 65536.0;  s2 = real'(reg_val(i, 8)) / 65536.0;
    p = 0.0; gsm = 1.0;
    for (int n = 0; n < NSAMP; n++) begin
      ax = real'(amp(n));
      if (ax < 0.0) ax = -ax;
      d  = rms ? ax * ax : ax;
      p  = (d > p) ? b1 * p + (1.0 - b1) * d : b2 * p + (1.0 - b2) * d;
      s  = (p > 0.0) ? (rms ? 10.0 : 20.0) * $log10(p) : -100.0;
      att = (s > 70.0) ? 0.5 * (s - 70.0) : 0.0;
      g  = $pow(10.0, -att / 20.0);
      if (sm) begin
        if (gsm > g)      gsm = s1 * gsm + (1.0 - s1) * g;
        else if (g > gsm) gsm = s2 * gsm + (1.0 - s2) * g;
        else              gsm = g;
        g = gsm;
      end
      lvl[n] = db(g * ax);
    end
  endtask

  for (genvar i = 0; i < NCFG; i++) begin : g_arch
    localparam detector_e DET = (i % 2) ? DET_RMS : DET_ABS;
    localparam bit        SM  = ((i / 2) % 2) != 0;
    localparam int        LW  = (i >= 4) ? 4 : 8;
    localparam int        LAT = SM ? 7 : 6;

    logic signed [15:0] x_in = '0;
    logic signed [15:0] y_out;
    logic run, attack, compressing;
    logic [15:0] wdata;
    int cnt = 0;

    assign wdata = 16'(reg_val(i, int'(cfg_addr)));

    drc_top #(.DETECTOR(DET), .LOG_W(LW), .SMOOTH(SM)) dut (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata(wdata),
      .x_in, .y_out, .run, .attack, .compressing
    );

    always @(posedge clk) begin
      if (rst_n && run) begin
        cnt <= cnt + 1;
        if (attack) n_att[i]++; else n_rel[i]++;
        if (compressing) n_comp[i]++; else n_nocomp[i]++;
      end
    end

    if (SM) begin : g_sm_count
      always @(posedge clk) begin
        if (rst_n && run) begin
          case (dut.g_smooth.u_sm.phase)
            SM_ATTACK:  n_sm_att[i]++;
            SM_RELEASE: n_sm_rel[i]++;
            default:    n_sm_pass[i]++;
          endcase
        end
      end
    end

    always @(negedge clk) begin
      x_in <= 16'(amp(cnt));
      if (cnt >= LAT && cnt - LAT < NSAMP) y_hw[i][cnt - LAT] = real'(y_out);
      if (cnt == NSAMP + LAT) done_mask |= (1 << i);
    end
  end

  real lvl [NSAMP];
  real err;

  initial begin
    for (int i = 0; i < NCFG; i++) begin
      n_att[i] = 0; n_rel[i] = 0; n_comp[i] = 0; n_nocomp[i] = 0;
      n_sm_att[i] = 0; n_sm_rel[i] = 0; n_sm_pass[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NUM_REGS; a++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = 4'(a);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    wait (done_mask == (1 << NCFG) - 1);
    @(negedge clk);

    for (int i = 0; i < NCFG; i++) begin
      string nm;
      nm = $sformatf("%s%s Log%0d", (i % 2) ? "RMS" : "Abs", ((i / 2) % 2) ? "Sm" : "",
                     (i >= 4) ? 4 : 8);
      $display("%-10s attack %7.3f dB  release %7.3f dB  steady %7.3f dB",
               nm, db(y_hw[i][681]), db(y_hw[i][1881]), db(y_hw[i][1799]));
      float_model(i, lvl);
      err = 0.0;
      for (int n = 0; n < NSAMP; n++)
        if ((n >= 600 && n < 681) || (n >= 1800 && n < 1881))
          if (db(y_hw[i][n]) - lvl[n] > err || lvl[n] - db(y_hw[i][n]) > err)
            err = (db(y_hw[i][n]) > lvl[n]) ? db(y_hw[i][n]) - lvl[n] : lvl[n] - db(y_hw[i][n]);
      $display("           largest deviation from the floating-point model: %f dB", err);
      checks++;
      if (err > 0.3) begin failures++; $display("FAIL: %s deviates from the model", nm); end
      // The uncompensated coefficients miss the specification.
      checks++;
      if (db(y_hw[i][681]) - 83.0 < 1.0 && db(y_hw[i][681]) - 83.0 > -1.0) begin
        failures++; $display("FAIL: %s conventional attack unexpectedly on target", nm);
      end
      checks++;
      if (db(y_hw[i][681]) - ATT_REF[i] > 0.6 || db(y_hw[i][681]) - ATT_REF[i] < -0.6) begin
        failures++; $display("FAIL: %s attack level at sample 681, expected %f", nm, ATT_REF[i]);
      end
      checks++;
      if (db(y_hw[i][1881]) - REL_REF[i] > 1.1 || db(y_hw[i][1881]) - REL_REF[i] < -1.1
          || (db(y_hw[i][1881]) > 51.0) != (REL_REF[i] > 51.0)) begin
        failures++; $display("FAIL: %s release level at sample 1881, expected %f", nm, REL_REF[i]);
      end
      // Latency: the step is visible at the output exactly at sample 600.
      checks++;
      if (!(db(y_hw[i][599]) < 60.0 && db(y_hw[i][600]) > 85.0)) begin
        failures++; $display("FAIL: %s latency", nm);
      end
      // Sign of the input is kept.
      checks++;
      if (!(y_hw[i][600] > 0.0 && y_hw[i][601] < 0.0)) begin
        failures++; $display("FAIL: %s output sign", nm);
      end
      // Mechanisms.
      checks++;
      if (n_att[i] == 0 || n_rel[i] == 0 || n_comp[i] == 0 || n_nocomp[i] == 0) begin
        failures++; $display("FAIL: %s a detector or gain branch never happened", nm);
      end
      if ((i / 2) % 2) begin
        $display("           smoothing: attack %0d release %0d pass %0d",
                 n_sm_att[i], n_sm_rel[i], n_sm_pass[i]);
        checks++;
        if (n_sm_att[i] == 0 || n_sm_rel[i] == 0 || n_sm_pass[i] == 0) begin
          failures++; $display("FAIL: %s a smoothing branch never happened", nm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
