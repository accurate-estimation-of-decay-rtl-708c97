// tb_drc_full: end-to-end test of drc_top at its default parameters (absolute
// detector, 8 bit log/antilog tables, no smoothing) on the hearing-aid attack /
// release step test: a 20 kHz signal at 55 dB that steps to 90 dB at sample 600
// and back to 55 dB at sample 1800 (0 dB = one LSB, so 55 dB = 562 and
// 90 dB = 31623; the sign alternates every sample). CT = 70 dB, CF = 0.5,
// attack and release times 4 ms (80 samples).
//
// The decay coefficients are computed here with the compensated formulas
//   1 - a^(Na+1) = 10^(-(3+da)/20),  da = (FV-3) - (FV(1-CF)-3)/(1-CF)
//   b^(Nr+1) = (10^((CT+4+dr)/20) - 10^(FV/20)) / (10^(IV/20) - 10^(FV/20)),
//   dr = (CT(1-CF)+4)/(1-CF) - (CT+4)
// and checked against the expected 0.9914 and 0.9824. Every output sample is then
// compared with a floating-point model of the same algorithm (within 0.5 dB), the
// output level 81 samples after each step is checked against 83 dB and 51 dB
// (within 1 dB), and the 5-clock latency is checked through the sample at which
// the step first appears. The test also holds the pipeline with one register
// unwritten and checks that nothing moves.
module tb_drc_full;
  import drc_pkg::*;

  localparam int    NSAMP = 2600;
  localparam int    LAT   = 6;      // enabled edges from x_in to y_out
  localparam real   CT = 70.0, CF = 0.5, IV = 90.0, FV = 55.0;
  localparam real   FS = 20000.0, TA = 0.004, TR = 0.004;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0;
  logic signed [15:0] x_in = '0;
  logic signed [15:0] y_out;
  logic run, attack, compressing;

  int checks = 0, failures = 0;
  int cnt = 0;
  int n_attack = 0, n_release = 0, n_comp = 0, n_nocomp = 0, n_hold = 0;
  real y_hw [NSAMP];

  drc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real db(real v);
    return 20.0 * $log10((v < 1e-9) ? 1e-9 : v);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int amp(int n);
    int a;
    a = (n >= 600 && n < 1800) ? 31623 : 562;
    return (n % 2 != 0) ? -a : a;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(reg_addr_e a, int v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Count pipeline events and collect outputs.
  always @(posedge clk) begin
    if (rst_n && run) begin
      cnt <= cnt + 1;
      if (attack) n_attack++; else n_release++;
      if (compressing) n_comp++; else n_nocomp++;
    end else if (rst_n) n_hold++;
  end

  always @(negedge clk) begin
    x_in <= 16'(amp(cnt));
    if (cnt >= LAT && cnt - LAT < NSAMP) y_hw[cnt - LAT] = real'(y_out);
  end

  real da, dr, alpha, beta, ar, br;
  int  a_reg, b_reg;
  real p, s, att, g, yr, e, maxerr;

  initial begin
    // Coefficients from the compensated formulas.
    da    = (FV - 3.0) - (FV * (1.0 - CF) - 3.0) / (1.0 - CF);
    dr    = (CT * (1.0 - CF) + 4.0) / (1.0 - CF) - (CT + 4.0);
    alpha = $pow(1.0 - $pow(10.0, -(3.0 + da) / 20.0), 1.0 / (FS * TA + 1.0));
    beta  = $pow(($pow(10.0, (CT + 4.0 + dr) / 20.0) - $pow(10.0, FV / 20.0)) /
                 ($pow(10.0, IV / 20.0) - $pow(10.0, FV / 20.0)), 1.0 / (FS * TR + 1.0));
    check(da == 3.0 && dr == 4.0, "offsets delta_a = 3, delta_r = 4");
    check(alpha > 0.9913 && alpha < 0.9916, $sformatf("alpha %f vs 0.9914", alpha));
    check(beta  > 0.9823 && beta  < 0.9826, $sformatf("beta %f vs 0.9824", beta));
    a_reg = $rtoi(alpha * 65536.0 + 0.5);
    b_reg = $rtoi(beta * 65536.0 + 0.5);
    ar = real'(a_reg) / 65536.0;
    br = real'(b_reg) / 65536.0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr(REG_BETA1, a_reg);  wr(REG_1M_BETA1, 65536 - a_reg);
    wr(REG_BETA2, b_reg);  wr(REG_1M_BETA2, 65536 - b_reg);
    wr(REG_CT, $rtoi(CT * 512.0));
    // One register still missing: the pipeline must hold.
    repeat (20) @(negedge clk);
    check(!run, "run stays low until every register is written");
    check(y_out == 0 && dut.u_det.p == 0, "pipeline holds while configuration is incomplete");
    wr(REG_1M_CF, $rtoi((1.0 - CF) * 65536.0));
    // Run the step test.
    wait (cnt >= NSAMP + LAT);
    @(negedge clk);

    // Floating-point model of the algorithm with the programmed coefficients.
    p = 0.0; maxerr = 0.0;
    for (int n = 0; n < NSAMP; n++) begin
      real ax;
      ax = (amp(n) < 0) ? -real'(amp(n)) : real'(amp(n));
      p  = (ax > p) ? ar * p + (1.0 - ar) * ax : br * p + (1.0 - br) * ax;
      s  = db(p);
      att = (s > CT) ? (1.0 - CF) * (s - CT) : 0.0;
      g  = $pow(10.0, -att / 20.0);
      yr = g * real'(amp(n));
      e  = db(y_hw[n] < 0 ? -y_hw[n] : y_hw[n]) - db(yr < 0 ? -yr : yr);
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > 0.5 || (y_hw[n] < 0) != (yr < 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: sample %0d hw %f model %f", n, y_hw[n], yr);
      end
    end
    $display("largest deviation from the floating-point model: %f dB", maxerr);

    // Document's expectations.
    check(y_hw[599] == 562.0 || y_hw[599] == -562.0, "no compression at 55 dB");
    check(db(rabs(y_hw[600])) > 85.0 && db(rabs(y_hw[599])) < 60.0,
          "step reaches the output exactly 5 clocks after it enters (latency)");
    check(rabs(db(rabs(y_hw[681])) - 83.0) < 1.0,
          $sformatf("attack: %f dB at sample 681, expected 83", db(rabs(y_hw[681]))));
    check(rabs(db(rabs(y_hw[1881])) - 51.0) < 1.0,
          $sformatf("release: %f dB at sample 1881, expected 51", db(rabs(y_hw[1881]))));
    check(rabs(db(rabs(y_hw[1799])) - 80.0) < 0.5, "steady compressed level 80 dB");
    $display("attack/release at 81 samples: %f dB, %f dB",
             db(rabs(y_hw[681])), db(rabs(y_hw[1881])));

    // Every mechanism happened.
    $display("events: attack %0d release %0d compressing %0d not %0d held %0d",
             n_attack, n_release, n_comp, n_nocomp, n_hold);
    check(n_attack > 0, "attack branch used");
    check(n_release > 0, "release branch used");
    check(n_comp > 0, "compression applied");
    check(n_nocomp > 0, "below-threshold pass-through");
    check(n_hold > 0, "pipeline held during configuration");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
