// tb_drc_level_detector: drives the envelope follower with random samples,
// bursts of loud and quiet input and random coefficients, and compares p and the
// attack flag after every clock with a model of
//   p(n) = c * p(n-1) + (1-c) * d(n),  c = attack pair if d(n) > p(n-1) else release
// where d is |x| (absolute detector) or x^2 (RMS), coefficients Q0.16 and the
// sum rounded to nearest. Both detector types are checked, and en = 0 must hold p.
module tb_drc_level_detector;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] x = '0;
  logic [15:0] beta1 = '0, one_m_beta1 = '0, beta2 = '0, one_m_beta2 = '0;
  logic [14:0] p_abs;
  logic [29:0] p_rms;
  logic att_abs, att_rms;
  int checks = 0, failures = 0;
  int n_att = 0, n_rel = 0;

  drc_level_detector #(.DETECTOR(DET_ABS)) dut_abs (.clk, .rst_n, .en, .x, .beta1, .one_m_beta1,
    .beta2, .one_m_beta2, .p(p_abs), .attack(att_abs));
  drc_level_detector #(.DETECTOR(DET_RMS)) dut_rms (.clk, .rst_n, .en, .x, .beta1, .one_m_beta1,
    .beta2, .one_m_beta2, .p(p_rms), .attack(att_rms));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint step(longint p, longint d, longint pmax);
    longint c, cm, v;
    if (d > p) begin c = beta1; cm = one_m_beta1; end
    else       begin c = beta2; cm = one_m_beta2; end
    v = (c * p + cm * d + 32768) / 65536;
    return (v > pmax) ? pmax : v;
  endfunction

  longint m_abs = 0, m_rms = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint ax, d_abs, d_rms;
      bit e_att_abs, e_att_rms;
      if (n % 2000 == 0) begin
        int b1, b2;
        b1 = 60000 + int'($urandom_range(0, 5500));
        b2 = 60000 + int'($urandom_range(0, 5500));
        beta1 = 16'(b1); one_m_beta1 = 16'(65536 - b1);
        beta2 = 16'(b2); one_m_beta2 = 16'(65536 - b2);
      end
      // Bursts: loud, quiet or random, with the odd full-scale negative sample.
      case ((n / 500) % 3)
        0: x = 16'($urandom_range(20000, 32767));
        1: x = 16'($urandom_range(0, 600));
        default: x = 16'($urandom);
      endcase
      if ($urandom_range(0, 1)) x = -x;
      if (n % 997 == 0) x = 16'sh8000;
      en = (n % 13 != 7);
      ax = (x < 0) ? -longint'(x) : longint'(x);
      d_abs = (ax > 32767) ? 32767 : ax;
      d_rms = (ax * ax > 30'h3FFFFFFF) ? 30'h3FFFFFFF : ax * ax;
      e_att_abs = d_abs > m_abs;
      e_att_rms = d_rms > m_rms;
      @(negedge clk);
      if (en) begin
        m_abs = step(m_abs, d_abs, 32767);
        m_rms = step(m_rms, d_rms, 30'h3FFFFFFF);
        if (e_att_abs) n_att++; else n_rel++;
        checks += 2;
        if (att_abs != e_att_abs || att_rms != e_att_rms) begin
          failures++;
          if (failures < 10) $display("FAIL: attack flag at %0d", n);
        end
      end else checks++;
      if (longint'(p_abs) != m_abs || longint'(p_rms) != m_rms) begin
        failures++;
        if (failures < 10)
          $display("FAIL: n=%0d p_abs %0d exp %0d p_rms %0d exp %0d", n, p_abs, m_abs, p_rms, m_rms);
      end
    end
    checks++;
    if (n_att == 0 || n_rel == 0) begin failures++; $display("FAIL: a branch never taken"); end
    $display("attack updates %0d release updates %0d", n_att, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
