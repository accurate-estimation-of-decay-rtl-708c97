// tb_drc_smoothing: drives the smoothing stage with a gain that jumps between
// random levels and wanders in small random steps, with random thresholds, and
// compares the GainSm Reg after every clock with
//   G_sm - G_lin > G_th : attack filter  b1 * G_sm + (1-b1) * G_lin
//   G_lin - G_sm > G_th : release filter b2 * G_sm + (1-b2) * G_lin
//   otherwise           : G_lin
// (Q0.16 coefficients, rounded to nearest). All three branches must occur.
module tb_drc_smoothing;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [15:0] g_lin = 16'd32768;
  logic [15:0] beta1sm = '0, one_m_beta1sm = '0, beta2sm = '0, one_m_beta2sm = '0, gth = '0;
  logic [15:0] g_sm;
  sm_phase_e phase;
  int checks = 0, failures = 0;
  int n_att = 0, n_rel = 0, n_pass = 0;

  drc_smoothing dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m = 32768;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint gl, th, nxt;
      sm_phase_e eph;
      if (n % 1000 == 0) begin
        int b1, b2;
        b1 = 60000 + int'($urandom_range(0, 5000));
        b2 = 60000 + int'($urandom_range(0, 5000));
        beta1sm = 16'(b1); one_m_beta1sm = 16'(65536 - b1);
        beta2sm = 16'(b2); one_m_beta2sm = 16'(65536 - b2);
        gth = 16'($urandom_range(0, 300));
      end
      if (n % 300 == 0) g_lin = 16'($urandom_range(500, 32768));
      else if ($urandom_range(0, 3) == 0) g_lin = 16'(int'(g_lin) + int'($urandom_range(0, 40)) - 20);
      gl = g_lin; th = gth;
      if (m - gl > th) begin
        nxt = (longint'(beta1sm) * m + longint'(one_m_beta1sm) * gl + 32768) / 65536;
        eph = SM_ATTACK; n_att++;
      end else if (gl - m > th) begin
        nxt = (longint'(beta2sm) * m + longint'(one_m_beta2sm) * gl + 32768) / 65536;
        eph = SM_RELEASE; n_rel++;
      end else begin
        nxt = gl;
        eph = SM_PASS; n_pass++;
      end
      @(negedge clk);
      m = nxt;
      checks++;
      if (longint'(g_sm) != m || phase != eph) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d g_sm=%0d exp %0d phase %0d exp %0d", n, g_sm, m, phase, eph);
      end
    end
    $display("attack %0d release %0d pass %0d", n_att, n_rel, n_pass);
    checks++;
    if (n_att == 0 || n_rel == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
