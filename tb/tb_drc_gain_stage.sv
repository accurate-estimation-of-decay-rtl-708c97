// tb_drc_gain_stage: random levels, thresholds and compression factors. The
// Gain_dB Reg must hold (1-CF)*(s-CT) (to one Q7.9 LSB) when s > CT and exactly 0
// otherwise, one clock after the inputs, with the compression flag matching.
module tb_drc_gain_stage;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [15:0] s = '0, ct = '0, one_m_cf = '0;
  logic [15:0] att_db;
  logic comp;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  drc_gain_stage dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      real exp;
      bit  above;
      s        = 16'($urandom_range(20 * 512, 95 * 512));
      ct       = 16'($urandom_range(40 * 512, 90 * 512));
      one_m_cf = 16'($urandom_range(0, 65535));
      if (n % 50 == 0) s = ct;
      above = s > ct;
      exp   = above ? (real'(one_m_cf) / 65536.0) * (real'(s) - real'(ct)) : 0.0;
      @(negedge clk);
      checks++;
      if (above) n_on++; else n_off++;
      if (comp != above || real'(att_db) - exp > 1.0 || exp - real'(att_db) > 1.0
          || (!above && att_db != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: s=%0d ct=%0d cf=%0d att=%0d exp=%f", s, ct, one_m_cf, att_db, exp);
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
