// tb_drc_antilog: sweeps the attenuation from 0 to 127 dB and compares the
// Gain_lin Reg with 10^(-A/20) in Q1.15. With 8 bit tables the error must be
// under 0.03 dB, with 4 bit tables under 0.2 dB, plus 1.5 LSB for the
// truncating shifter;
// zero attenuation must give exactly 1.0.
module tb_drc_antilog;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [15:0] att_db = '0;
  logic [15:0] g8, g4;
  int checks = 0, failures = 0;

  drc_antilog #(.W(8)) dut8 (.clk, .rst_n, .en, .att_db, .g_lin(g8));
  drc_antilog #(.W(4)) dut4 (.clk, .rst_n, .en, .att_db, .g_lin(g4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(real got, real exp, real tol_db);
    real k;
    // Table error in dB, then one LSB more for the truncating shifter.
    k = $pow(10.0, tol_db / 20.0);
    return got >= exp / k - 1.5 && got <= exp * k + 1.5;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 65536; a += 1) begin
      real exp;
      att_db = 16'(a);
      exp = 32768.0 * $pow(10.0, -real'(a) / 512.0 / 20.0);
      @(negedge clk);
      checks += 2;
      if (!close(real'(g8), exp, 0.03)) begin
        failures++; if (failures < 10) $display("FAIL: W=8 A=%f dB g=%0d exp %f", a / 512.0, g8, exp);
      end
      if (!close(real'(g4), exp, 0.2)) begin
        failures++; if (failures < 10) $display("FAIL: W=4 A=%f dB g=%0d exp %f", a / 512.0, g4, exp);
      end
      if (a == 0) begin
        checks++;
        if (g8 != 16'd32768 || g4 != 16'd32768) begin failures++; $display("FAIL: unity gain"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
