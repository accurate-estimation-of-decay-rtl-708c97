// tb_drc_log2: sweeps the envelope over its range and compares the s Reg with
// 20*log10(p) (absolute detector) and 10*log10(p) (RMS), in Q7.9 dB. With 8 bit
// tables the error must stay under 0.05 dB, with 4 bit tables under 0.55 dB (a 1/16 octave index step is 0.53 dB), for
// every p at or above 2^W. The result must appear one clock after p and hold
// while en is low.
module tb_drc_log2;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [14:0] p15 = '0;
  logic [29:0] p30 = '0;
  logic [15:0] s8, s4, s30;
  int checks = 0, failures = 0;
  real worst8 = 0.0, worst4 = 0.0, worst30 = 0.0;

  drc_log2 #(.DETECTOR(DET_ABS), .W(8)) dut8  (.clk, .rst_n, .en, .p(p15), .s(s8));
  drc_log2 #(.DETECTOR(DET_ABS), .W(4)) dut4  (.clk, .rst_n, .en, .p(p15), .s(s4));
  drc_log2 #(.DETECTOR(DET_RMS), .W(8)) dut30 (.clk, .rst_n, .en, .p(p30), .s(s30));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dbv(logic [15:0] s);
    return real'(s) / 512.0;
  endfunction

  task automatic cmp(real got, real exp, real tol, inout real worst, input string nm, input longint p);
    real e;
    e = got - exp;
    if (e < 0) e = -e;
    if (e > worst) worst = e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL: %s p=%0d got %f exp %f", nm, p, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40000; n++) begin
      longint v15, v30;
      v15 = (n < 32768) ? n : longint'($urandom_range(256, 32767));
      v30 = longint'($urandom) >> (2 + $urandom_range(0, 21));
      if (v30 < 256) v30 = 256;
      p15 = 15'(v15);
      p30 = 30'(v30);
      @(negedge clk);
      if (v15 >= 256) cmp(dbv(s8), 20.0 * $log10(real'(v15)), 0.05, worst8, "W=8", v15);
      if (v15 >= 16)  cmp(dbv(s4), 20.0 * $log10(real'(v15)), 0.55, worst4, "W=4", v15);
      cmp(dbv(s30), 10.0 * $log10(real'(v30)), 0.05, worst30, "RMS", v30);
    end
    // Hold while en is low.
    p15 = 15'd1000;
    @(negedge clk);
    en = 1'b0; p15 = 15'd30000;
    @(negedge clk); @(negedge clk);
    cmp(dbv(s8), 20.0 * $log10(1000.0), 0.05, worst8, "hold", 1000);
    $display("worst error: W=8 %f dB, W=4 %f dB, RMS %f dB", worst8, worst4, worst30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
