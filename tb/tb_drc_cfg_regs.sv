// tb_drc_cfg_regs: checks the programmable register file. Each register is
// written with a distinct value and read back through the cfg struct; run must
// stay low until the last needed register is written and rise one clock later,
// for the basic set (6 registers) and for the set with smoothing (11). Writes to
// unused addresses must change nothing, and later writes must update live.
module tb_drc_cfg_regs;
  import drc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0;
  drc_cfg_t cfg0, cfg1;
  logic run0, run1;
  int checks = 0, failures = 0;

  drc_cfg_regs #(.SMOOTH(1'b0)) dut0 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg(cfg0), .run(run0));
  drc_cfg_regs #(.SMOOTH(1'b1)) dut1 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg(cfg1), .run(run1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int a, int v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 4'(a); cfg_wdata = 16'(v);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int field(drc_cfg_t c, int a);
    case (a)
      0: return int'(c.beta1);        1: return int'(c.one_m_beta1);
      2: return int'(c.beta2);        3: return int'(c.one_m_beta2);
      4: return int'(c.ct);           5: return int'(c.one_m_cf);
      6: return int'(c.beta1sm);      7: return int'(c.one_m_beta1sm);
      8: return int'(c.beta2sm);      9: return int'(c.one_m_beta2sm);
      default: return int'(c.gth);
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!run0 && !run1 && cfg0 == '0, "reset state");
    // Unused addresses do nothing.
    wr(11, 16'h1234); wr(15, 16'hBEEF);
    check(cfg0 == '0 && cfg1 == '0 && !run0, "unused addresses ignored");
    // Write the basic set in reverse order, the threshold last, checking run
    // before each write and for a while with only the threshold missing.
    for (int a = 5; a >= 0; a--) begin
      if (a == REG_CT) continue;
      check(!run0, $sformatf("run low before register %0d", a));
      wr(a, 1000 + 17 * a);
    end
    repeat (5) @(negedge clk);
    check(!run0, "run low while the threshold register is unwritten");
    wr(REG_CT, 1000 + 17 * REG_CT);
    // wr returns one negedge after the write edge: the written mask is set, run
    // follows on the next edge.
    check(!run0, "run rises one clock after the last write, not earlier");
    @(negedge clk);
    check(run0, "basic set complete: run high");
    check(!run1, "smoothing set still incomplete");
    for (int a = 6; a < NUM_REGS; a++) wr(a, 1000 + 17 * a);
    @(negedge clk);
    check(run1, "smoothing set complete: run high");
    for (int a = 0; a < NUM_REGS; a++) begin
      check(field(cfg0, a) == 1000 + 17 * a, $sformatf("register %0d value", a));
      check(field(cfg1, a) == 1000 + 17 * a, $sformatf("register %0d value (smoothing)", a));
    end
    // Live update keeps run high.
    wr(REG_CT, 35840);
    check(cfg0.ct == 16'd35840 && run0, "live update after run");
    rst_n = 1'b0;
    #1;
    check(!run0 && !run1 && cfg1 == '0, "asynchronous reset clears everything");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
