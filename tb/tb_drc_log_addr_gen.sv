// tb_drc_log_addr_gen: checks the leading-one address generator exhaustively
// for 15 bit inputs with 8 and 4 bit indices, and on random 30 bit inputs. For
// every p at or above 2^W the result must satisfy
//   (2^W + idx) * 2^e <= p < (2^W + idx + 1) * 2^e
// which fixes both the exponent and the index; below 2^W the generator must flag
// the level as small with e = 0 and idx = p.
module tb_drc_log_addr_gen;

  logic [14:0] p15 = '0;
  logic [29:0] p30 = '0;
  logic [4:0]  e8, e4, e30;
  logic [7:0]  i8, i30;
  logic [3:0]  i4;
  logic        b8, b4, b30;
  int checks = 0, failures = 0;

  drc_log_addr_gen #(.PW(15), .W(8)) dut8  (.p(p15), .e(e8),  .idx(i8),  .below_w(b8));
  drc_log_addr_gen #(.PW(15), .W(4)) dut4  (.p(p15), .e(e4),  .idx(i4),  .below_w(b4));
  drc_log_addr_gen #(.PW(30), .W(8)) dut30 (.p(p30), .e(e30), .idx(i30), .below_w(b30));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(longint p, int w, longint e, longint idx, bit sm);
    longint lo, hi;
    if (p < (longint'(1) << w)) return sm && e == 0 && idx == p;
    lo = ((longint'(1) << w) + idx) << e;
    hi = ((longint'(1) << w) + idx + 1) << e;
    return !sm && lo <= p && p < hi;
  endfunction

  initial begin
    for (int v = 0; v < 32768; v++) begin
      p15 = 15'(v);
      #1;
      checks += 2;
      if (!ok(v, 8, e8, i8, b8)) begin
        failures++; if (failures < 10) $display("FAIL: W=8 p=%0d e=%0d idx=%0d", v, e8, i8);
      end
      if (!ok(v, 4, e4, i4, b4)) begin
        failures++; if (failures < 10) $display("FAIL: W=4 p=%0d e=%0d idx=%0d", v, e4, i4);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      p30 = 30'($urandom) >> $urandom_range(0, 29);
      #1;
      checks++;
      if (!ok(p30, 8, e30, i30, b30)) begin
        failures++; if (failures < 10) $display("FAIL: PW=30 p=%0d e=%0d idx=%0d", p30, e30, i30);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
