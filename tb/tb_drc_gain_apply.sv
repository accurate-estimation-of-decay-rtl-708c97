// tb_drc_gain_apply: random signed samples and Q1.15 gains up to 1.0; the
// Output Reg must hold x * g / 32768 rounded to nearest, one clock later, and
// hold its value while en is low.
module tb_drc_gain_apply;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic signed [15:0] x_del = '0;
  logic [15:0] g = '0;
  logic signed [15:0] y;
  int checks = 0, failures = 0;

  drc_gain_apply dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp, prev;
    prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      real r;
      x_del = 16'($urandom);
      g     = 16'($urandom_range(0, 32768));
      if (n % 100 == 0) begin x_del = 16'sh8000; g = 16'd32768; end
      en    = (n % 17 != 3);
      r     = real'(x_del) * real'(g) / 32768.0;
      exp   = longint'($floor(r + 0.5));
      if (exp > 32767) exp = 32767;
      if (exp < -32768) exp = -32768;
      if (!en) exp = prev;
      @(negedge clk);
      checks++;
      if (longint'(y) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d g=%0d y=%0d exp %0d", x_del, g, y, exp);
      end
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
