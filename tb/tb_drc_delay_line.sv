// tb_drc_delay_line: random data with random enable gaps; q must equal the d
// taken DEPTH enabled clocks earlier (0 before that), for depths 4 and 5.
module tb_drc_delay_line;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] d = '0, q4, q5;
  logic [15:0] hist [$];
  int checks = 0, failures = 0;

  drc_delay_line #(.W(16), .DEPTH(4)) dut4 (.clk, .rst_n, .en, .d, .q(q4));
  drc_delay_line #(.W(16), .DEPTH(5)) dut5 (.clk, .rst_n, .en, .d, .q(q5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) hist.push_front(16'd0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      d  = 16'($urandom);
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        hist.push_front(d);
        void'(hist.pop_back());
      end
      checks++;
      if (q4 != hist[3] || q5 != hist[4]) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d q4=%h exp %h q5=%h exp %h", n, q4, hist[3], q5, hist[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
