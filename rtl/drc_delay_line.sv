// drc_delay_line: the input buffer that aligns x(n) with its gain.
//
// A shift register of DEPTH stages; q is d delayed by DEPTH enabled clocks. In the
// compressor DEPTH equals the number of registers between the Input Reg and the
// output multiplier on the gain path (p, s, Gain_dB, Gain_lin: 4; one more with
// the smoothing stage), so the total latency D of the published design is matched. That a
// buffer carries the input past the processing latency follows the published design; a
// plain shift register reset to 0 is this design's choice.
module drc_delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule
