// drc_log_addr_gen: priority-encoder address generator of the logarithm table.
//
// Finds the leading one of the envelope p among bit positions PW-1 down to W and
// returns the exponent e = position - W and the W-bit table index made of the bits
// right below the leading one, so that p ~ (2^W + idx) * 2^e. This is the chain of
// 2:1 multiplexers of the published design's address generator, one stage per position:
// PW - W stages (7 for a 15 bit envelope and an 8 bit index, 4 more for a 4 bit
// index). When no leading one is found at or above bit W (below_w = 1) the chain
// ends with e = 0 and idx = p[W-1:0], which treats the level as if its leading
// one were at bit W; that end value is this design's choice and only matters far
// below any compression threshold. Purely combinational.
module drc_log_addr_gen #(
  parameter int PW = 15,
  parameter int W  = 8
) (
  input  logic [PW-1:0] p,
  output logic [4:0]    e,
  output logic [W-1:0]  idx,
  output logic          below_w
);

  always_comb begin
    e     = '0;
    idx   = p[W-1:0];
    below_w = 1'b1;
    // Lowest stage first, so the highest set bit decides (priority to the MSB).
    for (int k = W; k < PW; k++) begin
      if (p[k]) begin
        e     = 5'(k - W);
        idx   = W'(p >> (k - W));
        below_w = 1'b0;
      end
    end
  end

endmodule
