// gauss_rng: pseudo-random, approximately Gaussian numbers for the
// reproduction fluctuations r*n and s*n.
//
// The design calls for n to be Gaussian with zero mean and unit variance but
// does not say how it is generated; this generator is this design's own
// choice. A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5)
// advances once per cycle in which `step` is high. Its four bytes are summed
// (central-limit approximation); the sum minus 510 has zero mean and a
// standard deviation of about 147.8, and is scaled by 887/64 so that the
// output `n` has unit variance in Q11 (2048 = 1.0, range about +-7.0).
//
// Interface: `n` is valid in every cycle and depends only on the current
// state; a high `step` moves to the next value at the following clock edge.
// Reset loads SEED (which must not be zero).
module gauss_rng #(
  parameter logic [31:0] SEED = 32'h2545_f491
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  output logic signed [15:0] n
);

  logic [31:0] state, nxt;
  logic signed [11:0] centered;
  logic signed [23:0] scaled;

  always_comb begin
    nxt = state ^ (state << 13);
    nxt = nxt ^ (nxt >> 17);
    nxt = nxt ^ (nxt << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= nxt;
  end

  always_comb begin
    centered = 12'($signed({4'd0, state[7:0]}) + $signed({4'd0, state[15:8]})
             + $signed({4'd0, state[23:16]}) + $signed({4'd0, state[31:24]}) - 12'sd510);
    scaled   = 24'(centered * 24'sd887);
    n        = 16'(scaled >>> 6);
  end

endmodule
