// lcg: linear congruential generator X(i+1) = (A*X(i) + C) mod 2^W.
//
// In the generator it is the seed source: one W-bit start value X0 is
// expanded into the stream of words that fills the whole state during the
// load phase. The recurrence is the one the design is built on; the
// modulus 2^W and the constants A = 25173, C = 13849 are this design's
// choice (C odd and A = 1 mod 4 give the full period 2^W).
//
// Interface: `load` writes x0 into the state, otherwise `step` advances it
// by one. `x` is the registered current value, so a value loaded or
// stepped at edge t is visible after that edge. Reset clears the state.
module lcg #(
  parameter int unsigned W = 16,
  parameter logic [W-1:0] A = W'(25173),
  parameter logic [W-1:0] C = W'(13849)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] x0,
  input  logic         step,
  output logic [W-1:0] x
);

  logic [W-1:0] x_q;
  logic [W-1:0] nxt;

  // W-bit arithmetic wraps, which is the reduction mod 2^W.
  assign nxt = x_q * A + C;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x_q <= '0;
    else if (load) x_q <= x0;
    else if (step) x_q <= nxt;
  end

  assign x = x_q;

endmodule
