// xor_net: the R t-input XOR gates of the generator.
//
// Gate i XORs its cycle input d[(i-1) mod R] with T-1 further inputs, one
// per round, where round j takes d[((2j+1)*i + j-1) mod R]. Each round is
// a permutation, so every input bit drives exactly T gates. The structure
// (one cycle input plus t-1 rounds of extra inputs) follows the LUT-SR
// construction; T = 3 and the round permutations are this design's choice.
// For R = 16 they give gates with three distinct inputs and an invertible
// 16x16 matrix over GF(2), so no information is lost per step.
//
// Purely combinational.
module xor_net
  import lutsr_pkg::*;
#(
  parameter int unsigned R = R_DEF,
  parameter int unsigned T = T_DEF
) (
  input  logic [R-1:0] d,
  output logic [R-1:0] y
);

  for (genvar i = 0; i < R; i++) begin : g_gate
    logic [T-1:0] in;
    for (genvar j = 0; j < T; j++) begin : g_in
      assign in[j] = d[xor_tap(i, j, R)];
    end
    assign y[i] = ^in;
  end

endmodule
