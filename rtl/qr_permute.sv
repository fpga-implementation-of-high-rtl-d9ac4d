// qr_permute: quadratic-residue permutation of a W-bit word.
//
// For a prime p with p mod 4 = 3, x^2 mod p is distinct for all x with
// 2x < p, and the values p - (x^2 mod p) cover exactly the remaining
// residues; so y = x^2 mod p (2x < p), y = p - (x^2 mod p) (2x > p) is a
// bijection on [0, p). Words x >= p are passed through unchanged, keeping
// the whole W-bit map a bijection (0 maps to 0). The design places this
// block where the original LUT-SR had a fixed bit permutation, between the
// shift-register outputs and the XOR gates. Using the largest such prime
// below 2^W (65519 for W = 16) and the pass-through of the top words are
// this design's choices.
//
// Purely combinational: one W x W multiplier and a reduction by a
// constant.
module qr_permute
  import lutsr_pkg::*;
#(
  parameter int unsigned W = R_DEF,
  parameter longint unsigned P = qr_prime(W)
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam logic [W-1:0] PW = W'(P);

  logic [2*W-1:0] sq;
  logic [W-1:0]   res;

  assign sq  = {{W{1'b0}}, x} * {{W{1'b0}}, x};
  assign res = W'(sq % (2*W)'(P));

  always_comb begin
    if (x >= PW)                              y = x;
    else if ({1'b0, x, 1'b0} < {2'b00, PW})   y = res;   // 2x < p
    else                                      y = PW - res;
  end

endmodule
