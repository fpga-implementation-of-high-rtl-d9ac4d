// lutsr_pkg: constants and elaboration-time functions shared by the
// modified LUT-SR random number generator.
//
// The generator holds N state bits in R output flip-flops plus R shift
// registers of lengths k_i, N = sum(1 + k_i). Defaults are the 16-bit,
// 256-state-bit configuration the design is built around. The functions
// below compute, at elaboration time, the shift-register lengths, the XOR
// tap positions and the prime used by the quadratic-residue permutation,
// so no table has to be typed in by hand.
package lutsr_pkg;

  localparam int unsigned R_DEF    = 16;   // output bits per cycle (r)
  localparam int unsigned N_DEF    = 256;  // state bits (n)
  localparam int unsigned KMAX_DEF = 16;   // longest shift register (k <= r)
  localparam int unsigned T_DEF    = 3;    // inputs per XOR gate (own choice)

  // Length of shift register i. The mean length is (N-R)/R; the first
  // (N-R) mod R registers get one more. Inside each complete group of four
  // registers the pattern +0,+1,+0,-1 is added, so lengths differ and
  // k_i+1 values such as 15, 16, 17 are pairwise coprime, while the sum is
  // unchanged.
  function automatic int unsigned sr_len(int unsigned i, int unsigned r,
                                         int unsigned n);
    int unsigned base, rem;
    int          delta;
    base  = (n - r) / r;
    rem   = (n - r) % r;
    delta = 0;
    if (i < 4 * (r / 4)) begin
      case (i % 4)
        1:       delta = 1;
        3:       delta = -1;
        default: delta = 0;
      endcase
    end
    return int'(base) + ((i < rem) ? 1 : 0) + delta;
  endfunction

  // Input j of XOR gate i. j = 0 is the cycle input (the previous gate's
  // lane, so the lanes form one ring); j >= 1 are the extra rounds, each an
  // affine permutation (a*i + b) mod r with odd a.
  function automatic int unsigned xor_tap(int unsigned i, int unsigned j,
                                          int unsigned r);
    int unsigned a, b;
    if (j == 0) return (i + r - 1) % r;
    a = 2 * j + 1;          // 3, 5, 7, ...
    b = j - 1;              // 0, 1, 2, ...
    return (a * i + b) % r;
  endfunction

  function automatic bit is_prime(longint unsigned v);
    if (v < 2) return 1'b0;
    for (longint unsigned d = 2; d * d <= v; d++)
      if (v % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // Largest prime p < 2^w with p mod 4 = 3. For such p the map
  // x -> x^2 mod p (2x < p), x -> p - (x^2 mod p) (2x > p) permutes [0, p).
  function automatic longint unsigned qr_prime(int unsigned w);
    longint unsigned p;
    p = (longint'(1) << w) - 1;
    while (p > 2 && !(p % 4 == 3 && is_prime(p))) p--;
    return p;
  endfunction

endpackage
