// mod_lut_sr_rng: modified LUT-SR uniform random number generator.
//
// The generator keeps N = 256 state bits in R = 16 output flip-flops (the
// PIPO register) and 16 LUT-style shift registers of lengths 14..16. Each
// clock the PIPO word shifts into the shift registers, the word of their
// oldest bits goes through the quadratic-residue permutation, and 16
// three-input XOR gates produce the next PIPO word, which is the random
// output. The loop PIPO -> shift registers -> quadratic residue -> XOR
// gates -> PIPO, the sizes (r = 16, n = 256, k <= r) and the use of an LCG
// follow the design; the XOR taps, the prime, the LCG constants and the
// seeding sequence below are this design's choices.
//
// Seeding: a pulse on seed_load loads `seed` into the LCG. For the next
// KMAX + 1 = 17 cycles (busy = 1) the PIPO register takes successive LCG
// words and the shift registers shift, so every one of the 256 state bits
// is written from the LCG stream. Then valid = 1 and each cycle with
// en = 1 produces a new word on rnd (registered; a new word is visible
// after each enabled edge). With en = 0 the state and rnd hold.
// seed_load may be given at any time and restarts seeding.
//
// Both the LCG and the state update are bijections and the LCG stream is
// never all zero across 17 words, so the all-zero state, from which the
// generator would never leave, is not entered.
module mod_lut_sr_rng
  import lutsr_pkg::*;
#(
  parameter int unsigned R    = R_DEF,
  parameter int unsigned N    = N_DEF,
  parameter int unsigned KMAX = KMAX_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [R-1:0] seed,
  input  logic         en,
  output logic [R-1:0] rnd,
  output logic         valid,
  output logic         busy
);

  localparam int unsigned LOAD_CYC = KMAX + 1;
  localparam int unsigned CW       = $clog2(LOAD_CYC + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;

  state_t        state;
  logic [CW-1:0] cnt;

  logic [R-1:0] lcg_x, pipo_q, sr_out, qr_out, xor_out;
  logic         shift_en;

  // Control: idle after reset, load for LOAD_CYC cycles, then run.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else if (seed_load) begin
      state <= S_LOAD;
      cnt   <= '0;
    end else if (state == S_LOAD) begin
      if (cnt == CW'(LOAD_CYC - 1)) state <= S_RUN;
      cnt <= cnt + 1'b1;
    end
  end

  assign busy     = (state == S_LOAD);
  assign valid    = (state == S_RUN);
  assign shift_en = busy || (valid && en);

  lcg #(.W(R)) u_lcg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (seed_load),
    .x0   (seed),
    .step (busy),
    .x    (lcg_x)
  );

  pipo_sr #(.R(R)) u_pipo (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (shift_en),
    .sel_seed(busy),
    .seed    (lcg_x),
    .xor_in  (xor_out),
    .q       (pipo_q)
  );

  fifo_sr_bank #(.R(R), .N(N), .KMAX(KMAX)) u_bank (
    .clk (clk),
    .en  (shift_en),
    .din (pipo_q),
    .dout(sr_out)
  );

  qr_permute #(.W(R)) u_qr (
    .x(sr_out),
    .y(qr_out)
  );

  xor_net #(.R(R)) u_xor (
    .d(qr_out),
    .y(xor_out)
  );

  assign rnd = pipo_q;

  a_modes_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && valid));

endmodule
