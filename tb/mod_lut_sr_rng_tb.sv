// mod_lut_sr_rng_tb: end-to-end self-checking testbench for the modified
// LUT-SR generator at its default size (r = 16, n = 256, k <= 16).
//
// A cycle-accurate reference model, written here from the generator's
// definition (LCG seeding for 17 cycles, lanes of lengths 15,16,15,14
// repeated, quadratic residue mod 65519, gates d[i-1]^d[3i]^d[5i+1]),
// runs beside the design and every output word is compared while valid.
// The test also checks the seeding latency (busy for exactly 17 cycles,
// valid on the next), that rnd holds while en = 0, the per-bit balance of
// the output (each bit a one 45..55 % of the time over 20000 words), that
// no all-zero word run appears, and that different seeds give different
// streams. Mechanisms exercised and counted: seeding from idle, reseeding
// while running, restarting while loading, stalls, a zero seed.
module mod_lut_sr_rng_tb;
  localparam int R = 16;
  localparam longint P = 65519;
  localparam int LEN [4] = '{15, 16, 15, 14};

  logic         clk = 0, rst_n = 0, seed_load = 0, en = 0;
  logic [R-1:0] seed = '0, rnd;
  logic         valid, busy;

  int checks = 0, failures = 0;
  int n_seed_idle = 0, n_reseed_run = 0, n_restart_load = 0, n_stall = 0,
      n_zero_seed = 0, n_words = 0;

  mod_lut_sr_rng dut (.clk, .rst_n, .seed_load, .seed, .en, .rnd, .valid, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef enum {M_IDLE, M_LOAD, M_RUN} mstate_t;
  mstate_t      m_st;
  int           m_cnt;
  logic [15:0]  m_lcg, m_pipo;
  logic         m_lane [R][$];

  function automatic logic [15:0] f_qr(logic [15:0] x);
    longint xv, s;
    xv = x;
    s = (xv * xv) % P;
    if (xv >= P) return x;
    if (2 * xv < P) return 16'(s);
    return 16'(P - s);
  endfunction

  function automatic logic [15:0] f_xor(logic [15:0] v);
    logic [15:0] r;
    for (int i = 0; i < 16; i++)
      r[i] = v[(i + 15) % 16] ^ v[(3 * i) % 16] ^ v[(5 * i + 1) % 16];
    return r;
  endfunction

  task automatic m_reset();
    m_st = M_IDLE; m_cnt = 0; m_lcg = '0; m_pipo = '0;
    for (int i = 0; i < R; i++) begin
      m_lane[i].delete();
      for (int k = 0; k < LEN[i % 4]; k++) m_lane[i].push_back(1'b0);
    end
  endtask

  // one clock edge of the model, with the inputs sampled at that edge
  task automatic m_step(logic sl, logic [15:0] sd, logic e);
    logic        m_busy, m_valid, sh;
    logic [15:0] tails, nxt;
    m_busy  = (m_st == M_LOAD);
    m_valid = (m_st == M_RUN);
    sh = m_busy || (m_valid && e);
    if (sh) begin
      for (int i = 0; i < R; i++) tails[i] = m_lane[i][0];
      nxt = m_busy ? m_lcg : f_xor(f_qr(tails));
      for (int i = 0; i < R; i++) begin
        void'(m_lane[i].pop_front());
        m_lane[i].push_back(m_pipo[i]);
      end
      m_pipo = nxt;
    end
    if (sl) m_lcg = sd;
    else if (m_busy) m_lcg = 16'(32'(m_lcg) * 25173 + 13849);
    if (sl) begin m_st = M_LOAD; m_cnt = 0; end
    else if (m_st == M_LOAD) begin
      if (m_cnt == 16) m_st = M_RUN;
      m_cnt++;
    end
  endtask

  // ---------------- stimulus helpers ----------------
  int ones [R];
  int zero_run, max_zero_run;

  task automatic tick(logic sl, logic [15:0] sd, logic e);
    logic [15:0] prev_rnd;
    logic        was_valid;
    @(negedge clk);
    was_valid = valid;
    seed_load = sl; seed = sd; en = e;
    prev_rnd = rnd;
    @(posedge clk);
    m_step(sl, sd, e);
    #1;
    checks++;
    if (valid !== (m_st == M_RUN) || busy !== (m_st == M_LOAD)) begin
      failures++;
      if (failures < 10) $display("FAIL flags valid=%b busy=%b model state %s", valid, busy, m_st.name());
    end
    if (m_st == M_RUN) begin
      checks++;
      if (rnd !== m_pipo) begin
        failures++;
        if (failures < 10) $display("FAIL rnd=%h expected %h", rnd, m_pipo);
      end
    end
    if (was_valid && !sl && !e) begin
      n_stall++;
      checks++;
      if (rnd !== prev_rnd) begin failures++; $display("FAIL rnd changed during stall"); end
    end
  endtask

  // seed and return the number of cycles busy was high
  task automatic seed_and_wait(logic [15:0] sd, output int busy_cycles);
    tick(1'b1, sd, 1'b0);
    busy_cycles = 0;
    while (busy && busy_cycles < 100) begin
      tick(1'b0, sd, 1'b0);
      busy_cycles++;
    end
  endtask

  logic [15:0] first_words [2][8];

  initial begin
    int bc;
    m_reset();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // seeding latency from idle
    checks++;
    if (valid || busy) begin failures++; $display("FAIL not idle after reset"); end
    seed_and_wait(16'hACE1, bc);
    n_seed_idle++;
    checks++;
    if (bc != 17 || !valid) begin
      failures++; $display("FAIL seeding took %0d cycles, expected 17", bc);
    end
    for (int i = 0; i < 8; i++) begin tick(1'b0, '0, 1'b1); first_words[0][i] = rnd; end

    // long run with random stalls, bit statistics
    zero_run = 0; max_zero_run = 0;
    for (int n = 0; n < 20000; n++) begin
      logic e;
      e = $urandom_range(0, 7) != 0;
      tick(1'b0, '0, e);
      if (e) begin
        n_words++;
        for (int i = 0; i < R; i++) ones[i] += int'(rnd[i]);
        if (rnd == '0) zero_run++; else zero_run = 0;
        if (zero_run > max_zero_run) max_zero_run = zero_run;
      end
    end
    for (int i = 0; i < R; i++) begin
      checks++;
      if (ones[i] * 100 < n_words * 45 || ones[i] * 100 > n_words * 55) begin
        failures++;
        $display("FAIL bit %0d is one %0d of %0d times", i, ones[i], n_words);
      end
    end
    checks++;
    if (max_zero_run > 2) begin failures++; $display("FAIL %0d zero words in a row", max_zero_run); end

    // reseed while running, with another seed: stream must differ
    tick(1'b1, 16'h0001, 1'b1);
    n_reseed_run++;
    while (busy) tick(1'b0, '0, 1'b0);
    for (int i = 0; i < 8; i++) begin tick(1'b0, '0, 1'b1); first_words[1][i] = rnd; end
    checks++;
    if (first_words[0] == first_words[1]) begin failures++; $display("FAIL seeds give equal streams"); end

    // restart while loading
    tick(1'b1, 16'h5555, 1'b0);
    repeat (5) tick(1'b0, '0, 1'b1);
    seed_and_wait(16'h5555, bc);
    n_restart_load++;
    checks++;
    if (bc != 17) begin failures++; $display("FAIL restart seeding took %0d cycles", bc); end
    repeat (500) tick(1'b0, '0, $urandom_range(0, 1));

    // zero seed still yields a working generator
    seed_and_wait(16'h0000, bc);
    n_zero_seed++;
    zero_run = 0; max_zero_run = 0;
    for (int n = 0; n < 1000; n++) begin
      tick(1'b0, '0, 1'b1);
      if (rnd == '0) zero_run++; else zero_run = 0;
      if (zero_run > max_zero_run) max_zero_run = zero_run;
    end
    checks++;
    if (max_zero_run > 2) begin failures++; $display("FAIL zero seed locks up"); end

    $display("mechanisms: seed_from_idle=%0d reseed_while_running=%0d restart_while_loading=%0d stall=%0d zero_seed=%0d words=%0d",
             n_seed_idle, n_reseed_run, n_restart_load, n_stall, n_zero_seed, n_words);
    checks++;
    if (n_seed_idle == 0 || n_reseed_run == 0 || n_restart_load == 0 || n_stall == 0 || n_zero_seed == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
