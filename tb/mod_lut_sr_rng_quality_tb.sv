// mod_lut_sr_rng_quality_tb: statistical smoke test of the generator's
// output at its default size (16-bit words, 256 state bits).
//
// After seeding, 100000 consecutive words are collected and checked:
//   - each bit is a one 49..51 % of the time;
//   - chi-square of the 256 values of the low byte and of the high byte
//     stays below 341 (255 degrees of freedom, about the 0.1 % tail);
//   - each bit agrees with the same bit of the previous word, and with
//     its neighbouring bit in the same word, 49..51 % of the time (no
//     lag-1 or adjacent-bit dependence).
// These are simple checks, far weaker than a full test battery; they
// catch a broken loop, a stuck bit or a strongly correlated output.
module mod_lut_sr_rng_quality_tb;
  localparam int WORDS = 100000;

  logic        clk = 0, rst_n = 0, seed_load = 0, en = 0;
  logic [15:0] seed = 16'h2F1B, rnd, prev;
  logic        valid, busy;
  int checks = 0, failures = 0;

  mod_lut_sr_rng dut (.clk, .rst_n, .seed_load, .seed, .en, .rnd, .valid, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WORDS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ones [16], same_lag [16], same_adj [16];
  int hist_lo [256], hist_hi [256];

  task automatic in_range(string what, int k, int n);
    checks++;
    if (k * 100 < n * 49 || k * 100 > n * 51) begin
      failures++;
      $display("FAIL %s: %0d of %0d", what, k, n);
    end
  endtask

  function automatic real chi2(int h [256], int n);
    real e, s;
    e = real'(n) / 256.0;
    s = 0.0;
    for (int v = 0; v < 256; v++) s += (real'(h[v]) - e) ** 2 / e;
    return s;
  endfunction

  initial begin
    real c_lo, c_hi;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    seed_load = 1;
    @(negedge clk) seed_load = 0;
    while (!valid) @(negedge clk);
    en = 1;
    @(negedge clk);
    prev = rnd;
    for (int n = 0; n < WORDS; n++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        ones[i]     += int'(rnd[i]);
        same_lag[i] += int'(rnd[i] == prev[i]);
        same_adj[i] += int'(rnd[i] == rnd[(i + 1) % 16]);
      end
      hist_lo[rnd[7:0]]++;
      hist_hi[rnd[15:8]]++;
      prev = rnd;
    end
    for (int i = 0; i < 16; i++) begin
      in_range($sformatf("bit %0d ones", i), ones[i], WORDS);
      in_range($sformatf("bit %0d lag-1 agreement", i), same_lag[i], WORDS);
      in_range($sformatf("bits %0d/%0d agreement", i, (i + 1) % 16), same_adj[i], WORDS);
    end
    c_lo = chi2(hist_lo, WORDS);
    c_hi = chi2(hist_hi, WORDS);
    $display("chi-square low byte %0.1f, high byte %0.1f (255 dof)", c_lo, c_hi);
    checks += 2;
    if (c_lo > 341.0) begin failures++; $display("FAIL low byte chi-square"); end
    if (c_hi > 341.0) begin failures++; $display("FAIL high byte chi-square"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
