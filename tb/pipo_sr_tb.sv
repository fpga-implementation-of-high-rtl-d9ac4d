// pipo_sr_tb: self-checking testbench for pipo_sr.
// Random enable, select, seed and XOR words; a reference register updated
// by the same rule (hold, take seed, take XOR word) is compared with q
// after every edge. Ends with a TB_RESULT line; watchdog included.
module pipo_sr_tb;
  logic        clk = 0, rst_n = 0, en = 0, sel_seed = 0;
  logic [15:0] seed = '0, xor_in = '0, q, ref_q;
  int checks = 0, failures = 0;
  int n_hold = 0, n_seed = 0, n_xor = 0;

  pipo_sr #(.R(16)) dut (.clk, .rst_n, .en, .sel_seed, .seed, .xor_in, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q !== 16'h0) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      sel_seed = $urandom_range(0, 1);
      seed = 16'($urandom);
      xor_in = 16'($urandom);
      @(posedge clk); #1;
      if (!en) n_hold++;
      else if (sel_seed) begin ref_q = seed; n_seed++; end
      else begin ref_q = xor_in; n_xor++; end
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h expected %h", q, ref_q);
      end
    end
    checks++;
    if (n_hold == 0 || n_seed == 0 || n_xor == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
