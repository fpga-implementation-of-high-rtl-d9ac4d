// lcg_tb: self-checking testbench for lcg.
// Drives random load/step patterns and compares x against a reference
// computed with 32-bit integer arithmetic, (25173*x + 13849) mod 65536.
// Also steps from one seed through 65536 values and checks that the
// sequence first returns to its start after exactly 2^16 steps (full
// period). Ends with a TB_RESULT line; a watchdog stops a hung run.
module lcg_tb;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] x0 = '0, x;
  int checks = 0, failures = 0;
  int unsigned ref_x;

  lcg dut (.clk, .rst_n, .load, .x0, .step, .x);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (x !== 16'(ref_x)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: x=%h expected %h", what, x, 16'(ref_x));
    end
  endtask

  initial begin
    int unsigned start, period;
    ref_x = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load = ($urandom_range(0, 9) == 0);
      step = $urandom_range(0, 1);
      x0   = 16'($urandom);
      @(posedge clk); #1;
      if (load) ref_x = x0;
      else if (step) ref_x = (ref_x * 25173 + 13849) & 32'hFFFF;
      check("random");
    end
    // full period from a fixed seed
    @(negedge clk); load = 1; step = 0; x0 = 16'h1234;
    @(negedge clk); load = 0; step = 1;
    start = x; period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (x != 16'(start) && period < 70000);
    checks++;
    if (period != 65536) begin
      failures++;
      $display("FAIL period %0d, expected 65536", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
