// fifo_sr_bank_tb: self-checking testbench for fifo_sr_bank at R = 16,
// N = 256. Part 1 measures each lane's delay by sending a single one
// through it and counting enabled cycles until it appears, and compares
// with the expected lengths 15,16,15,14 (repeated), whose sum must be
// N - R = 240. Part 2 streams random words with a random enable and checks
// every output bit against a per-lane history of shifted-in bits.
module fifo_sr_bank_tb;
  localparam int R = 16;
  localparam int N = 256;
  localparam int EXP_LEN [4] = '{15, 16, 15, 14};

  logic         clk = 0, en = 0;
  logic [R-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  fifo_sr_bank #(.R(R), .N(N), .KMAX(16)) dut (.clk, .en, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len_sum;
    logic hist [R][$];
    len_sum = 0;
    // flush with zeros
    @(negedge clk); en = 1; din = '0;
    repeat (20) @(negedge clk);
    // impulse response per lane
    for (int i = 0; i < R; i++) begin
      int d;
      din = '0; din[i] = 1'b1;
      @(negedge clk); din = '0;
      d = 1;
      while (!dout[i] && d < 40) begin
        // stall sometimes: delay counts enabled cycles only
        en = $urandom_range(0, 3) != 0;
        @(negedge clk);
        if (en) d++;
        en = 1;
      end
      checks++;
      if (d != EXP_LEN[i % 4]) begin
        failures++;
        $display("FAIL lane %0d length %0d expected %0d", i, d, EXP_LEN[i % 4]);
      end
      len_sum += d;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (len_sum + R != N) begin
      failures++;
      $display("FAIL state bits %0d expected %0d", len_sum + R, N);
    end
    // random stream
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = $urandom_range(0, 4) != 0;
      din = R'($urandom);
      @(posedge clk); #1;
      if (en) begin
        for (int i = 0; i < R; i++) begin
          hist[i].push_back(din[i]);
          if (hist[i].size() > EXP_LEN[i % 4]) void'(hist[i].pop_front());
          if (hist[i].size() == EXP_LEN[i % 4]) begin
            checks++;
            if (dout[i] !== hist[i][0]) begin
              failures++;
              if (failures < 10) $display("FAIL stream lane %0d", i);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
