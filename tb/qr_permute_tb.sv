// qr_permute_tb: exhaustive self-checking testbench for qr_permute at
// W = 16. For every 16-bit x it computes the expected output with 64-bit
// integer arithmetic and p = 65519 (x >= p: x; 2x < p: x*x mod p;
// otherwise p - x*x mod p), compares, and records each output value to
// check that the map is a bijection on all 65536 words.
module qr_permute_tb;
  localparam longint P = 65519;
  logic [15:0] x, y;
  int checks = 0, failures = 0;
  bit seen [65536];

  qr_permute #(.W(16)) dut (.x, .y);

  initial begin
    longint xv, e;
    int n_low = 0, n_high = 0, n_pass = 0, dup = 0;
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      #1;
      xv = v;
      if (xv >= P) begin e = xv; n_pass++; end
      else if (2 * xv < P) begin e = (xv * xv) % P; n_low++; end
      else begin e = P - (xv * xv) % P; n_high++; end
      checks++;
      if (y !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", v, y, e);
      end
      if (seen[y]) dup++;
      seen[y] = 1'b1;
    end
    checks++;
    if (dup != 0) begin failures++; $display("FAIL %0d repeated outputs", dup); end
    checks++;
    if (n_low == 0 || n_high == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
