// xor_net_tb: self-checking testbench for xor_net at R = 16, T = 3.
// Reference: y[i] = d[(i+15) mod 16] ^ d[3i mod 16] ^ d[(5i+1) mod 16].
// Checks all 16 unit vectors (each input must reach exactly three gates)
// and 5000 random words.
module xor_net_tb;
  logic [15:0] d, y;
  int checks = 0, failures = 0;

  xor_net #(.R(16), .T(3)) dut (.d, .y);

  function automatic logic [15:0] ref_y(logic [15:0] v);
    logic [15:0] r;
    for (int i = 0; i < 16; i++)
      r[i] = v[(i + 15) % 16] ^ v[(3 * i) % 16] ^ v[(5 * i + 1) % 16];
    return r;
  endfunction

  task automatic check(logic [15:0] v);
    d = v;
    #1;
    checks++;
    if (y !== ref_y(v)) begin
      failures++;
      if (failures < 10) $display("FAIL d=%h y=%h expected %h", v, y, ref_y(v));
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      check(16'(1) << i);
      checks++;
      if ($countones(y) != 3) begin
        failures++;
        $display("FAIL input %0d fans out to %0d gates", i, $countones(y));
      end
    end
    for (int n = 0; n < 5000; n++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
