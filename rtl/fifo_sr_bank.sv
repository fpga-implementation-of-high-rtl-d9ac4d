// fifo_sr_bank: the R first-in first-out shift registers of the generator.
//
// Lane i shifts in bit i of the PIPO register and presents, on dout[i],
// the bit it received k_i enabled cycles earlier. Together with the R
// PIPO flip-flops the lanes hold N = sum(1 + k_i) state bits. The lane
// lengths come from lutsr_pkg::sr_len: for the default R = 16, N = 256
// they are 15,16,15,14 repeated (sum 240), none above KMAX = r = 16 and
// with coprime k_i + 1 pairs, as the design asks; the exact list is this
// design's choice. Lanes have no reset, like LUT shift registers; the
// generator fills them during seeding.
module fifo_sr_bank
  import lutsr_pkg::*;
#(
  parameter int unsigned R    = R_DEF,
  parameter int unsigned N    = N_DEF,
  parameter int unsigned KMAX = KMAX_DEF
) (
  input  logic         clk,
  input  logic         en,
  input  logic [R-1:0] din,
  output logic [R-1:0] dout
);

  for (genvar i = 0; i < R; i++) begin : g_lane
    localparam int unsigned LEN = sr_len(i, R, N);
    if (LEN < 1 || LEN > KMAX) begin : g_bad_len
      $error("fifo_sr_bank: lane length out of range 1..KMAX");
    end
    siso_sr #(.LEN(LEN)) u_sr (
      .clk (clk),
      .en  (en),
      .din (din[i]),
      .dout(dout[i])
    );
  end

endmodule
