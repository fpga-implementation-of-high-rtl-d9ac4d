// siso_sr: one serial-in serial-out shift register of LEN stages, the
// kind an FPGA builds from a LUT configured as a shift register (no reset,
// clock enable only). `dout` is the bit shifted in LEN enabled cycles
// earlier. Used LEN >= 1.
module siso_sr #(
  parameter int unsigned LEN = 15
) (
  input  logic clk,
  input  logic en,
  input  logic din,
  output logic dout
);

  logic [LEN-1:0] sr;

  if (LEN == 1) begin : g_one
    always_ff @(posedge clk) if (en) sr <= din;
  end else begin : g_many
    always_ff @(posedge clk) if (en) sr <= {sr[LEN-2:0], din};
  end

  assign dout = sr[LEN-1];

endmodule
