// pipo_sr: the R-bit parallel-in parallel-out register of the generator.
//
// These R flip-flops are the "1" of each 1 + k_i lane: they hold the
// current random word, which is also what each lane's shift register
// shifts in next. While seeding (sel_seed = 1) the register takes the seed
// word; while running it takes the XOR gate outputs. That the seed enters
// here follows the design; the reset to zero is this design's choice.
//
// Interface: one word is captured per clock with `en` high; `q` is the
// registered word (one cycle after capture).
module pipo_sr #(
  parameter int unsigned R = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sel_seed,
  input  logic [R-1:0] seed,
  input  logic [R-1:0] xor_in,
  output logic [R-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= sel_seed ? seed : xor_in;
  end

endmodule
