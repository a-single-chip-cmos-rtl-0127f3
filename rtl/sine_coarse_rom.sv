// sine_coarse_rom: coarse ROM of the modified Sunderland sine compression.
//
// The 12-bit quarter-wave phase x = {A,B,C} (4 bits each) is split so that the
// coarse ROM, addressed by {A,B}, holds the sine at the centre of each group of
// 16 phase steps, at the 511-LSB full scale of the output magnitude:
//   coarse[16A+B] = round(511 * sin((256A + 16B + 8) * pi / 8192))
// Phase step x stands
// for the angle (x + 0.5) * pi / 8192, which makes the quarter-wave folding exact.
// The table is read from rtl/sine_coarse_rom.hex; the split, scale and word
// width are this design's choices. Timing: registered read, one clock.
module sine_coarse_rom #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 9
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] rom [2**ADDR_W];

  initial $readmemh("rtl/sine_coarse_rom.hex", rom);

  always_ff @(posedge clk) data <= rom[addr];

endmodule
