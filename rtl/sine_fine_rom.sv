// sine_fine_rom: fine (correction) ROM of the modified Sunderland sine
// compression.
//
// Addressed by {A[3:2],C} of the quarter-wave phase {A,B,C}, it holds the
// signed correction from the centre of a 16-step group to step C within it, in
// quarter LSBs:
//   fine[16H+C] = round(2044 * cos((1024H + 512) * pi / 8192)
//                             * sin((C - 7.5) * pi / 8192)),  H = A[3:2]
// in two's complement, range -6..+6 (sin(a+b) ~ sin a + cos a * sin b, with the
// cosine taken at the centre of the quarter of the quadrant). The table is read from
// rtl/sine_fine_rom.hex; the split and widths are this design's choices.
// Timing: registered read, one clock.
module sine_fine_rom #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 4
) (
  input  logic                     clk,
  input  logic        [ADDR_W-1:0] addr,
  output logic signed [DATA_W-1:0] data
);

  logic [DATA_W-1:0] rom [2**ADDR_W];

  initial $readmemh("rtl/sine_fine_rom.hex", rom);

  always_ff @(posedge clk) data <= rom[addr];

endmodule
