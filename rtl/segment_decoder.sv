// segment_decoder: binary to thermometer decoder of the 6/4 segmented DAC.
//
// The six most significant bits of the 10-bit code become a 63-bit
// thermometer code (therm[i] = 1 when msb > i), one bit per 16-LSB unary
// current source; the four least significant bits pass on to the
// binary-weighted sources. The 6/4 split and the 63 sources are published; the
// decoder is plain combinational logic.
module segment_decoder #(
  parameter int unsigned MSB_W = 6,
  parameter int unsigned LSB_W = 4
) (
  input  logic [MSB_W+LSB_W-1:0] code,
  output logic [2**MSB_W-2:0]    therm,
  output logic [LSB_W-1:0]       bin
);

  always_comb begin
    for (int i = 0; i < 2**MSB_W - 1; i++)
      therm[i] = (code[MSB_W+LSB_W-1:LSB_W] > MSB_W'(i));
  end

  assign bin = code[LSB_W-1:0];

endmodule
