// dac10: 10-bit 6/4 segmented current-steering DAC, behavioural at its analog
// end (the cells and the bias generator are models; not synthesizable).
//
// The digital front end latches the code, decodes the 6 MSBs to 63
// thermometer bits and latches the 67 switch controls; the current-steering
// array then sums 16-LSB unary and 1/2/4/8-LSB binary currents into ioutp and
// the complementary currents into ioutn. The bias generator sets the LSB
// current from vref and the external resistor rext and removes it in
// power-down. Structure and the 6/4 split are published.
// Timing: ioutp/ioutn follow din two clocks later plus the cell switching
// time (0.2 ns to the first change, settled after 0.35 ns).
// With the default vref = 1.2 V and rext = 1 kohm the LSB current is 33.84 uA,
// 0.846 mV per LSB into 25 ohm.
module dac10 #(
  parameter real MIRROR = 0.0282
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  input  logic       pd,
  input  real        vref,
  input  real        rext,
  output real        ioutp,
  output real        ioutn,
  output real        iref,
  output real        iref2
);

  logic [62:0] therm;
  logic [3:0]  bin;
  real         iunit;

  dac_digital #(.MSB_W(6), .LSB_W(4)) u_dig (
    .clk(clk), .rst_n(rst_n), .din(din), .therm(therm), .bin(bin));

  bias_generator #(.MIRROR(MIRROR)) u_bias (
    .pd(pd), .vref(vref), .rext(rext), .iref(iref), .iref1(iunit), .iref2(iref2));

  current_steering_array #(.N_UNARY(63), .LSB_W(4)) u_cells (
    .therm(therm), .bin(bin), .iunit(iunit), .ioutp(ioutp), .ioutn(ioutn));

endmodule
