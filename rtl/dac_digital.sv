// dac_digital: digital front end of the 10-bit DAC.
//
// A code latch samples the 10-bit input, the segment decoder turns its six
// MSBs into 63 thermometer bits, and a second latch holds the 63 + 4 switch
// controls so that all current switches change on the same clock edge, free of
// the decoder's unequal path delays. The latch-decoder-latch arrangement is
// published; the latches are edge-triggered registers here, which is this
// design's choice. Timing: two clocks from din to the switch controls; reset
// clears both latches (zero-scale output). An assertion checks that the latched
// unary controls always form a thermometer code.
module dac_digital #(
  parameter int unsigned MSB_W = 6,
  parameter int unsigned LSB_W = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [MSB_W+LSB_W-1:0] din,
  output logic [2**MSB_W-2:0]    therm,
  output logic [LSB_W-1:0]       bin
);

  logic [MSB_W+LSB_W-1:0] code_q;
  logic [2**MSB_W-2:0]    therm_d;
  logic [LSB_W-1:0]       bin_d;

  segment_decoder #(.MSB_W(MSB_W), .LSB_W(LSB_W)) u_dec (
    .code(code_q), .therm(therm_d), .bin(bin_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q <= '0;
      therm  <= '0;
      bin    <= '0;
    end else begin
      code_q <= din;
      therm  <= therm_d;
      bin    <= bin_d;
    end
  end

  // the latched unary controls are always a thermometer code: 0...01...1
  a_thermometer: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0(therm + 1'b1))
    else $error("switch controls are not a thermometer code: %h", therm);

endmodule
