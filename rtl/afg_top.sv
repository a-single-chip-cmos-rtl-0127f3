// afg_top: single-chip agile function generator - a direct digital
// synthesizer with a 10-bit current-steering DAC.
//
// A microcontroller writes the 32-bit frequency tuning word, the 12-bit phase
// tuning word and the control word (waveform, power-down) byte by byte over
// an 8-bit bus into the input and control data register, then pulses update
// to move them all at once into the frequency/phase data register. From
// there the pipelined 32-bit phase accumulator advances by the tuning word
// every clock; its 14 MSBs, plus the phase word, feed the phase-to-amplitude
// converter, which produces a sine (quarter-wave, compressed ROMs), a ramp, a
// saw-tooth or random samples. The 10-bit sample is available on dout and
// drives the DAC, whose complementary currents leave on ioutp/ioutn.
// f_out = f_clk * ftw / 2^32; phase offset = ptw * 360/4096 degrees.
//
// Timing: the word passes 19 register stages from the frequency/phase data
// register to the DAC switch controls: the clock edge that samples update is
// stage 1, the DAC switches change on the 19th edge (190 ns at 100 MHz).
// dout changes two edges earlier. The register map and update strobe are this
// design's choices (see input_ctrl_reg); the analog parts are behavioural
// models, so only the digital part is synthesizable.
module afg_top
  import afg_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // 8-bit microcontroller interface
  input  logic             wr,
  input  logic [2:0]       addr,
  input  logic [7:0]       data,
  input  logic             update,
  // digital sample output
  output logic [AMP_W-1:0] dout,
  // DAC analog side
  input  real              vref,
  input  real              rext,
  output real              ioutp,
  output real              ioutn,
  output real              iref,
  output real              iref2
);

  logic pd;

  dds_core u_dds (
    .clk(clk), .rst_n(rst_n), .wr(wr), .addr(addr), .data(data), .update(update),
    .dout(dout), .pd(pd));

  dac10 u_dac (
    .clk(clk), .rst_n(rst_n), .din(dout), .pd(pd),
    .vref(vref), .rext(rext), .ioutp(ioutp), .ioutn(ioutn), .iref(iref), .iref2(iref2));

endmodule
