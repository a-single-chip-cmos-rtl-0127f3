// dds_core: the digital part of the function generator - control registers
// and direct digital synthesizer.
//
// Bytes from the 8-bit microcontroller bus collect in the input and control
// data register; an update strobe moves them into the frequency/phase data
// register. The pipelined 32-bit phase accumulator then adds the frequency
// tuning word every clock, the phase adder adds the 12-bit phase tuning word
// to the 14 phase MSBs, and the phase-to-amplitude converter turns the result
// into a 10-bit sample of the selected waveform. The power-down bit of the
// control word is passed on to the DAC bias generator.
// f_out = f_clk * ftw / 2^32; phase offset = ptw * 360/4096 degrees.
// Timing: 17 register stages from the edge that samples update (stage 1) to a
// changed dout: 1 data register, 8 accumulator, 1 phase adder, 7 converter.
// The two DAC latches that follow make the published 19.
module dds_core
  import afg_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [2:0]       addr,
  input  logic [7:0]       data,
  input  logic             update,
  output logic [AMP_W-1:0] dout,
  output logic             pd
);

  tuning_t            staged, active;
  logic [PHASE_W-1:0] acc_phase, mod_phase;

  input_ctrl_reg u_in (
    .clk(clk), .rst_n(rst_n), .wr(wr), .addr(addr), .data(data), .staged(staged));

  freq_phase_reg u_fp (
    .clk(clk), .rst_n(rst_n), .update(update), .staged(staged), .active(active));

  phase_accumulator #(.ACC_W(ACC_W), .SEG_W(4), .OUT_W(PHASE_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .ftw(active.ftw), .phase(acc_phase));

  phase_adder #(.PHASE_W(PHASE_W), .PTW_W(PTW_W)) u_padd (
    .clk(clk), .rst_n(rst_n), .phase_in(acc_phase), .ptw(active.ptw), .phase_out(mod_phase));

  phase_to_amp #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_p2a (
    .clk(clk), .rst_n(rst_n), .phase(mod_phase), .wave(active.ctrl.wave), .sample(dout));

  assign pd = active.ctrl.pd;

endmodule
