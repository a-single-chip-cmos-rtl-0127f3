// freq_phase_reg: the frequency/phase data register that drives the DDS.
//
// It holds the frequency tuning word, phase tuning word and control word the
// DDS is running with, and loads all three from the input and control data
// register on one clock when `update` is high. Double buffering of this kind
// is this design's reading of the two registers of the block diagram; the
// strobe itself is this design's choice. Reset clears it (frequency 0, phase 0,
// sine, powered up).
// Timing: the word is on `active` one clock after the edge that sampled update;
// a byte written on that same edge is not yet included.
module freq_phase_reg
  import afg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    update,
  input  tuning_t staged,
  output tuning_t active
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      active <= '0;
    else if (update) active <= staged;
  end

endmodule
