// lfsr_noise: pseudo-random sample source for the random waveform.
//
// A 23-bit Fibonacci LFSR with feedback polynomial x^23 + x^18 + 1 (maximal
// length, period 2^23 - 1) is stepped OUT_W times per clock, so each clock
// yields OUT_W fresh bits and consecutive samples share no bits. The sample is
// the OUT_W least significant state bits. The use of an LFSR is published; its
// length, polynomial, seed and stepping rate are this design's choices.
// Timing: a new sample every clock; reset loads SEED.
module lfsr_noise #(
  parameter int unsigned   LFSR_W = 23,
  parameter int unsigned   TAP    = 18,      // second tap of x^LFSR_W + x^TAP + 1
  parameter int unsigned   OUT_W  = 10,
  parameter logic [22:0]   SEED   = 23'h5A5A5
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [OUT_W-1:0] sample
);

  logic [LFSR_W-1:0] state, next_state;

  // one step shifts left and inserts x[LFSR_W-1] ^ x[TAP-1]
  always_comb begin
    next_state = state;
    for (int i = 0; i < OUT_W; i++)
      next_state = {next_state[LFSR_W-2:0], next_state[LFSR_W-1] ^ next_state[TAP-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED[LFSR_W-1:0];
    else        state <= next_state;
  end

  assign sample = state[OUT_W-1:0];

endmodule
