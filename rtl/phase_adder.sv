// phase_adder: phase modulation adder between the accumulator and the
// phase-to-amplitude converter.
//
// The 12-bit phase tuning word is a fraction of a full turn (360/4096 =
// 0.0879 degrees per step), so it is added to the 12 most significant bits of
// the 14-bit phase; the two least significant phase bits pass unchanged and the
// sum wraps modulo a full turn. One register stage follows the adder.
// Timing: phase_out = phase_in + ptw * 2^(PHASE_W-PTW_W), one clock later.
module phase_adder #(
  parameter int unsigned PHASE_W = 14,
  parameter int unsigned PTW_W   = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase_in,
  input  logic [PTW_W-1:0]   ptw,
  output logic [PHASE_W-1:0] phase_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_out <= '0;
    else        phase_out <= phase_in + {ptw, {(PHASE_W-PTW_W){1'b0}}};
  end

endmodule
