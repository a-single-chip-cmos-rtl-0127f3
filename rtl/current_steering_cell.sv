// current_steering_cell: behavioural model of one DAC current-steering cell
// with its asymmetric switch driver (analog: the model is not synthesizable).
//
// In silicon the cell is a p-channel cascode current source feeding a pair of
// p-channel differential switches, one to each output. An NMOS driver makes the
// two complementary switch controls with a fast turn-on edge and a slow
// turn-off edge, so on every transition the switch that closes does so before
// the other one opens: both conduct for a moment and the source is never
// left with no path. The model keeps exactly that: when d rises the
// ioutp switch (sw_p) closes after T_ON and the ioutn switch (sw_n) opens after
// T_OFF; when d falls the roles swap. T_ON is the 0.2 ns driver delay quoted
// for the circuit; T_OFF is this model's assumption and must exceed T_ON. The
// array turns the switch states into currents (a cell with both switches
// closed splits its current equally between the two matched loads).
// Reset state: d = 0 at time zero gives sw_n closed, sw_p open.
module current_steering_cell #(
  parameter realtime T_ON  = 0.2ns,
  parameter realtime T_OFF = 0.35ns
) (
  input  logic d,
  output logic sw_p,
  output logic sw_n
);

  initial begin
    sw_p = 1'b0;
    sw_n = 1'b1;
  end

  always @(posedge d) begin
    sw_p <= #(T_ON)  1'b1;
    sw_n <= #(T_OFF) 1'b0;
  end

  always @(negedge d) begin
    sw_n <= #(T_ON)  1'b1;
    sw_p <= #(T_OFF) 1'b0;
  end

endmodule
