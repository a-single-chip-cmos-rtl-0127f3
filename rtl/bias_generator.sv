// bias_generator: behavioural model of the DAC bias generator (an analog
// block: the model is not synthesizable).
//
// From the bandgap reference voltage and the external resistor it sets the
// reference current iref = vref / rext, which flows out of the iref pin into
// Rext. A mirror copy leaves on iref2, and iref1, scaled by MIRROR, is the
// bias of the LSB current source in the current-steering cells. Power-down
// turns all currents off. The pins (PD, Vref, iref, iref1, iref2) are the
// published ones; the mirror ratio and the pure-ratio behaviour are this
// model's assumptions. Currents in amperes, voltages in volts, resistance in
// ohms; the outputs follow the inputs with no delay.
module bias_generator #(
  parameter real MIRROR = 0.0282   // iref1 / iref
) (
  input  logic pd,
  input  real  vref,
  input  real  rext,
  output real  iref,
  output real  iref1,
  output real  iref2
);

  always_comb begin
    if (pd || rext <= 0.0) iref = 0.0;
    else                   iref = vref / rext;
    iref1 = iref * MIRROR;
    iref2 = iref;
  end

endmodule
