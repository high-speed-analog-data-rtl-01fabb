// fast_pulse_amp: behavioural model of the fast pulse amplifier (not
// synthesisable; an analog circuit).
//
// The real circuit is an LM101A operational amplifier with feed-forward
// compensation that halves a -5..+5 V pulsed analog and shifts it to a
// 2.5 V reference, so that the output spans exactly the 0..+5 V input range
// of the ADC, settling in under 500 ns. The model computes
//   vout = VREF + GAIN * vin
// and lets the output follow the input after SETTLE_NS (a transport delay,
// so each input step appears at the output SETTLE_NS later). The gain, the
// offset and the settling time are the description's; that the amplifier
// does not invert the signal and that its output clips at the supply-derived
// 0..5 V span are this model's assumptions.
`timescale 1ns/1ps
module fast_pulse_amp #(
  parameter real GAIN      = 0.5,
  parameter real VREF      = 2.5,
  parameter real VMAX      = 5.0,
  parameter real SETTLE_NS = 500.0
) (
  input  real vin,    // volts, -5..+5
  output real vout    // volts, 0..+5
);

  function automatic real transfer(input real v);
    real y;
    y = VREF + GAIN * v;
    if (y < 0.0)  y = 0.0;
    if (y > VMAX) y = VMAX;
    return y;
  endfunction

  initial vout = VREF;

  always @(vin) vout <= #(SETTLE_NS) transfer(vin);

endmodule
