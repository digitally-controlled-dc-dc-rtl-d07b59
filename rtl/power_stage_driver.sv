// power_stage_driver -- BEHAVIOURAL MODEL (not synthesizable logic) of the power
// stage driver with built-in dead time and self-test mode.
//
// The real driver is a transistor circuit: two inverter chains, each of which
// may only switch its power FET on after the other FET's gate has been switched
// off and the chain delay has elapsed. The model reproduces that interlock with
// a delay:
//   n1 = gate of the PMOS high-side switch (0 = on)
//   n2 = gate of the NMOS low-side switch  (1 = on)
//   PWM rises : n2 falls at once, n1 falls TD_NS later (dead time t_d,on)
//   PWM falls : n1 rises at once, n2 rises TD_NS later (dead time t_d,off)
// so both switches are never on together. In self-test mode (bist = 1) the
// multiplexers of the modified driver force n1 = 1 and n2 = 0 (both switches
// off, power train high-impedance) and block the PWM input.
// The interlock is modelled with one delayed copy of the multiplexed PWM: a
// gate may turn its switch on only when the PWM and its TD_NS-delayed copy
// agree, and turns it off as soon as the PWM changes. This gives the same two
// dead times as the cross-coupled inverter chains without a loop. The
// dead-time value is not given by the design (TD_NS is an assumed 10 ns).
//
// Ports: pwm (from the DPWM through the level shifter), bist, n1, n2.
module power_stage_driver #(
  parameter real TD_NS = 10.0
) (
  input  logic pwm,
  input  logic bist,
  output logic n1,
  output logic n2
);
  logic x;       // PWM after the input multiplexer
  logic x_dly;   // x after the inverter-chain delay

  assign x = pwm & ~bist;
  assign #(TD_NS * 1ns) x_dly = x;

  assign n1 = bist | ~x | ~x_dly;      // PMOS on only TD after PWM rose
  assign n2 = ~bist & ~x & ~x_dly;     // NMOS on only TD after PWM fell
endmodule
