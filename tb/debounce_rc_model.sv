// debounce_rc_model: behavioural (analog) model of the action button's RC
// debounce network, for simulation only.
//
// The button contact pulls the node to ground; a 10 kOhm resistor pulls
// it up to the supply and a 4.7 uF capacitor holds it. While the contact is
// closed the node discharges within microseconds; when it opens the node
// recharges with a time constant of R*C = 47 ms. Short openings during
// contact bounce therefore barely move the voltage, and the Schmitt trigger
// that follows sees one clean transition per press and per release.
//
// The node voltage is updated every STEP time units with the exact
// exponential solution of the RC circuit, so any step size is stable.
// UNIT_S is the number of seconds one simulation time unit stands for.
// Component values are those of the reference build; the contact
// resistance R_SWITCH and the supply VCC are assumed.
module debounce_rc_model #(
  parameter real R_PULLUP = 10.0e3,   // ohm
  parameter real C_NODE   = 4.7e-6,   // farad
  parameter real R_SWITCH = 1.0,      // ohm, closed contact
  parameter real VCC      = 5.0,      // volt
  parameter real UNIT_S   = 1.0e-6,   // seconds per time unit
  parameter int  STEP     = 10        // time units per update
) (
  input  logic sw_closed,
  output real  v_out
);

  initial begin
    v_out = VCC;  // released and charged at start
    forever begin
      real v_eq, tau;
      #(STEP);
      if (sw_closed) begin
        v_eq = VCC * R_SWITCH / (R_SWITCH + R_PULLUP);
        tau  = (R_SWITCH * R_PULLUP / (R_SWITCH + R_PULLUP)) * C_NODE;
      end else begin
        v_eq = VCC;
        tau  = R_PULLUP * C_NODE;
      end
      v_out = v_eq + (v_out - v_eq) * $exp(-(STEP * UNIT_S) / tau);
    end
  end

endmodule
