// schmitt_trigger_model: behavioural model of one inverting Schmitt-trigger
// gate (one section of a hex Schmitt inverter), for simulation only.
//
// The output goes low when the input voltage rises above VT_POS and high
// when it falls below VT_NEG; between the two thresholds it keeps its
// value. The hysteresis turns the slow RC voltage of the debounce network
// into one clean logic edge. The output is inverted: a pressed button
// (node pulled low) gives 1. Threshold values are typical figures for a
// 74HC-family part at 5 V and are assumed.
module schmitt_trigger_model #(
  parameter real VT_POS = 2.5,  // volt, rising threshold
  parameter real VT_NEG = 1.6   // volt, falling threshold
) (
  input  real  v_in,
  output logic y
);

  initial y = 1'b0;

  always @(v_in) begin
    if (v_in > VT_POS)      y = 1'b0;
    else if (v_in < VT_NEG) y = 1'b1;
  end

endmodule
