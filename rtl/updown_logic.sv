// updown_logic: converts the encoder signals into count pulses.
//
// On every synchronised rising edge of the phase channel (one-clock pulse
// ph_edge) the level of the synchronised quadrature channel gives the
// direction of rotation: quadrature low means count up, quadrature high
// means count down. Both outputs are active low, matching the counter:
//   up_n   = not( not qt_sync and ph_edge )
//   down_n = not(     qt_sync and ph_edge )
// Purely combinational. The truth table is the original design's; which
// direction of rotation counts up depends on how the encoder is wired.
module updown_logic (
  input  logic qt_sync,
  input  logic ph_edge,
  output logic up_n,
  output logic down_n
);

  assign up_n   = ~(~qt_sync & ph_edge);
  assign down_n = ~( qt_sync & ph_edge);

endmodule
