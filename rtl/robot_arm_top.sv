// robot_arm_top: record-and-playback position controller for a stepper
// driven robot arm with a quadrature encoder.
//
// Signal flow:
//   * The encoder phase (ph) and quadrature (qt) channels and the
//     conditioned action button are synchronised to the system clock.
//     Rising edges of phase and of the button become one-clock pulses;
//     quadrature is used as a synchronised level.
//   * The up/down logic turns each phase pulse into an active-low count-up
//     pulse (quadrature low) or count-down pulse (quadrature high).
//   * The 12-bit position counter follows the encoder; reset loads it
//     with the origin 2048.
//   * The controller steps through four record states, in each of which
//     the register file word addressed by the state continuously takes the
//     upper 8 bits of the position; the action pulse freezes the word and
//     moves on. After the fourth position it plays back: the register file
//     is read at the current address and compared with the upper 8 bits of
//     the position. DIR = (position < goal) tells the motor which way to
//     turn and E = (position == goal) advances to the next stored
//     position, cycling through all four until reset.
//
// Timing: inputs reach the controller STAGES+1 clocks after they change
// (synchroniser); a count pulse updates the position one clock later; E
// and DIR are combinational from the position counter and the state.
// Reset r is a synchronous, active-high input and must be held for at
// least one clock to initialise the controller. The motor never stops in
// playback: when it reaches one goal the next one is already selected.
//
// The block structure, the widths (12-bit count, 8 stored bits, four
// positions), the origin and the active-low enables between controller
// and register file follow the original design. Synchronous counting,
// synchronous register-file writes, clearing the synchronisers with reset
// and a 0 register output outside playback are this design's choices.
// The analog parts (button debounce, Schmitt trigger, the two 555 clocks,
// motor driver) are outside this module: a_btn is the clean button level
// and the motor's step clock is not generated here.
module robot_arm_top
  import robot_arm_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 3
) (
  input  logic               clk,
  input  logic               r,
  input  logic               a_btn,
  input  logic               ph,
  input  logic               qt,
  output logic               dir,
  output logic               e,
  output logic [2:0]         state,
  output logic [POS_W-1:0]   position,
  output logic [STORE_W-1:0] goal
);

  logic a_pulse, ph_pulse, qt_sync;
  logic unused_a_sync, unused_ph_sync, unused_qt_pulse;
  logic up_n, down_n;
  logic w, re;
  logic [ADDR_W-1:0] l;
  logic unused_a_gt_b;
  state_t st;

  edge_sync #(.STAGES(SYNC_STAGES)) u_sync_action (
    .clk(clk), .clr(r), .d(a_btn), .sync(unused_a_sync), .pulse(a_pulse)
  );

  edge_sync #(.STAGES(SYNC_STAGES)) u_sync_phase (
    .clk(clk), .clr(r), .d(ph), .sync(unused_ph_sync), .pulse(ph_pulse)
  );

  edge_sync #(.STAGES(SYNC_STAGES)) u_sync_quad (
    .clk(clk), .clr(r), .d(qt), .sync(qt_sync), .pulse(unused_qt_pulse)
  );

  updown_logic u_updown (
    .qt_sync(qt_sync), .ph_edge(ph_pulse), .up_n(up_n), .down_n(down_n)
  );

  position_counter #(.NIBBLES(POS_W / 4), .ORIGIN(ORIGIN)) u_counter (
    .clk(clk), .load(r), .up_n(up_n), .down_n(down_n), .q(position)
  );

  robot_arm_fsm u_fsm (
    .clk(clk), .r(r), .a(a_pulse), .e(e), .state(st), .w(w), .re(re), .l(l)
  );

  // The register file enables are active low: W and Re are inverted.
  register_file #(.WORDS(N_POS), .WIDTH(STORE_W)) u_regfile (
    .clk(clk), .gw_n(~w), .gr_n(~re), .wa(l), .ra(l),
    .d(position[POS_W-1 -: STORE_W]), .q(goal)
  );

  comparator8 #(.WIDTH(STORE_W)) u_comp (
    .a(position[POS_W-1 -: STORE_W]), .b(goal),
    .a_gt_b(unused_a_gt_b), .a_eq_b(e), .a_lt_b(dir)
  );

  assign state = st;

endmodule
