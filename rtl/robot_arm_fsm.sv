// robot_arm_fsm: record/playback controller of the robot arm.
//
// Eight states in binary encoding S2S1S0. In the record states S0..S3 the
// write output W is high and the address L1L0 is the state index; a
// one-cycle action pulse A (with R low) moves to the next record state,
// and from S3 into the first playback state S4. In the playback states
// S4..S7 the read output Re is high and the address again counts 0..3;
// the comparator's equal signal E (with R low) moves to the next state,
// S7 wrapping to S4. R high sends every state to S0 on the next clock.
// In record states E is ignored, in playback states A is ignored.
//
// Outputs are Moore outputs decoded from the state bits: W = not S2,
// Re = S2, L1 = S1, L0 = S0. W and Re are active high here; the register
// file enables are active low and are inverted at the top level.
//
// The state table, encoding and outputs follow the original design. The
// state register has no separate reset: as in the original, it is put in
// S0 through the R term of the next-state logic, so R must be held high
// for one clock after power-up.
module robot_arm_fsm
  import robot_arm_pkg::*;
(
  input  logic              clk,
  input  logic              r,      // reset button, active high
  input  logic              a,      // action pulse
  input  logic              e,      // comparator equal
  output state_t            state,
  output logic              w,      // write (record states)
  output logic              re,     // read (playback states)
  output logic [ADDR_W-1:0] l       // register address L1L0
);

  state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    if (r) begin
      state_d = S0;
    end else begin
      unique case (state_q)
        S0: if (a) state_d = S1;
        S1: if (a) state_d = S2;
        S2: if (a) state_d = S3;
        S3: if (a) state_d = S4;
        S4: if (e) state_d = S5;
        S5: if (e) state_d = S6;
        S6: if (e) state_d = S7;
        S7: if (e) state_d = S4;
        default: state_d = S0;
      endcase
    end
  end

  always_ff @(posedge clk) state_q <= state_d;

  assign state = state_q;
  assign w     = ~state_q[2];
  assign re    =  state_q[2];
  assign l     =  state_q[1:0];

endmodule
