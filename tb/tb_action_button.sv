// tb_action_button: the action-button path with a bouncing contact.
//
// A behavioural button contact bounces for a few milliseconds on every
// press and release (random open/closed intervals of 20 to 400 us). It
// drives the RC debounce model and the Schmitt-trigger model, whose output
// is the a_btn input of the full controller, clocked at about 5.26 kHz
// (190 us period). One simulation time unit stands for 1 us.
//
// Checks: each press advances the controller by exactly one record state
// (S0 -> S1 -> S2 -> S3 -> S4) however long it is held, and the
// conditioned signal changes exactly once per press and once per release.
// For comparison the raw contact is also fed through a synchroniser/edge
// detector of its own: it must report more than one edge per press, which
// is the misbehaviour the debounce network prevents.
module tb_action_button;

  logic clk = 1'b0;
  logic r, sw_closed, a_btn;
  real  v_node;
  logic dir, e;
  logic [2:0] state;
  logic [11:0] position;
  logic [7:0] goal;
  logic raw_sync, raw_pulse;

  int checks = 0, failures = 0;
  int a_changes = 0, raw_pulses = 0, presses = 0;

  always begin
    #95 clk = 1'b1;
    #95 clk = 1'b0;
  end

  debounce_rc_model u_rc (.sw_closed(sw_closed), .v_out(v_node));
  schmitt_trigger_model u_st (.v_in(v_node), .y(a_btn));

  robot_arm_top dut (
    .clk(clk), .r(r), .a_btn(a_btn), .ph(1'b0), .qt(1'b0),
    .dir(dir), .e(e), .state(state), .position(position), .goal(goal)
  );

  // the raw contact, without debouncing, for comparison
  edge_sync u_raw (.clk(clk), .clr(r), .d(sw_closed), .sync(raw_sync), .pulse(raw_pulse));

  always @(a_btn) a_changes++;
  always @(posedge clk) if (raw_pulse) raw_pulses++;

  task automatic bounce(logic final_level);
    int t_end;
    t_end = $urandom_range(2000, 5000);
    for (int t = 0; t < t_end; ) begin
      int d;
      d = $urandom_range(20, 400);
      sw_closed = ~sw_closed;
      #(d);
      t += d;
    end
    sw_closed = final_level;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_closed = 1'b0;
    r = 1'b1;
    #100000;                    // let the RC node settle, hold reset
    @(negedge clk) r = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (state != 3'd0) begin failures++; $display("FAIL state %0d after reset", state); end
    a_changes = 0;
    raw_pulses = 0;
    for (int k = 1; k <= 4; k++) begin
      int n_before;
      n_before = a_changes;
      bounce(1'b1);                          // press
      #($urandom_range(50000, 400000));      // hold 50 to 400 ms
      bounce(1'b0);                          // release
      #300000;                               // 300 ms, > 6 RC time constants
      presses++;
      checks++;
      if (state != 3'(k)) begin
        failures++;
        $display("FAIL after press %0d state is %0d", k, state);
      end
      checks++;
      if (a_changes - n_before != 2) begin
        failures++;
        $display("FAIL press %0d: conditioned button changed %0d times", k, a_changes - n_before);
      end
    end
    $display("presses=%0d raw edges=%0d conditioned changes=%0d", presses, raw_pulses, a_changes);
    checks++;
    if (raw_pulses <= presses) begin
      failures++;
      $display("FAIL the raw contact showed no bounce");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
