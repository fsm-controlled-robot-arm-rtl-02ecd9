// tb_robot_arm_top: end-to-end test of the robot arm controller at its
// default parameters.
//
// The testbench models the arm: a stepper motor whose encoder produces
// quadrature signals. One encoder count is a full quadrature cycle of
// four phases, each held HOLD clocks; turning "up" gives (ph,qt) =
// 10,11,01,00 (phase rises while quadrature is low), turning "down" gives
// 01,11,10,00. The model keeps its own position in counts.
//
// Sequence, as in a bench test of the real system:
//   1. Reset. The position must be the origin 2048 and the state S0.
//   2. Four times: turn the arm by hand (a random number of counts either
//      way), check the position counter, then press and hold the action
//      button for a random time. Exactly one state advance per press.
//      The upper 8 bits of the position at the press are the expected
//      stored goal.
//   3. Playback: the motor model now turns one count at a time in the
//      direction given by DIR. A monitor checks on every clock that the
//      goal read is the stored one for the current state, that DIR is
//      (position < goal) and E is (position == goal) on the upper 8 bits,
//      and that every state change in playback happens with E high, to the
//      next state (S7 to S4). The action button is pressed during playback
//      and must have no effect.
//   4. Reset during playback, record again with a reset in the middle of
//      recording, then one more playback round.
// Each mechanism (count up/down, carry and borrow across 4-bit counter
// stages, record advance, held button, playback advance, S7->S4 wrap, both
// DIR values, reset from record and from playback, action ignored in
// playback) is counted, and one that never happened is a failure.
module tb_robot_arm_top;

  localparam int HOLD = 4;        // clocks per quadrature phase
  localparam int ORIGIN = 2048;

  logic clk = 1'b0;
  logic r, a_btn, ph, qt;
  logic dir, e;
  logic [2:0] state;
  logic [11:0] position;
  logic [7:0] goal;

  robot_arm_top dut (
    .clk(clk), .r(r), .a_btn(a_btn), .ph(ph), .qt(qt),
    .dir(dir), .e(e), .state(state), .position(position), .goal(goal)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int motor_pos;                 // model position relative to the origin
  logic [7:0] stored [4];
  bit auto_motor = 0;            // motor follows DIR (playback)
  bit monitor_on = 0;

  // mechanism counters
  int n_up = 0, n_down = 0, n_carry = 0, n_borrow = 0;
  int n_rec_adv = 0, n_held = 0, n_play_adv = 0, n_wrap = 0;
  int n_dir_hi = 0, n_dir_lo = 0, n_rst_rec = 0, n_rst_play = 0, n_act_ignored = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  task automatic quad_step(bit up);
    logic [1:0] seq [4];
    if (up) seq = '{2'b10, 2'b11, 2'b01, 2'b00};
    else    seq = '{2'b01, 2'b11, 2'b10, 2'b00};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      {ph, qt} = seq[i];
      repeat (HOLD - 1) @(negedge clk);
    end
    motor_pos += up ? 1 : -1;
  endtask

  task automatic do_reset();
    @(negedge clk);
    r = 1;
    repeat (2) @(negedge clk);
    r = 0;
    motor_pos = 0;
    #1;
    check(state == 3'd0, $sformatf("state %0d after reset", state));
    check(position == 12'(ORIGIN), $sformatf("position %0d after reset", position));
  endtask

  task automatic move_by_hand(int counts);
    bit up = counts > 0;
    int n = up ? counts : -counts;
    for (int i = 0; i < n; i++) quad_step(up);
    repeat (HOLD * 2) @(negedge clk);
    check(position == 12'(ORIGIN + motor_pos),
          $sformatf("position %0d expected %0d", position, ORIGIN + motor_pos));
  endtask

  // press and hold the action button; exactly one advance must result
  task automatic press_action(int expect_state);
    int hold;
    hold = $urandom_range(1, 60);
    @(negedge clk);
    a_btn = 1;
    repeat (hold) @(negedge clk);
    a_btn = 0;
    repeat (8) @(negedge clk);
    check(state == 3'(expect_state),
          $sformatf("state %0d after action (held %0d), expected %0d", state, hold, expect_state));
    if (state == 3'(expect_state)) begin
      n_rec_adv++;
      if (hold >= 10) n_held++;
    end
  endtask

  task automatic record_four();
    for (int k = 0; k < 4; k++) begin
      int mv;
      mv = $urandom_range(20, 300);
      if ($urandom_range(0, 1) == 1) mv = -mv;
      move_by_hand(mv);
      check(goal == 8'h00, "goal output not 0 while recording");
      stored[k] = position[11:4];
      press_action(k == 3 ? 4 : k + 1);
    end
  endtask

  // motor model in playback: one count at a time in the DIR direction
  initial begin
    forever begin
      @(negedge clk);
      if (auto_motor) quad_step(dir);
    end
  end

  // count-direction and carry observers, plus the playback monitor
  logic [11:0] prev_pos;
  logic [2:0]  prev_state;
  logic        prev_e;
  logic [7:0]  prev_hi;
  always @(posedge clk) begin
    prev_pos   <= position;
    prev_state <= state;
    prev_e     <= e;
    prev_hi    <= position[11:4];
  end

  always @(negedge clk) begin
    if (!r && !$isunknown(prev_pos)) begin
      if (position == prev_pos + 12'd1) begin
        n_up++;
        if (position[3:0] == 4'h0) n_carry++;
      end else if (position == prev_pos - 12'd1) begin
        n_down++;
        if (position[3:0] == 4'hF) n_borrow++;
      end
    end
    if (monitor_on && !r) begin
      if (state[2]) begin
        checks++;
        if (goal != stored[state[1:0]])
          fail($sformatf("goal %h in S%0d, stored %h", goal, state, stored[state[1:0]]));
        checks++;
        if (dir != (position[11:4] < goal) || e != (position[11:4] == goal))
          fail($sformatf("dir=%0b e=%0b for position %h goal %h", dir, e, position[11:4], goal));
        if (dir) n_dir_hi++; else n_dir_lo++;
      end
      if (prev_state[2] && state != prev_state) begin
        checks++;
        if (!prev_e || prev_hi != stored[prev_state[1:0]])
          fail($sformatf("left S%0d without reaching its goal", prev_state));
        checks++;
        if (state != ((prev_state == 3'd7) ? 3'd4 : prev_state + 3'd1))
          fail($sformatf("S%0d -> S%0d", prev_state, state));
        n_play_adv++;
        if (prev_state == 3'd7) n_wrap++;
      end
    end
  end

  task automatic playback(int advances);
    int start;
    start = n_play_adv;
    monitor_on = 1;
    auto_motor = 1;
    while (n_play_adv - start < advances) begin
      // press the action button now and then: it must change nothing
      // (the monitor fails any playback state change made without E)
      if ($urandom_range(0, 3) == 0) begin
        a_btn = 1;
        repeat (6) @(negedge clk);
        a_btn = 0;
        n_act_ignored++;
      end
      repeat (200) @(negedge clk);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog: state=%0d position=%0d goal=%0d", state, position, goal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 1; a_btn = 0; ph = 0; qt = 0;
    motor_pos = 0;
    do_reset();

    // round 1: record four positions, play back two and a half rounds
    record_four();
    playback(10);
    // reset from playback
    auto_motor = 0;
    repeat (20) @(negedge clk);
    check(state[2] == 1'b1, "not in playback before reset");
    do_reset();
    n_rst_play++;
    monitor_on = 0;

    // round 2: start recording, reset from a record state, then record again
    move_by_hand(37);
    press_action(1);
    move_by_hand(-25);
    press_action(2);
    do_reset();
    n_rst_rec++;
    record_four();
    playback(5);
    auto_motor = 0;

    $display("up=%0d down=%0d carry=%0d borrow=%0d rec_adv=%0d held=%0d play_adv=%0d wrap=%0d",
             n_up, n_down, n_carry, n_borrow, n_rec_adv, n_held, n_play_adv, n_wrap);
    $display("dir_hi=%0d dir_lo=%0d rst_rec=%0d rst_play=%0d act_ignored=%0d",
             n_dir_hi, n_dir_lo, n_rst_rec, n_rst_play, n_act_ignored);
    check(n_up > 0, "never counted up");
    check(n_down > 0, "never counted down");
    check(n_carry > 0, "no carry between counter stages");
    check(n_borrow > 0, "no borrow between counter stages");
    check(n_rec_adv > 0, "no record advance");
    check(n_held > 0, "no long button hold");
    check(n_play_adv > 0, "no playback advance");
    check(n_wrap > 0, "no S7->S4 wrap");
    check(n_dir_hi > 0, "DIR never high");
    check(n_dir_lo > 0, "DIR never low");
    check(n_rst_rec > 0, "no reset while recording");
    check(n_rst_play > 0, "no reset in playback");
    check(n_act_ignored > 0, "action never pressed in playback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
