// tb_robot_arm_fsm: checks the record/playback controller.
// A reference model computes the next state from the gate-level
// next-state equations of the original design,
//   S2' = (S1 S0 A + S2) R'
//   S1' = (S2' S0 (S1 xor A) + S1 S0' + S2 S0 (S1 xor E)) R'
//   S0' = (S2' (S0 xor A) + S2 (S0 xor E)) R'
// and the outputs W = S2', Re = S2, L1L0 = S1S0. After a directed pass
// through all eight states (record four positions, play back twice, reset
// from playback) the inputs are randomised for a few thousand clocks, with
// R rare so that the playback states are reached. Every transition of the
// state diagram is counted and must have occurred.
module tb_robot_arm_fsm;
  import robot_arm_pkg::*;

  logic clk = 1'b0, r, a, e;
  state_t state;
  logic w, re;
  logic [1:0] l;
  logic [2:0] ref_s;
  int checks = 0, failures = 0;
  int seen [8][8];  // seen[from][to]

  robot_arm_fsm dut (.clk(clk), .r(r), .a(a), .e(e), .state(state), .w(w), .re(re), .l(l));

  always #5 clk = ~clk;

  function automatic logic [2:0] next_ref(logic [2:0] s, logic ia, logic ir, logic ie);
    logic n2, n1, n0;
    n2 = ((s[1] & s[0] & ia) | s[2]) & ~ir;
    n1 = ((~s[2] & s[0] & (s[1] ^ ia)) | (s[1] & ~s[0]) | (s[2] & s[0] & (s[1] ^ ie))) & ~ir;
    n0 = ((~s[2] & (s[0] ^ ia)) | (s[2] & (s[0] ^ ie))) & ~ir;
    return {n2, n1, n0};
  endfunction

  task automatic step(logic ia, logic ir, logic ie);
    logic [2:0] prev;
    @(negedge clk);
    a = ia; r = ir; e = ie;
    prev = ref_s;
    @(posedge clk);
    ref_s = next_ref(ref_s, ia, ir, ie);
    #1;
    seen[prev][ref_s]++;
    checks++;
    if (state !== ref_s || w !== ~ref_s[2] || re !== ref_s[2] || l !== ref_s[1:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t from %0d A=%0b R=%0b E=%0b: state=%0d w=%0b re=%0b l=%0d expected %0d",
                 $time, prev, ia, ir, ie, state, w, re, l, ref_s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = 3'b000;
    a = 0; e = 0; r = 1;
    @(posedge clk);  // R initialises the state register
    #1;
    // directed: record, ignoring E
    step(0, 1, 0);
    step(0, 0, 1);            // E ignored in S0
    for (int k = 0; k < 4; k++) begin
      step(0, 0, 1);
      step(1, 0, 0);
    end
    // playback, ignoring A, two rounds
    for (int k = 0; k < 8; k++) begin
      step(1, 0, 0);          // A ignored
      step(0, 0, 1);
    end
    step(0, 1, 1);            // reset from playback
    // random
    for (int n = 0; n < 5000; n++)
      step(1'($urandom_range(0, 1)), ($urandom_range(0, 39) == 0), 1'($urandom_range(0, 1)));

    // every arc of the state diagram must have been taken
    for (int s = 0; s < 8; s++) begin
      int adv;
      adv = (s == 7) ? 4 : s + 1;
      checks += 3;
      if (seen[s][s] == 0)   begin failures++; $display("FAIL never held in S%0d", s); end
      if (seen[s][adv] == 0) begin failures++; $display("FAIL never S%0d->S%0d", s, adv); end
      if (seen[s][0] == 0)   begin failures++; $display("FAIL never S%0d->S0", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
