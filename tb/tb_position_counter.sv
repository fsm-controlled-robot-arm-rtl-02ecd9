// tb_position_counter: checks the 12-bit up/down position counter.
// Two instances are used: one at the default origin 2048, and one with an
// origin of 4093 so that the wrap from 4095 to 0 and back is exercised.
// The count inputs are random one-clock active-low pulses (up, down or
// none, never both) and an integer reference model counts modulo 4096.
// Load must put the origin back. The run counts how often a carry or a
// borrow crossed from one 4-bit stage into the next, and requires both,
// including crossings of two stages (e.g. 0x7FF -> 0x800).
module tb_position_counter;

  logic clk = 1'b0, load, up_n, down_n;
  logic [11:0] q, qw;
  int ref_q, ref_w;
  int checks = 0, failures = 0;
  int carries = 0, borrows = 0, double_carries = 0, double_borrows = 0, wraps = 0;

  position_counter dut (.clk(clk), .load(load), .up_n(up_n), .down_n(down_n), .q(q));
  position_counter #(.NIBBLES(3), .ORIGIN(12'hFFD)) dut_wrap (
    .clk(clk), .load(load), .up_n(up_n), .down_n(down_n), .q(qw));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    checks++;
    if (q !== 12'(ref_q) || qw !== 12'(ref_w)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t q=%h (exp %h) qw=%h (exp %h)", $time, q, 12'(ref_q), qw, 12'(ref_w));
    end
  endtask

  initial begin
    up_n = 1; down_n = 1; load = 1;
    @(negedge clk);
    @(negedge clk);
    ref_q = 2048; ref_w = 12'hFFD;
    check_outputs();
    load = 0;
    for (int n = 0; n < 20000; n++) begin
      int op;
      int bias;
      // drift slowly up and down so that the counter wanders over stages
      bias = ((n / 2000) % 2 == 0) ? 60 : 40;
      op = $urandom_range(0, 99);
      load = (n % 7919 == 7918);
      up_n   = !(op < bias && op % 2 == 0) ;
      down_n = !(op >= bias && op % 2 == 0);
      @(negedge clk);
      if (load) begin
        ref_q = 2048; ref_w = 12'hFFD;
      end else if (!up_n) begin
        if ((ref_q & 12'hF) == 12'hF) carries++;
        if ((ref_q & 12'hFF) == 12'hFF) double_carries++;
        if (ref_w == 4095) wraps++;
        ref_q = (ref_q + 1) % 4096;
        ref_w = (ref_w + 1) % 4096;
      end else if (!down_n) begin
        if ((ref_q & 12'hF) == 0) borrows++;
        if ((ref_q & 12'hFF) == 0) double_borrows++;
        if (ref_w == 0) wraps++;
        ref_q = (ref_q + 4095) % 4096;
        ref_w = (ref_w + 4095) % 4096;
      end
      check_outputs();
    end
    $display("carries=%0d borrows=%0d two-stage carries=%0d borrows=%0d wraps=%0d",
             carries, borrows, double_carries, double_borrows, wraps);
    checks += 5;
    if (carries == 0) failures++;
    if (borrows == 0) failures++;
    if (double_carries == 0) failures++;
    if (double_borrows == 0) failures++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
