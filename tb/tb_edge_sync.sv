// tb_edge_sync: checks the synchroniser / rising-edge detector.
// The input is driven with random levels held for random lengths (1 to 12
// clocks, changed between clock edges). A reference history of the input
// as sampled at each clock edge gives the expected outputs: `sync` is the
// input delayed by STAGES+1 clocks, `pulse` is high for exactly one clock,
// STAGES clocks after the input was first sampled high. The number of
// pulses must equal the number of rising edges of the input, so holding
// the input high gives a single pulse.
module tb_edge_sync;

  localparam int STAGES = 3;  // the default of edge_sync

  logic clk = 1'b0, clr, d;
  logic sync, pulse;
  int checks = 0, failures = 0;
  int pulses = 0, rises = 0;
  logic [15:0] hist;  // hist[0] = value sampled at the latest edge

  edge_sync dut (.clk(clk), .clr(clr), .d(d), .sync(sync), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1;
    d = 1'b0;
    hist = '0;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    // hist holds zeros, as does the cleared chain
    fork
      begin : drive
        for (int n = 0; n < 300; n++) begin
          @(negedge clk);
          d = ~d;
          if (d) rises++;
          repeat ($urandom_range(0, 11)) @(negedge clk);
        end
        @(negedge clk) d = 1'b0;
        repeat (10) @(negedge clk);
      end
      begin : monitor
        forever begin
          @(posedge clk);
          hist = {hist[14:0], d};
          #1;
          checks++;
          // after this edge the chain holds samples hist[0..STAGES-1],
          // Q1 holds hist[STAGES]
          if (sync !== hist[STAGES] || pulse !== (hist[STAGES-1] & ~hist[STAGES])) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0t sync=%0b pulse=%0b hist=%b", $time, sync, pulse, hist);
          end
          if (pulse) pulses++;
        end
      end
    join_any
    disable fork;
    checks++;
    if (pulses != rises) begin
      failures++;
      $display("FAIL %0d pulses for %0d rising edges", pulses, rises);
    end
    $display("edge_sync: %0d rising edges, %0d pulses", rises, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
