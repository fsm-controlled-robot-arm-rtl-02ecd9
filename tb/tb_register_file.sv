// tb_register_file: checks the 4 x 8 position store.
// Random writes (active-low write enable, random address and data) and
// random reads at an independent address are applied for a few thousand
// clocks; a reference array predicts the read data. With the read enable
// high the output must be 0; with the write enable high nothing changes.
// Reads are combinational, so a word written at a clock edge is visible
// right after it.
module tb_register_file;

  logic clk = 1'b0, gw_n, gr_n;
  logic [1:0] wa, ra;
  logic [7:0] d, q;
  logic [7:0] ref_mem [4];
  logic [3:0] written;
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .gw_n(gw_n), .gr_n(gr_n), .wa(wa), .ra(ra), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    written = '0;
    gw_n = 1; gr_n = 1; wa = 0; ra = 0; d = 0;
    // fill every word first
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      gw_n = 0; wa = 2'(i); d = 8'($urandom);
      @(posedge clk);
      ref_mem[i] = d;
      written[i] = 1'b1;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      gw_n = 1'($urandom_range(0, 1));
      gr_n = ($urandom_range(0, 3) == 0);
      wa = 2'($urandom);
      ra = 2'($urandom);
      d = 8'($urandom);
      #1;
      checks++;
      if (q !== (gr_n ? 8'h00 : ref_mem[ra])) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t gr_n=%0b ra=%0d q=%h expected %h", $time, gr_n, ra, q, ref_mem[ra]);
      end
      @(posedge clk);
      if (!gw_n) ref_mem[wa] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
