// tb_updown_logic: exhaustive check of the encoder up/down decoder.
// For all four combinations of the synchronised quadrature level and the
// phase edge pulse, the active-low outputs are compared with the truth
// table: only a phase pulse produces a count, up when quadrature is low,
// down when it is high.
module tb_updown_logic;

  logic qt_sync, ph_edge, up_n, down_n;
  int checks = 0, failures = 0;

  updown_logic dut (.qt_sync(qt_sync), .ph_edge(ph_edge), .up_n(up_n), .down_n(down_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {qt, ph} -> {up_n, down_n}
    logic [1:0] expected [4];
    expected[0] = 2'b11;  // no phase edge
    expected[1] = 2'b01;  // qt=0, ph edge: up
    expected[2] = 2'b11;  // no phase edge
    expected[3] = 2'b10;  // qt=1, ph edge: down
    for (int i = 0; i < 4; i++) begin
      {qt_sync, ph_edge} = 2'(i);
      #1;
      checks++;
      if ({up_n, down_n} !== expected[i]) begin
        failures++;
        $display("FAIL qt=%0b ph=%0b: up_n,down_n=%b expected %b",
                 qt_sync, ph_edge, {up_n, down_n}, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
