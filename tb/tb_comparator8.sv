// tb_comparator8: exhaustive check of the cascaded 8-bit magnitude
// comparator. Every pair (a, b) of 8-bit values is applied and the three
// outputs are compared with the integer relations a > b, a == b, a < b;
// exactly one output must be high.
module tb_comparator8;

  logic [7:0] a, b;
  logic gt, eq, lt;
  int checks = 0, failures = 0;

  comparator8 dut (.a(a), .b(b), .a_gt_b(gt), .a_eq_b(eq), .a_lt_b(lt));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (gt !== (i > j) || eq !== (i == j) || lt !== (i < j)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: gt=%0b eq=%0b lt=%0b", i, j, gt, eq, lt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
