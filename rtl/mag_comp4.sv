// mag_comp4: 4-bit magnitude comparator with cascade inputs
// (one 74HC85-style stage).
//
// Compares unsigned a and b. If they differ, the outputs say which is
// larger; if they are equal, the cascade inputs from a less significant
// stage are passed through, so stages can be chained into a wider
// comparator. The lowest stage gets gt_in = 0, eq_in = 1, lt_in = 0.
// Combinational.
module mag_comp4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       gt_in,
  input  logic       eq_in,
  input  logic       lt_in,
  output logic       gt_out,
  output logic       eq_out,
  output logic       lt_out
);

  always_comb begin
    if (a > b) begin
      {gt_out, eq_out, lt_out} = 3'b100;
    end else if (a < b) begin
      {gt_out, eq_out, lt_out} = 3'b001;
    end else begin
      {gt_out, eq_out, lt_out} = {gt_in, eq_in, lt_in};
    end
  end

endmodule
