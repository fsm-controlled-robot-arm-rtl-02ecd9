// comparator8: WIDTH-bit unsigned magnitude comparator (default 8 bits)
// built, like the original, from 4-bit comparator stages in cascade.
//
// The greater/equal/less outputs of each stage feed the cascade inputs of
// the next more significant stage; the most significant stage gives the
// result. In the controller `a` is the current position (upper 8 counter
// bits) and `b` the goal read from the register file: a_lt_b is the motor
// direction bit and a_eq_b the "position reached" signal for the
// controller. The lowest stage's cascade inputs are tied to "equal".
// Combinational.
module comparator8 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             a_gt_b,
  output logic             a_eq_b,
  output logic             a_lt_b
);

  localparam int unsigned N = WIDTH / 4;

  logic [N:0] gt, eq, lt;

  assign gt[0] = 1'b0;
  assign eq[0] = 1'b1;
  assign lt[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_stage
    mag_comp4 u_stage (
      .a      (a[4*i +: 4]),
      .b      (b[4*i +: 4]),
      .gt_in  (gt[i]),
      .eq_in  (eq[i]),
      .lt_in  (lt[i]),
      .gt_out (gt[i+1]),
      .eq_out (eq[i+1]),
      .lt_out (lt[i+1])
    );
  end

  assign a_gt_b = gt[N];
  assign a_eq_b = eq[N];
  assign a_lt_b = lt[N];

endmodule
