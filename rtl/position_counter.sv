// position_counter: 12-bit up/down counter holding the arm position in
// encoder counts.
//
// NIBBLES 4-bit up/down stages are chained: the carry and borrow outputs
// of each stage drive the count-up and count-down inputs of the next more
// significant stage; the least significant stage takes the active-low UP
// and DOWN pulses of the encoder logic, and the carry/borrow of the most
// significant stage is left unused, so the count wraps at its ends.
// While `load` is high every stage loads its nibble of ORIGIN, by default
// 1000_0000_0000 (2048), the middle of the 12-bit range, so the arm can be
// tracked equally far clockwise and anticlockwise from where it was when
// reset was pressed. The count changes on the clock edge at the end of
// the cycle in which UP or DOWN is low; q is registered.
//
// The chain of three 4-bit stages, the origin value and the use of load
// (not clear) as the reset follow the original design; synchronous
// counting and loading are this design's choice.
module position_counter #(
  parameter int unsigned            NIBBLES = 3,
  parameter logic [4*NIBBLES-1:0]   ORIGIN  = 12'h800
) (
  input  logic                 clk,
  input  logic                 load,
  input  logic                 up_n,
  input  logic                 down_n,
  output logic [4*NIBBLES-1:0] q
);

  logic [NIBBLES:0] up_chain_n, down_chain_n;

  assign up_chain_n[0]   = up_n;
  assign down_chain_n[0] = down_n;

  // The encoder logic never asks for both directions in the same cycle.
  a_one_direction: assert property (@(posedge clk) disable iff (load) up_n || down_n)
    else $error("position_counter: UP and DOWN low together");

  for (genvar i = 0; i < NIBBLES; i++) begin : g_stage
    updown_counter4 u_stage (
      .clk    (clk),
      .load   (load),
      .din    (ORIGIN[4*i +: 4]),
      .up_n   (up_chain_n[i]),
      .down_n (down_chain_n[i]),
      .q      (q[4*i +: 4]),
      .co_n   (up_chain_n[i+1]),
      .bo_n   (down_chain_n[i+1])
    );
  end

endmodule
