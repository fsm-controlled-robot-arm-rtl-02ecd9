// updown_counter4: 4-bit synchronous up/down counter with parallel load,
// the building block of the position counter (one 74193-style stage).
//
// Counts up by one on a clock edge while up_n is low and down by one while
// down_n is low; holds if both or neither are low. While `load` is high the
// counter takes `din` instead (load has priority). The carry output co_n
// goes low in the cycle the stage is at 15 and counting up, the borrow
// output bo_n in the cycle it is at 0 and counting down; both are
// combinational, so a chain of stages counts as one wide synchronous
// counter when each stage's co_n/bo_n drives the next stage's up_n/down_n.
//
// The original part counts on the rising edge of its UP/DOWN pin and
// loads asynchronously; this stage is fully synchronous to the system
// clock, which is this design's choice.
module updown_counter4 (
  input  logic       clk,
  input  logic       load,
  input  logic [3:0] din,
  input  logic       up_n,
  input  logic       down_n,
  output logic [3:0] q,
  output logic       co_n,
  output logic       bo_n
);

  logic up, down;

  assign up   = ~up_n & down_n;
  assign down = ~down_n & up_n;

  always_ff @(posedge clk) begin
    if (load)      q <= din;
    else if (up)   q <= q + 4'd1;
    else if (down) q <= q - 4'd1;
  end

  assign co_n = ~(up   && q == 4'hF);
  assign bo_n = ~(down && q == 4'h0);

endmodule
