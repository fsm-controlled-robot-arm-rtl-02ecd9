// register_file: store for the recorded arm positions, WORDS words of
// WIDTH bits (default 4 x 8: the upper 8 bits of four 12-bit positions).
//
// Built, like the original, from 4-bit wide register files placed side
// by side (WIDTH/4 of them; #1 holds the less significant nibble). All
// share the write address, read address and the active-low write and
// read enables. A write happens on each clock edge while gw_n is low, so
// during a record state the addressed word follows the position counter
// and keeps the value of the last clock before the state changes. Reads
// are combinational while gr_n is low and give 0 otherwise.
module register_file #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     gw_n,
  input  logic                     gr_n,
  input  logic [$clog2(WORDS)-1:0] wa,
  input  logic [$clog2(WORDS)-1:0] ra,
  input  logic [WIDTH-1:0]         d,
  output logic [WIDTH-1:0]         q
);

  // The 4-bit chips hold four words; the defaults match that.
  initial begin
    assert (WORDS == 4 && WIDTH % 4 == 0)
      else $error("register_file: WORDS must be 4 and WIDTH a multiple of 4");
  end

  for (genvar i = 0; i < WIDTH / 4; i++) begin : g_chip
    regfile_4x4 u_chip (
      .clk  (clk),
      .gw_n (gw_n),
      .gr_n (gr_n),
      .wa   (wa[1:0]),
      .ra   (ra[1:0]),
      .d    (d[4*i +: 4]),
      .q    (q[4*i +: 4])
    );
  end

endmodule
