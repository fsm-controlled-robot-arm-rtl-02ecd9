// regfile_4x4: four words of four bits with separate read and write
// addresses (one 74HC670-style register file).
//
// A word is written with `d` on every clock edge while gw_n is low, at
// address wa. Reading is combinational: while gr_n is low, q shows the
// word at ra; while gr_n is high q is 0 (the original part's outputs go
// to high impedance). The contents are not reset. Synchronous writing
// and the 0 on disabled reads are this design's choices.
module regfile_4x4 (
  input  logic       clk,
  input  logic       gw_n,
  input  logic       gr_n,
  input  logic [1:0] wa,
  input  logic [1:0] ra,
  input  logic [3:0] d,
  output logic [3:0] q
);

  logic [3:0] mem [4];

  always_ff @(posedge clk) begin
    if (!gw_n) mem[wa] <= d;
  end

  assign q = gr_n ? 4'h0 : mem[ra];

endmodule
