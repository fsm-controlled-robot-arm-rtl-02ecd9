// edge_sync: synchroniser and rising-edge detector for one asynchronous
// input (encoder phase, encoder quadrature or the action button).
//
// The input passes through STAGES flip-flops in series (the original uses
// three stages of one octal D flip-flop chip, D4->Q4->D3->Q3->D2->Q2) to
// settle metastability, and then through one more flip-flop (Q1). The
// edge output is the NOR of Q1 and the inverted D1, i.e. "synchronised
// input is 1 and was 0 one clock earlier": a pulse exactly one clock long
// for every 0->1 change of the input, however long the input stays high.
//
// Interface: `sync` is the synchronised level (Q1), used for the
// quadrature channel; `pulse` is the edge pulse, used for the phase
// channel and the action button. Latency from an input change to
// `pulse` is STAGES clocks (pulse rises after the STAGES-th clock edge).
//
// The synchronous clear `clr` is this design's addition: it empties the
// chain on reset so that no false edge is reported after power-up.
module edge_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic clr,
  input  logic d,
  output logic sync,
  output logic pulse
);

  logic [STAGES-1:0] chain;  // chain[STAGES-1] is the input side
  logic              last;   // Q1

  always_ff @(posedge clk) begin
    if (clr) begin
      chain <= '0;
      last  <= 1'b0;
    end else begin
      chain <= {d, chain[STAGES-1:1]};
      last  <= chain[0];
    end
  end

  // An edge pulse lasts exactly one clock.
  a_single_pulse: assert property (@(posedge clk) disable iff (clr) pulse |=> !pulse)
    else $error("edge_sync: pulse longer than one clock");

  assign sync  = last;
  assign pulse = ~(last | ~chain[0]);

endmodule
