// Hold generator for a fractional register in a statically scheduled design.
//
// A token must wait in the fractional register when more tokens have reached
// its entry than the target node has consumed. current is high in the cycles
// where a token reaches the entry (the source node's schedule shifted by the
// link latency), next in the cycles where the target node fires (its static
// schedule). Because the two counts never differ by more than one, one
// register, the previous hold, is the whole state:
//   hold = ((held_q | current) & ~next) | (held_q & current)
// A firing of the target with no token present (activity not caused by this
// source, e.g. in the initial phase) consumes nothing and is ignored. overflow
// flags the case the schedules must never produce: a token held, another one
// arriving, and no firing. The counting rule follows the document's
// definition of hold; the two-input, one-register form and the overflow flag
// are this design's.
module hold_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic current,
  input  logic next,
  output logic hold,
  output logic overflow
);

  logic held_q;

  always_ff @(posedge clk) begin
    if (!rst_n) held_q <= 1'b0;
    else        held_q <= hold;
  end

  assign hold     = ((held_q || current) && !next) || (held_q && current);
  assign overflow = held_q && current && !next;

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) !overflow);

endmodule
