// Static schedule generator: plays an ultimately periodic activation word
// u.(v)^w, one letter per clock cycle, to fire a node of a statically
// scheduled latency-insensitive design.
//
// After reset, instant 0 is the first cycle. The prefix u (PREFIX_LEN
// letters, the initial phase) is played once, then the period v (PERIOD_LEN
// letters, the stationary phase) forever. Words are written most significant
// bit first, so a literal reads like the word: 6'b001101 means letters
// 0,0,1,1,0,1. fire is the current letter (a Moore output); periodic is high
// once the period is being played. A single counter walks the prefix and then
// wraps over the period. The defaults are the schedule of the reconvergent
// node of the three-node example, 001101(01101)*. The word notation is the
// document's; the counter implementation is this design's.
module schedule_gen #(
  parameter int unsigned           PREFIX_LEN = 6,
  parameter int unsigned           PERIOD_LEN = 5,
  parameter logic [PREFIX_LEN-1:0] PREFIX     = 6'b001101,
  parameter logic [PERIOD_LEN-1:0] PERIOD     = 5'b01101
) (
  input  logic clk,
  input  logic rst_n,
  output logic fire,
  output logic periodic
);

  localparam int unsigned CW = $clog2(PREFIX_LEN + PERIOD_LEN + 1);

  logic [CW-1:0] idx_q;   // position in u.v, 0 .. PREFIX_LEN+PERIOD_LEN-1

  always_ff @(posedge clk) begin
    if (!rst_n)                                           idx_q <= '0;
    else if (idx_q == CW'(PREFIX_LEN + PERIOD_LEN - 1))   idx_q <= CW'(PREFIX_LEN);
    else                                                  idx_q <= idx_q + 1'b1;
  end

  assign periodic = (idx_q >= CW'(PREFIX_LEN));

  always_comb begin
    if (!periodic) fire = PREFIX[PREFIX_LEN - 1 - int'(idx_q)];
    else           fire = PERIOD[PERIOD_LEN - 1 - (int'(idx_q) - PREFIX_LEN)];
  end

endmodule
