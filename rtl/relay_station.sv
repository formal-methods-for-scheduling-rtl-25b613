// Relay station: the two-slot buffer that cuts a long latency-insensitive
// link into sections of one clock cycle.
//
// A token (val_in with data_in) received in one cycle is offered downstream
// (val_out with data_out) from the next cycle on. When the downstream section
// answers stop_out, the token is kept; since the upstream side only learns of
// the congestion one cycle later, a second token may still arrive and is
// parked in an auxiliary register. The station then raises stop_in, which is a
// registered signal (state full), so no combinational path runs from stop_out
// to stop_in. val_out does depend combinationally on stop_out: a stopped
// station never emits.
//
// Controller: the four-state chart empty / half / full / error. Datapath:
// MAIN loads data_in on every val_in; AUX copies MAIN when a token arrives in
// half under stop_out; the output is AUX in full (the older token) and MAIN
// otherwise. Both follow the relay-station description this design is built
// from. The data width, the synchronous active-low reset and the option to
// start in half holding an initial token (INIT_VALID / INIT_DATA, used to
// place the initial marking of a network) are this design's choices.
//
// Protocol rules checked by assertions: the environment never sends val_in
// while stop_in is high, and val_out is never sent while stop_out is high.
module relay_station
  import lid_pkg::*;
#(
  parameter int unsigned   W          = 16,
  parameter bit            INIT_VALID = 1'b0,
  parameter logic [W-1:0]  INIT_DATA  = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         val_in,
  input  logic [W-1:0] data_in,
  output logic         stop_in,
  output logic         val_out,
  output logic [W-1:0] data_out,
  input  logic         stop_out,
  output logic         error
);

  rs_state_t    state_q, state_d;
  logic [W-1:0] main_q, aux_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      RS_EMPTY: if (val_in) state_d = RS_HALF;
      RS_HALF: begin
        if (val_in && stop_out)        state_d = RS_FULL;
        else if (!val_in && !stop_out) state_d = RS_EMPTY;
      end
      RS_FULL: begin
        if (val_in)         state_d = RS_ERROR;
        else if (!stop_out) state_d = RS_HALF;
      end
      RS_ERROR: state_d = RS_ERROR;
      default:  state_d = RS_ERROR;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= INIT_VALID ? RS_HALF : RS_EMPTY;
      main_q  <= INIT_DATA;
      aux_q   <= '0;
    end else begin
      state_q <= state_d;
      if (val_in && state_q != RS_FULL && state_q != RS_ERROR) main_q <= data_in;
      if (state_q == RS_HALF && val_in && stop_out)            aux_q  <= main_q;
    end
  end

  assign stop_in  = (state_q == RS_FULL);
  assign val_out  = (state_q == RS_HALF || state_q == RS_FULL) && !stop_out;
  assign data_out = (state_q == RS_FULL) ? aux_q : main_q;
  assign error    = (state_q == RS_ERROR);

  // Environment assumption: no token is offered while back-pressure is raised.
  a_no_val_when_stopped : assert property (@(posedge clk) disable iff (!rst_n)
                                           !(stop_in && val_in));
  // Back-pressure takes effect immediately.
  a_no_val_out_on_stop  : assert property (@(posedge clk) disable iff (!rst_n)
                                           !(stop_out && val_out));

endmodule
