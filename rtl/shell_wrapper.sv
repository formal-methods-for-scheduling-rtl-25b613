// Shell-wrapper: the firing logic around a patient pearl (an IP block that
// may be clocked irregularly) in a dynamically scheduled latency-insensitive
// design.
//
// The pearl fires (pearl_clock, a clock enable) in the cycle where every input
// channel has a token, arrived now or parked earlier, and no output channel
// is stopped. In that cycle one token is consumed on every input and one is
// emitted on every output (val_out = pearl_clock). Each input channel is an
// sw_input that parks an early token and back-pressures its upstream link
// until the pearl fires. The wrapper is combinational from val_in/stop_out to
// pearl_clock/val_out; its only state is the parked tokens, so tokens pass
// from the relay stations before it, through it and the pearl, into the relay
// stations after it, in one cycle. The pearl's output values are wired by the
// surrounding network straight to the output links.
//
// The firing rule and the input module follow the shell-wrapper description
// of latency-insensitive design; channel counts and data width are parameters
// chosen here.
module shell_wrapper #(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned N_OUT = 2,
  parameter int unsigned W     = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_IN-1:0]            val_in,
  input  logic [N_IN-1:0][W-1:0]     data_in,
  output logic [N_IN-1:0]            stop_in,
  output logic [N_IN-1:0][W-1:0]     pearl_data,
  output logic                       pearl_clock,
  output logic [N_OUT-1:0]           val_out,
  input  logic [N_OUT-1:0]           stop_out
);

  logic [N_IN-1:0] tok_avail;
  logic            all_val_in, any_stop_out;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    sw_input #(.W(W)) u_in (
      .clk, .rst_n,
      .val_in    (val_in[i]),
      .data_in   (data_in[i]),
      .clock     (pearl_clock),
      .tok_avail (tok_avail[i]),
      .stop_in   (stop_in[i]),
      .pearl_data(pearl_data[i])
    );
  end

  assign all_val_in   = &tok_avail;
  assign any_stop_out = |stop_out;
  assign pearl_clock  = all_val_in && !any_stop_out;
  assign val_out      = {N_OUT{pearl_clock}};

  // Output congestion suppresses both the firing and every output token.
  a_stop_blocks_fire : assert property (@(posedge clk) disable iff (!rst_n)
                                        any_stop_out |-> (!pearl_clock && val_out == '0));
  // Not suspended by its outputs for two cycles and firing in the second one:
  // that firing needs a token arriving in that cycle.
  a_fire_needs_arrival : assert property (@(posedge clk) disable iff (!rst_n)
                                          (!any_stop_out ##1 (!any_stop_out && pearl_clock))
                                          |-> (val_in != '0));

endmodule
