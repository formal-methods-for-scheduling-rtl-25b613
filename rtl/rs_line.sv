// Relay-station line: a latency-insensitive link of latency N, made of N
// relay stations in series.
//
// Tokens move forward (val/data) one station per cycle when nothing is
// stopped; back-pressure moves backward (stop) one station per cycle, so a
// line of N stations holds up to 2N tokens before its stop_in rises. Station 0
// is the one nearest the producer. INIT_VALID bit i starts station i holding
// one token of value INIT_DATA, which places the initial marking of a link.
// The series connection is what the latency-insensitive scheme prescribes;
// the parameters for the initial marking are this design's choice.
module rs_line #(
  parameter int unsigned  N          = 1,
  parameter int unsigned  W          = 16,
  parameter logic [N-1:0] INIT_VALID = '0,
  parameter logic [W-1:0] INIT_DATA  = '0
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

  logic         val  [N+1];
  logic [W-1:0] data [N+1];
  logic         stop [N+1];
  logic [N-1:0] err;

  assign val[0]  = val_in;
  assign data[0] = data_in;
  assign stop_in = stop[0];
  assign val_out  = val[N];
  assign data_out = data[N];
  assign stop[N]  = stop_out;
  assign error    = |err;

  for (genvar i = 0; i < N; i++) begin : g_rs
    relay_station #(
      .W(W), .INIT_VALID(INIT_VALID[i]), .INIT_DATA(INIT_DATA)
    ) u_rs (
      .clk, .rst_n,
      .val_in  (val[i]),   .data_in (data[i]),   .stop_in (stop[i]),
      .val_out (val[i+1]), .data_out(data[i+1]), .stop_out(stop[i+1]),
      .error   (err[i])
    );
  end

endmodule
