// One input channel of a shell-wrapper.
//
// The channel has a token for the pearl (tok_avail) when one arrives this
// cycle (val_in) or one was parked earlier (ff_q). A token that arrives while
// the pearl does not fire is parked: its presence bit goes to ff_q and its
// value to data_q. The parked bit clears when the pearl fires (clock), which
// consumes the token. stop_in is the parked bit itself, so an upstream relay
// station is told not to send while a token waits here; it stays high in the
// cycle of consumption too, which keeps stop_in a registered signal and
// avoids a combinational loop. pearl_data presents the parked value if there
// is one, else the arriving value. This follows the shell-wrapper input
// module; the data register enable (arrival without firing) is this design's
// reading of it.
module sw_input #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         val_in,
  input  logic [W-1:0] data_in,
  input  logic         clock,
  output logic         tok_avail,
  output logic         stop_in,
  output logic [W-1:0] pearl_data
);

  logic         ff_q;
  logic [W-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff_q   <= 1'b0;
      data_q <= '0;
    end else begin
      ff_q <= (val_in || ff_q) && !clock;
      if (val_in && !clock) data_q <= data_in;
    end
  end

  assign tok_avail  = val_in || ff_q;
  assign stop_in    = ff_q;
  assign pearl_data = ff_q ? data_q : data_in;

  // A parked token must not be overwritten: upstream obeys stop_in.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n)
                                    !(ff_q && val_in));

endmodule
