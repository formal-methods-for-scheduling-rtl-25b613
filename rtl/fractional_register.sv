// Fractional register (FR): a one-slot register placed after the regular
// register of a statically scheduled link, which delays some tokens (not all)
// so that they reach the consumer exactly when its static schedule fires it.
//
// catch_q is the occupancy of the slot and simply follows hold. A token that
// arrives with hold low passes straight through; with hold high it is caught.
// A caught token leaves in the first cycle where hold falls, or, in a burst,
// in the cycle where the next token arrives and is caught in its place. The
// valid equation is
//   val_out = ((val_in ^ catch_q) & ~hold) | (val_in & catch_q & hold)
// and the data output is the slot when it is occupied, else data_in. These
// follow the fractional-register equations and datapath this design is built
// from; the data width and the reset (slot empty) are choices made here.
//
// Assertions check the two conditions a schedule must respect: hold only when
// there is something to hold, and an arriving token meeting an occupied slot
// must be held (else two tokens would leave at once).
module fractional_register #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         val_in,
  input  logic [W-1:0] data_in,
  input  logic         hold,
  output logic         val_out,
  output logic [W-1:0] data_out
);

  logic         catch_q;
  logic [W-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      catch_q <= 1'b0;
      data_q  <= '0;
    end else begin
      catch_q <= hold;
      if (val_in && hold) data_q <= data_in;
    end
  end

  assign val_out  = ((val_in ^ catch_q) && !hold) || (val_in && catch_q && hold);
  assign data_out = catch_q ? data_q : data_in;

  a_hold_needs_token : assert property (@(posedge clk) disable iff (!rst_n)
                                        hold |-> (val_in || catch_q));
  a_no_crossing      : assert property (@(posedge clk) disable iff (!rst_n)
                                        (val_in && catch_q) |-> hold);

endmodule
