// Equivalence of a relay station and a regular register followed by a
// fractional register.
//
// Both structures receive the same tokens and the same back-pressure, and
// their outputs (valid and value) are compared every cycle. For the register
// + fractional-register pair, hold is computed from the back-pressure:
//   hold = (stop_out & a token is present at or in the FR)
//        | (the FR is occupied & the register brings the next token)
// The second term shifts the register's token into the FR while the FR's
// token leaves, as the relay station does when it leaves state full. The
// equivalence holds under the stated assumption that back-pressure is never
// applied while both slots are occupied, so the consumer here never raises
// stop_out when the relay station is full. The producer obeys stop_in. The
// test checks that state full and the shift both occur.
module tb_rs_fr_equivalence;

  localparam int W = 16;
  localparam int CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         val_in, stop_in, rs_val, stop_out, rs_err;
  logic [W-1:0] data_in, rs_data;
  logic         reg_val, fr_val, hold;
  logic [W-1:0] reg_data, fr_data;

  relay_station #(.W(W)) u_rs (
    .clk, .rst_n, .val_in, .data_in, .stop_in,
    .val_out(rs_val), .data_out(rs_data), .stop_out, .error(rs_err)
  );

  static_link #(.N(1), .W(W)) u_reg (
    .clk, .rst_n, .val_in, .data_in, .val_out(reg_val), .data_out(reg_data)
  );
  fractional_register #(.W(W)) u_fr (
    .clk, .rst_n, .val_in(reg_val), .data_in(reg_data), .hold,
    .val_out(fr_val), .data_out(fr_data)
  );

  assign hold = (stop_out && (reg_val || u_fr.catch_q)) || (u_fr.catch_q && reg_val);

  bit send_r, stop_r;
  int next_val = 1, n_full = 0, n_shift = 0, n_out = 0;
  always @(posedge clk) begin
    send_r <= ($urandom_range(0, 9) < 7);
    stop_r <= ($urandom_range(0, 9) < 4);
  end
  assign val_in   = rst_n && send_r && !stop_in;
  assign data_in  = W'(next_val);
  assign stop_out = stop_r && !stop_in;

  always @(posedge clk) begin
    if (rst_n) begin
      if (val_in) next_val <= next_val + 1;
      checks++;
      if (fr_val !== rs_val) begin
        failures++; $display("valid differs: relay station %b, register+FR %b", rs_val, fr_val);
      end
      if (rs_val) begin
        checks++;
        n_out++;
        if (fr_data !== rs_data) begin
          failures++; $display("value differs: relay station %h, register+FR %h", rs_data, fr_data);
        end
      end
      if (rs_err) begin failures++; $display("relay station error"); end
      if (stop_in) n_full++;
      if (u_fr.catch_q && reg_val && !stop_out) n_shift++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (CYCLES) @(posedge clk);
    checks += 2;
    if (n_full == 0)  begin failures++; $display("relay station never full"); end
    if (n_shift == 0) begin failures++; $display("no shift from register into FR"); end
    $display("tokens %0d, full cycles %0d, shifts %0d", n_out, n_full, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
