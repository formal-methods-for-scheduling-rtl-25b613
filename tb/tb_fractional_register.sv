// Self-checking test of fractional_register.
//
// Tokens arrive at random. A consumer decides each cycle whether it fires,
// always consistently with a static schedule: it fires only if a token is
// there (waiting or arriving), and it must fire when a token waits and a new
// one arrives, because the register has one slot. The hold input is computed
// here from an occupancy count (hold = a token remains after this cycle). The
// register must then deliver a token exactly when the consumer fires, with
// the values in arrival order, covering pass-through, multi-cycle holds and
// bursts where a held token is chased out by the next one.
module tb_fractional_register;

  localparam int W = 16;
  localparam int CYCLES = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         val_in, hold, val_out;
  logic [W-1:0] data_in, data_out;

  fractional_register #(.W(W)) dut (.*);

  bit   arr_r, fire_r;
  int   waiting = 0, next_val = 1;
  logic [W-1:0] q[$];
  bit   fire;
  int   n_pass = 0, n_hold = 0, n_chase = 0;

  always @(posedge clk) begin
    arr_r  <= ($urandom_range(0, 9) < 5);
    fire_r <= ($urandom_range(0, 9) < 5);
  end
  assign val_in  = rst_n && arr_r;
  assign data_in = W'(next_val);
  always_comb begin
    if (waiting == 1 && val_in) fire = 1'b1;
    else                        fire = fire_r && (waiting == 1 || val_in);
  end
  assign hold = (waiting + int'(val_in) - int'(fire)) == 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (val_in) begin q.push_back(data_in); next_val <= next_val + 1; end
      checks++;
      if (val_out !== fire) begin
        failures++; $display("val_out %b, consumer fires %b", val_out, fire);
      end
      if (fire) begin
        checks++;
        if (data_out !== q[0]) begin failures++; $display("data_out %h expected %h", data_out, q[0]); end
        void'(q.pop_front());
        if (waiting == 0)  n_pass++;
        else if (val_in)   n_chase++;
      end
      if (hold) n_hold++;
      waiting <= waiting + int'(val_in) - int'(fire);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (CYCLES) @(posedge clk);
    checks += 3;
    if (n_pass == 0)  begin failures++; $display("no pass-through"); end
    if (n_hold == 0)  begin failures++; $display("no hold"); end
    if (n_chase == 0) begin failures++; $display("no chase"); end
    $display("pass %0d, hold cycles %0d, chase %0d", n_pass, n_hold, n_chase);
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
