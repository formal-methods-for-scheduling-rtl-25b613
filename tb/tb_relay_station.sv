// Self-checking test of relay_station against a two-slot FIFO model.
//
// A random producer offers tokens whenever stop_in is low; a random consumer
// raises stop_out. The model keeps the tokens the station must hold and
// predicts, cycle by cycle, val_out (a token is held and no stop), data_out
// (the oldest token), and stop_in (two tokens held). A second station starts
// with an initial token and must offer it in the first cycle after reset.
module tb_relay_station;
  import lid_pkg::*;

  localparam int W = 16;
  localparam int CYCLES = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         val_in, stop_in, val_out, stop_out, error;
  logic [W-1:0] data_in, data_out;
  logic         i_stop_in, i_val_out, i_error;
  logic [W-1:0] i_data_out;

  relay_station #(.W(W)) dut (.*);

  relay_station #(.W(W), .INIT_VALID(1'b1), .INIT_DATA(16'hbeef)) dut_init (
    .clk, .rst_n, .val_in(1'b0), .data_in('0), .stop_in(i_stop_in),
    .val_out(i_val_out), .data_out(i_data_out), .stop_out(1'b0), .error(i_error)
  );

  logic [W-1:0] q[$];
  int n_full = 0, n_out = 0, next_val = 1;
  bit want_send;

  always @(posedge clk) begin
    want_send <= ($urandom_range(0, 9) < 7);
    stop_out  <= ($urandom_range(0, 9) < 4);
  end
  assign val_in  = rst_n && want_send && !stop_in;
  assign data_in = W'(next_val);

  always @(posedge clk) begin
    if (rst_n) begin
      checks += 3;
      if (val_out !== (q.size() > 0 && !stop_out)) begin
        failures++; $display("val_out %b, model holds %0d, stop_out %b", val_out, q.size(), stop_out);
      end
      if (stop_in !== (q.size() == 2)) begin
        failures++; $display("stop_in %b with %0d tokens held", stop_in, q.size());
      end
      if (error) begin failures++; $display("error state reached"); end
      if (val_out && q.size() > 0) begin
        checks++;
        if (data_out !== q[0]) begin
          failures++; $display("data_out %h expected %h", data_out, q[0]);
        end
      end
      if (q.size() == 2) n_full++;
      if (val_out && q.size() > 0) begin void'(q.pop_front()); n_out++; end
      if (val_in) begin q.push_back(data_in); next_val <= next_val + 1; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks += 2;
    if (!(i_val_out && i_data_out == 16'hbeef)) begin
      failures++; $display("initial token not offered at instant 0");
    end
    @(negedge clk);
    if (i_val_out || i_stop_in || i_error) begin
      failures++; $display("initial token offered twice");
    end
    repeat (CYCLES) @(posedge clk);
    checks += 2;
    if (n_full == 0) begin failures++; $display("station never became full"); end
    if (n_out < CYCLES / 3) begin failures++; $display("only %0d tokens passed", n_out); end
    $display("tokens passed %0d, cycles full %0d", n_out, n_full);
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
