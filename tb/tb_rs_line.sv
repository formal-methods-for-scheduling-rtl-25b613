// Self-checking test of rs_line with three relay stations.
//
// 1. Latency: a single token through the empty line appears N cycles later.
// 2. Overflow: with stop_out held, a producer that sends whenever stop_in is
//    low gets exactly 2N tokens into the line before stop_in stays high.
// 3. Drain: after stop_out falls, the 2N tokens and the following ones leave
//    in order, one per cycle, with no gap.
// 4. Random traffic: values leave in order, none lost or duplicated, and the
//    property "stop_out low now implies stop_in low N cycles later" holds.
module tb_rs_line;

  localparam int W = 16;
  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         val_in, stop_in, val_out, stop_out, error;
  logic [W-1:0] data_in, data_out;

  rs_line #(.N(N), .W(W)) dut (.*);

  logic [W-1:0] sent[$];
  int  next_val = 1, n_recv = 0;
  bit  src_on = 1'b0, rnd_mode = 1'b0, src_rnd, stop_rnd, forced_stop = 1'b0;
  int  cycle = 0, accepted = 0, t_in = -1, t_out = -1;
  logic [N:0] stop_hist;

  always @(posedge clk) begin
    src_rnd  <= ($urandom_range(0, 9) < 6);
    stop_rnd <= ($urandom_range(0, 9) < 4);
  end
  assign val_in   = rst_n && src_on && !stop_in && (!rnd_mode || src_rnd);
  assign data_in  = W'(next_val);
  assign stop_out = forced_stop || (rnd_mode && stop_rnd);

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (val_in && t_in < 0) t_in <= cycle;
      if (val_out && t_out < 0) t_out <= cycle;
      if (val_in) begin sent.push_back(data_in); next_val <= next_val + 1; accepted++; end
      if (val_out) begin
        checks++;
        if (sent.size() == 0 || data_out !== sent[0]) begin
          failures++; $display("cycle %0d: data_out %h unexpected", cycle, data_out);
        end
        if (sent.size() > 0) void'(sent.pop_front());
        n_recv++;
      end
      if (error) begin failures++; $display("error flag"); end
      stop_hist <= {stop_hist[N-1:0], stop_out};
      if (rnd_mode && cycle > N + 20 && !stop_hist[N-1]) begin
        checks++;
        if (stop_in) begin
          failures++; $display("cycle %0d: stop_in although stop_out was low %0d cycles ago", cycle, N);
        end
      end
    end
  end

  initial begin : run
    int gaps;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // 1. latency of one token
    @(negedge clk); src_on = 1'b1;
    @(negedge clk); src_on = 1'b0;
    repeat (N + 2) @(negedge clk);
    checks++;
    if (t_out - t_in != N) begin failures++; $display("latency %0d, expected %0d", t_out - t_in, N); end
    repeat (5) @(negedge clk);
    // 2. overflow: stop held, producer greedy
    forced_stop = 1'b1; accepted = 0; src_on = 1'b1;
    repeat (4 * N + 5) @(negedge clk);
    checks += 2;
    if (accepted != 2 * N) begin failures++; $display("line absorbed %0d tokens, expected %0d", accepted, 2 * N); end
    if (!stop_in) begin failures++; $display("stop_in low on a full line"); end
    // 3. drain without gaps while the producer keeps sending
    forced_stop = 1'b0; gaps = 0;
    repeat (4 * N) begin
      @(negedge clk);
      if (!val_out) gaps++;
    end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d gaps while draining", gaps); end
    // 4. random traffic
    rnd_mode = 1'b1;
    repeat (3000) @(negedge clk);
    rnd_mode = 1'b0; src_on = 1'b0;
    repeat (4 * N) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d tokens lost", sent.size()); end
    $display("tokens received %0d", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
