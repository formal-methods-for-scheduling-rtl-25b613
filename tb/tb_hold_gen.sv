// Self-checking test of hold_gen.
//
// Part 1 drives the generator with the entry arrivals and the firing schedule
// of the three-node example's reconvergent node for its left input link:
// arrivals 0110011010110101101011... (source schedule 100110(10110)* delayed
// by the two-stage link, plus the initial token) against the target schedule
// 001101(01101)*. The expected hold is worked out from the counting rule:
// hold(n) = 1 when tokens arrived up to n exceed tokens consumed up to n.
// Part 2 drives random consistent traffic and compares with a counter model;
// it also checks that a firing with no token present is ignored and that
// overflow never rises.
module tb_hold_gen;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic current, next, hold, overflow;
  hold_gen dut (.*);

  function automatic bit word(string pre, string per, int t);
    if (t < pre.len()) return pre[t] == "1";
    return per[(t - pre.len()) % per.len()] == "1";
  endfunction

  int cnt = 0;   // tokens waiting, model
  bit cur_r, fire_r, random_mode = 1'b0;
  int t = 0, n_hold = 0, n_idle_fire = 0;
  bit src_b [0:99];

  // Left-link arrivals: the initial token reaches the entry at instant 1, the
  // token B produces at instant k reaches it at instant k+2.
  initial for (int k = 0; k < 100; k++) src_b[k] = word("100110", "10110", k);
  function automatic bit left_arrival(int n);
    if (n == 1) return 1'b1;
    if (n >= 2) return src_b[n - 2];
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    cur_r  <= ($urandom_range(0, 9) < 5);
    fire_r <= ($urandom_range(0, 9) < 5);
  end

  always_comb begin
    if (!random_mode) begin
      current = left_arrival(t);
      next    = word("001101", "01101", t);
    end else begin
      current = cur_r;
      next    = (cnt == 1 && cur_r) ? 1'b1 : fire_r;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin : model
      int c;
      c = cnt + int'(current);
      if (next && c > 0) c--;
      else if (next) n_idle_fire++;
      checks += 2;
      if (hold !== (c == 1)) begin
        failures++; $display("t=%0d mode=%0b hold %b, model waiting %0d", t, random_mode, hold, c);
      end
      if (overflow) begin failures++; $display("overflow at t=%0d", t); end
      if (hold) n_hold++;
      cnt <= c;
      t <= t + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (100) @(posedge clk);
    random_mode = 1'b1;
    repeat (3000) @(posedge clk);
    checks += 2;
    if (n_hold == 0)      begin failures++; $display("hold never raised"); end
    if (n_idle_fire == 0) begin failures++; $display("no firing without token tested"); end
    $display("hold cycles %0d, firings without token %0d", n_hold, n_idle_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
