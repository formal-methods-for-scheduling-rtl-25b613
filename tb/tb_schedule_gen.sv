// Self-checking test of schedule_gen.
//
// Two generators: one with its default word 001101(01101)*, one with a
// one-letter prefix and a longer period, 1(0010011)*. The letters played each
// cycle after reset, and the periodic flag, are compared with the words
// written out as strings; the firing rate over whole periods is checked too.
module tb_schedule_gen;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic fire0, per0, fire1, per1;
  schedule_gen dut0 (.clk, .rst_n, .fire(fire0), .periodic(per0));
  schedule_gen #(.PREFIX_LEN(1), .PERIOD_LEN(7), .PREFIX(1'b1), .PERIOD(7'b0010011))
    dut1 (.clk, .rst_n, .fire(fire1), .periodic(per1));

  function automatic bit word(string pre, string per, int t);
    if (t < pre.len()) return pre[t] == "1";
    return per[(t - pre.len()) % per.len()] == "1";
  endfunction

  int t = 0, ones0 = 0, ones1 = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks += 4;
      if (fire0 !== word("001101", "01101", t)) begin failures++; $display("dut0 t=%0d fire %b", t, fire0); end
      if (per0 !== (t >= 6)) begin failures++; $display("dut0 t=%0d periodic %b", t, per0); end
      if (fire1 !== word("1", "0010011", t)) begin failures++; $display("dut1 t=%0d fire %b", t, fire1); end
      if (per1 !== (t >= 1)) begin failures++; $display("dut1 t=%0d periodic %b", t, per1); end
      if (t >= 6 && t < 6 + 500) ones0 += int'(fire0);
      if (t >= 1 && t < 1 + 700) ones1 += int'(fire1);
      t <= t + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (800) @(posedge clk);
    checks += 2;
    if (ones0 != 300) begin failures++; $display("dut0 rate %0d/500", ones0); end
    if (ones1 != 300) begin failures++; $display("dut1 rate %0d/700", ones1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
