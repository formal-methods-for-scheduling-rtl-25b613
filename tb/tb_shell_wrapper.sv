// Self-checking test of shell_wrapper with two inputs and two outputs.
//
// Random producers offer tokens on each input whenever its stop_in is low;
// random stop_out values are applied on the outputs. An independent model
// keeps, per input, whether a token is parked and its value, and predicts
// every cycle: the firing (each input has a token, parked or arriving, and no
// output stopped), val_out, stop_in (a token parked) and the values shown to
// the pearl (the parked one first). Tokens must be consumed in arrival order.
module tb_shell_wrapper;

  localparam int W = 16;
  localparam int NI = 2, NO = 2;
  localparam int CYCLES = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NI-1:0]        val_in, stop_in;
  logic [NI-1:0][W-1:0] data_in, pearl_data;
  logic                 pearl_clock;
  logic [NO-1:0]        val_out, stop_out;

  shell_wrapper #(.N_IN(NI), .N_OUT(NO), .W(W)) dut (.*);

  logic [NI-1:0]   want;
  int              next_val [NI];
  bit              parked   [NI];
  logic [W-1:0]    parked_v [NI];
  logic [W-1:0]    expect_next [NI];
  int n_fire = 0, n_park = 0, n_stall = 0;

  always @(posedge clk) begin
    for (int i = 0; i < NI; i++) want[i] <= ($urandom_range(0, 9) < 6);
    for (int j = 0; j < NO; j++) stop_out[j] <= ($urandom_range(0, 9) < 2);
  end
  for (genvar i = 0; i < NI; i++) begin : g_src
    assign val_in[i]  = rst_n && want[i] && !stop_in[i];
    assign data_in[i] = W'(next_val[i] + 1000 * i);
  end

  initial for (int i = 0; i < NI; i++) begin
    next_val[i] = 0; parked[i] = 0; parked_v[i] = '0; expect_next[i] = W'(1000 * i);
  end

  always @(posedge clk) begin
    if (rst_n) begin : model
      bit all_avail, fire_exp;
      logic [W-1:0] shown;
      all_avail = 1'b1;
      for (int i = 0; i < NI; i++) all_avail &= (parked[i] || val_in[i]);
      fire_exp = all_avail && (stop_out == '0);
      checks += 2;
      if (pearl_clock !== fire_exp) begin
        failures++; $display("pearl_clock %b expected %b", pearl_clock, fire_exp);
      end
      if (val_out !== {NO{fire_exp}}) begin failures++; $display("val_out %b", val_out); end
      if (all_avail && stop_out != '0) n_stall++;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (stop_in[i] !== parked[i]) begin
          failures++; $display("input %0d stop_in %b, parked %b", i, stop_in[i], parked[i]);
        end
        if (fire_exp) begin
          shown = parked[i] ? parked_v[i] : data_in[i];
          checks += 2;
          if (pearl_data[i] !== shown) begin
            failures++; $display("input %0d pearl_data %h expected %h", i, pearl_data[i], shown);
          end
          if (shown !== expect_next[i]) begin
            failures++; $display("input %0d consumed %h out of order", i, shown);
          end
          expect_next[i] = expect_next[i] + 1'b1;
          parked[i] = 1'b0;
        end else if (val_in[i]) begin
          parked[i] = 1'b1; parked_v[i] = data_in[i]; n_park++;
        end
        if (val_in[i]) next_val[i] <= next_val[i] + 1;
      end
      if (fire_exp) n_fire++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (CYCLES) @(posedge clk);
    checks += 3;
    if (n_fire < CYCLES / 4) begin failures++; $display("only %0d firings", n_fire); end
    if (n_park == 0)  begin failures++; $display("no token was ever parked"); end
    if (n_stall == 0) begin failures++; $display("no output stall happened"); end
    $display("firings %0d, parked %0d, stalls %0d", n_fire, n_park, n_stall);
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
