// End-to-end test of the three-node example with the tuned static start-up
// (OPT_INIT set); otherwise identical to the default end-to-end test.
//
// Each node's computation is a small arithmetic model with internal state
// (updated only when the node fires, as a patient block must be). A
// token-level reference (unbounded FIFOs, fire any ready node) computes the
// output stream that any correct scheduling must produce; the dynamic and the
// static halves are both compared against it, value by value.
//
// With OPT set (a copy of this test), the static half uses the tuned start-up,
// whose schedules are periodic from the first cycle and which needs no
// fractional register on the right input.
//
// Phase 1 runs with an always-ready environment and checks throughput: the
// output node of both halves must fire 3 times in every 5 cycles in the
// stationary phase, and the static output must follow C's schedule
// 110011(01011)* delayed by one register. Phase 2 lets the environment of the
// dynamic half withhold input and assert output back-pressure at random, which
// forces relay stations to fill their second slot and wrappers to park tokens.
// Every mechanism (relay station full, wrapper parking, wrapper stall,
// fractional-register hold and chase, periodic phase) is counted and must occur.
module tb_lid_fig1_opt_init;
  import lid_pkg::*;

  localparam int W        = 16;
  localparam int N_OUTS   = 150;
  localparam int PHASE1   = 120;
  localparam int WATCHDOG = 20000;
  // OPT selects the tuned start-up of the static half (OPT_INIT of the top).
  localparam bit OPT      = 1'b1;
  localparam string C_PRE = OPT ? "1" : "110011";
  localparam string C_PER = OPT ? "10101" : "01011";

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- pearl models ----------------
  function automatic logic [W-1:0] fa(logic [W-1:0] ext, logic [W-1:0] ba,
                                      logic [W-1:0] ca, logic [W-1:0] st);
    return W'(ext * 16'd3) + ba + (ca << 1) + st;
  endfunction
  function automatic logic [W-1:0] fb_ba(logic [W-1:0] x);  return W'(x ^ 16'h5a5a); endfunction
  function automatic logic [W-1:0] fb_bc(logic [W-1:0] x);  return W'(x + 7);         endfunction
  function automatic logic [W-1:0] fc_ca(logic [W-1:0] x);  return W'(x * 5 + 1);     endfunction
  function automatic logic [W-1:0] fc_out(logic [W-1:0] x, logic [W-1:0] st);
    return W'(x ^ st);
  endfunction
  function automatic logic [W-1:0] ext_val(int i); return W'(i * 7 + 1); endfunction

  // ---------------- DUT ----------------
  logic         dyn_in_val, dyn_in_stop, dyn_out_val, dyn_out_stop, dyn_error;
  logic [W-1:0] dyn_in_data, dyn_out_data;
  logic         dyn_a_fire, dyn_b_fire, dyn_c_fire;
  logic [W-1:0] dyn_a_in_ext, dyn_a_in_ba, dyn_a_in_ca, dyn_a_out_ab;
  logic [W-1:0] dyn_b_in_ab, dyn_b_out_ba, dyn_b_out_bc;
  logic [W-1:0] dyn_c_in_bc, dyn_c_out_ca, dyn_c_out_ext;
  logic         st_in_take, st_out_val, st_a_fire, st_b_fire, st_c_fire, st_periodic, st_error;
  logic [W-1:0] st_in_data, st_out_data;
  logic [W-1:0] st_a_in_ext, st_a_in_ba, st_a_in_ca, st_a_out_ab;
  logic [W-1:0] st_b_in_ab, st_b_out_ba, st_b_out_bc;
  logic [W-1:0] st_c_in_bc, st_c_out_ca, st_c_out_ext;

  lid_fig1_top #(.OPT_INIT(1'b1)) dut (.*);

  // Pearl states, one set per half.
  logic [W-1:0] dyn_sa, dyn_sc, st_sa, st_sc;
  assign dyn_a_out_ab  = fa(dyn_a_in_ext, dyn_a_in_ba, dyn_a_in_ca, dyn_sa);
  assign dyn_b_out_ba  = fb_ba(dyn_b_in_ab);
  assign dyn_b_out_bc  = fb_bc(dyn_b_in_ab);
  assign dyn_c_out_ca  = fc_ca(dyn_c_in_bc);
  assign dyn_c_out_ext = fc_out(dyn_c_in_bc, dyn_sc);
  assign st_a_out_ab   = fa(st_a_in_ext, st_a_in_ba, st_a_in_ca, st_sa);
  assign st_b_out_ba   = fb_ba(st_b_in_ab);
  assign st_b_out_bc   = fb_bc(st_b_in_ab);
  assign st_c_out_ca   = fc_ca(st_c_in_bc);
  assign st_c_out_ext  = fc_out(st_c_in_bc, st_sc);

  always @(posedge clk) begin
    if (!rst_n) begin
      dyn_sa <= '0; dyn_sc <= 16'h1111; st_sa <= '0; st_sc <= 16'h1111;
    end else begin
      if (dyn_a_fire) dyn_sa <= dyn_sa + 1'b1;
      if (dyn_c_fire) dyn_sc <= dyn_sc + 16'd3;
      if (st_a_fire)  st_sa  <= st_sa + 1'b1;
      if (st_c_fire)  st_sc  <= st_sc + 16'd3;
    end
  end

  // ---------------- token-level reference ----------------
  logic [W-1:0] ref_out[$];
  initial begin : reference
    logic [W-1:0] q_ab[$], q_ba[$], q_bc[$], q_ca[$];
    logic [W-1:0] sa, sc, x, y, z;
    int ext_i;
    q_ab.push_back(W'(1)); q_ba.push_back(W'(2));
    q_bc.push_back(W'(3)); q_ca.push_back(W'(4));
    sa = '0; sc = 16'h1111; ext_i = 0;
    while (ref_out.size() < N_OUTS + 20) begin
      if (q_bc.size() > 0) begin
        x = q_bc.pop_front();
        q_ca.push_back(fc_ca(x));
        ref_out.push_back(fc_out(x, sc));
        sc = sc + 16'd3;
      end
      if (q_ab.size() > 0) begin
        x = q_ab.pop_front();
        q_ba.push_back(fb_ba(x));
        q_bc.push_back(fb_bc(x));
      end
      if (q_ba.size() > 0 && q_ca.size() > 0) begin
        y = q_ba.pop_front(); z = q_ca.pop_front();
        q_ab.push_back(fa(ext_val(ext_i), y, z, sa));
        ext_i++; sa = sa + 1'b1;
      end
    end
  end

  // ---------------- environments ----------------
  int  dyn_ext_i = 0, st_ext_i = 0;
  int  cycle = 0;
  bit  phase2 = 1'b0;
  bit  src_idle;

  assign dyn_in_data = ext_val(dyn_ext_i);
  assign st_in_data  = ext_val(st_ext_i);

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (dyn_in_val && !dyn_in_stop) dyn_ext_i <= dyn_ext_i + 1;
      if (st_in_take) st_ext_i <= st_ext_i + 1;
    end
  end

  // Random withholding of input and back-pressure on output in phase 2.
  always @(posedge clk) begin
    src_idle     <= phase2 && ($urandom_range(0, 3) == 0);
    dyn_out_stop <= phase2 && ($urandom_range(0, 2) == 0);
  end
  assign dyn_in_val = !dyn_in_stop && !src_idle;

  // ---------------- output checking ----------------
  int dyn_n = 0, st_n = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dyn_out_val && !dyn_out_stop) begin
        checks++;
        if (dyn_out_data !== ref_out[dyn_n]) begin
          failures++;
          $display("dynamic output %0d: got %h expected %h", dyn_n, dyn_out_data, ref_out[dyn_n]);
        end
        dyn_n <= dyn_n + 1;
      end
      if (st_out_val) begin
        checks++;
        if (st_out_data !== ref_out[st_n]) begin
          failures++;
          $display("static output %0d: got %h expected %h", st_n, st_out_data, ref_out[st_n]);
        end
        st_n <= st_n + 1;
      end
      if (dyn_error || st_error) begin
        failures++;
        $display("error flag at cycle %0d: dyn=%b st=%b", cycle, dyn_error, st_error);
      end
    end
  end

  // Static output pattern: C's schedule 110011(01011)* one cycle late.
  function automatic bit c_sched(int t);
    if (t < C_PRE.len()) return C_PRE[t] == "1";
    return C_PER[(t - C_PRE.len()) % C_PER.len()] == "1";
  endfunction
  always @(posedge clk) begin
    if (rst_n && cycle >= 1 && cycle < PHASE1) begin
      checks++;
      if (st_out_val !== c_sched(cycle - 1)) begin
        failures++;
        $display("static output valid at cycle %0d is %b", cycle, st_out_val);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_rs_full = 0, n_sw_park = 0, n_sw_stall = 0, n_fr_hold = 0, n_fr_chase = 0;
  int n_fr_ca_hold = 0, n_periodic = 0, n_in_stop = 0;
  int dyn_c_win = 0, st_c_win = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_dyn_out.g_rs[0].u_rs.state_q == RS_FULL ||
          dut.u_dyn_ca.g_rs[2].u_rs.state_q == RS_FULL ||
          dut.u_dyn_ab.g_rs[0].u_rs.state_q == RS_FULL) n_rs_full++;
      if (|dut.u_sw_a.stop_in || |dut.u_sw_b.stop_in || |dut.u_sw_c.stop_in) n_sw_park++;
      if (dut.u_sw_c.all_val_in && dut.u_sw_c.any_stop_out) n_sw_stall++;
      if (dut.ba_hold || dut.ca_hold) n_fr_hold++;
      if (dut.ca_hold) n_fr_ca_hold++;
      if (dut.ba_val && dut.u_fr_ba.catch_q && dut.ba_hold) n_fr_chase++;
      if (st_periodic) n_periodic++;
      if (dyn_in_stop) n_in_stop++;
      if (cycle >= 50 && cycle < 100) begin
        if (dyn_c_fire) dyn_c_win++;
        if (st_c_fire)  st_c_win++;
      end
      // The C->A fractional register is needed in the initial phase only.
      if (st_periodic && dut.ca_hold) begin
        failures++;
        $display("C->A fractional register used in the stationary phase at cycle %0d", cycle);
      end
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-34s %0d cycles", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (cycle == PHASE1);
    // Throughput 3/5 in the stationary phase, for both halves.
    checks += 2;
    if (dyn_c_win != 30) begin failures++; $display("dynamic C fired %0d/50", dyn_c_win); end
    if (st_c_win  != 30) begin failures++; $display("static C fired %0d/50",  st_c_win);  end
    phase2 = 1'b1;
    wait (dyn_n >= N_OUTS && st_n >= N_OUTS);
    @(posedge clk);
    $display("outputs compared: dynamic %0d, static %0d", dyn_n, st_n);
    expect_seen("relay station full", n_rs_full);
    expect_seen("wrapper input parked (stop_in)", n_sw_park);
    expect_seen("wrapper stalled by stop_out", n_sw_stall);
    expect_seen("external input back-pressured", n_in_stop);
    expect_seen("fractional register hold", n_fr_hold);
    // A held token is chased out by the next one only in the ASAP start-up.
    if (!OPT) expect_seen("fractional register chase", n_fr_chase);
    if (!OPT) expect_seen("initial-phase C->A hold", n_fr_ca_hold);
    else begin
      checks++;
      if (n_fr_ca_hold != 0) begin failures++; $display("C->A hold with tuned start-up"); end
    end
    expect_seen("stationary phase", n_periodic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
