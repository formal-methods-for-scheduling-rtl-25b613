// Three-node latency-insensitive example, built twice from the same
// specification: once with dynamic scheduling (relay stations and
// shell-wrappers) and once with a static periodic schedule (plain registers,
// schedule generators and fractional registers). The two halves stand side by
// side and share nothing but the clock and reset.
//
// The network: node A takes the external input and tokens from B and C and
// feeds B; B feeds A (left cycle) and C; C feeds A (right cycle) and the
// external output. Initially each of the links A->B, B->A, B->C and C->A
// holds one token (values INIT_AB, INIT_BA, INIT_BC, INIT_CA). The right
// cycle A->B->C->A holds 3 tokens over latency 5 and limits the throughput to
// 3/5; the left cycle A->B->A is faster.
//
// Dynamic half (dyn_*): link latencies A->B 1, B->A 1, B->C 1, C->A 3 relay
// stations, the C->A token in the station nearest C; the output link has one
// relay station. Each node is a shell-wrapper; the external input enters A's
// wrapper directly (dyn_in_stop is its back-pressure) and the output link
// obeys dyn_out_stop.
//
// Static half (st_*): the left link is equalized to latency 2 (its cycle rate
// 2/3 stays above 3/5), links are plain register lines, and the nodes fire on
// their ASAP periodic schedules
//   A 001101(01101)*, B 100110(10110)*, C 110011(01011)*.
// Only A, where the two cycles reconverge, sees tokens arrive before it can
// fire, so each of its two inner inputs has a fractional register driven by a
// hold generator; the C->A one is used in the initial phase only, the B->A
// one periodically. With OPT_INIT set, the start-up is tuned instead: the
// right link's token starts one stage nearer A, every schedule is periodic
// from the first cycle (A (01011)*, B (10101)*, C (11010)*) and the C->A
// fractional register is left out; only the B->A one remains. st_in_take marks the cycles where A consumes st_in_data;
// st_out_val/st_out_data is C's external output, registered.
//
// The pearls (the computation inside each node) are not part of this module:
// for every node and half, *_fire is its clock enable, *_in_* the values it
// consumes in that cycle, and *_out_* the values it must return in the same
// cycle (combinationally) for its output links. st_periodic is high once all three schedules
// have entered their stationary phase. st_error is raised (sticky)
// if a static node ever fires without its tokens or a token reaches a node
// that does not fire; dyn_error if a relay station reaches its error state.
//
// The graph, its latencies, tokens, equalization and schedules are those of
// the document's running example; data width, token values, the exact place
// of the initial tokens inside multi-stage links and the external interfaces
// are this design's choices. The tuned start-up follows the document's
// suggestion of advancing the right link's token by one step; its schedules
// were worked out for this design by simulating the network.
module lid_fig1_top #(
  parameter int unsigned  W       = 16,
  parameter logic [W-1:0] INIT_AB = W'(1),
  parameter logic [W-1:0] INIT_BA = W'(2),
  parameter logic [W-1:0] INIT_BC = W'(3),
  parameter logic [W-1:0] INIT_CA = W'(4),
  parameter bit           OPT_INIT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,

  // ---------------- dynamic half ----------------
  input  logic         dyn_in_val,
  input  logic [W-1:0] dyn_in_data,
  output logic         dyn_in_stop,
  output logic         dyn_out_val,
  output logic [W-1:0] dyn_out_data,
  input  logic         dyn_out_stop,
  output logic         dyn_a_fire,
  output logic [W-1:0] dyn_a_in_ext,
  output logic [W-1:0] dyn_a_in_ba,
  output logic [W-1:0] dyn_a_in_ca,
  input  logic [W-1:0] dyn_a_out_ab,
  output logic         dyn_b_fire,
  output logic [W-1:0] dyn_b_in_ab,
  input  logic [W-1:0] dyn_b_out_ba,
  input  logic [W-1:0] dyn_b_out_bc,
  output logic         dyn_c_fire,
  output logic [W-1:0] dyn_c_in_bc,
  input  logic [W-1:0] dyn_c_out_ca,
  input  logic [W-1:0] dyn_c_out_ext,
  output logic         dyn_error,

  // ---------------- static half ----------------
  output logic         st_in_take,
  input  logic [W-1:0] st_in_data,
  output logic         st_out_val,
  output logic [W-1:0] st_out_data,
  output logic         st_a_fire,
  output logic [W-1:0] st_a_in_ext,
  output logic [W-1:0] st_a_in_ba,
  output logic [W-1:0] st_a_in_ca,
  input  logic [W-1:0] st_a_out_ab,
  output logic         st_b_fire,
  output logic [W-1:0] st_b_in_ab,
  input  logic [W-1:0] st_b_out_ba,
  input  logic [W-1:0] st_b_out_bc,
  output logic         st_c_fire,
  output logic [W-1:0] st_c_in_bc,
  input  logic [W-1:0] st_c_out_ca,
  input  logic [W-1:0] st_c_out_ext,
  output logic         st_periodic,
  output logic         st_error
);

  // ======================= dynamic scheduling =======================

  logic [2:0]        a_val_in, a_stop_in;
  logic [2:0][W-1:0] a_data_in, a_pearl;
  logic [0:0]        a_val_out, a_stop_out;
  logic [0:0]        b_val_in, b_stop_in;
  logic [0:0][W-1:0] b_data_in, b_pearl;
  logic [1:0]        b_val_out, b_stop_out;
  logic [0:0]        c_val_in, c_stop_in;
  logic [0:0][W-1:0] c_data_in, c_pearl;
  logic [1:0]        c_val_out, c_stop_out;
  logic [4:0]        line_err;

  // Node A: inputs 0 = external, 1 = from B, 2 = from C; output 0 = to B.
  assign a_val_in[0]  = dyn_in_val;
  assign a_data_in[0] = dyn_in_data;
  assign dyn_in_stop  = a_stop_in[0];

  shell_wrapper #(.N_IN(3), .N_OUT(1), .W(W)) u_sw_a (
    .clk, .rst_n,
    .val_in(a_val_in), .data_in(a_data_in), .stop_in(a_stop_in),
    .pearl_data(a_pearl), .pearl_clock(dyn_a_fire),
    .val_out(a_val_out), .stop_out(a_stop_out)
  );
  assign dyn_a_in_ext = a_pearl[0];
  assign dyn_a_in_ba  = a_pearl[1];
  assign dyn_a_in_ca  = a_pearl[2];

  rs_line #(.N(1), .W(W), .INIT_VALID(1'b1), .INIT_DATA(INIT_AB)) u_dyn_ab (
    .clk, .rst_n,
    .val_in(a_val_out[0]), .data_in(dyn_a_out_ab), .stop_in(a_stop_out[0]),
    .val_out(b_val_in[0]), .data_out(b_data_in[0]), .stop_out(b_stop_in[0]),
    .error(line_err[0])
  );

  // Node B: input 0 = from A; outputs 0 = to A, 1 = to C.
  shell_wrapper #(.N_IN(1), .N_OUT(2), .W(W)) u_sw_b (
    .clk, .rst_n,
    .val_in(b_val_in), .data_in(b_data_in), .stop_in(b_stop_in),
    .pearl_data(b_pearl), .pearl_clock(dyn_b_fire),
    .val_out(b_val_out), .stop_out(b_stop_out)
  );
  assign dyn_b_in_ab = b_pearl[0];

  rs_line #(.N(1), .W(W), .INIT_VALID(1'b1), .INIT_DATA(INIT_BA)) u_dyn_ba (
    .clk, .rst_n,
    .val_in(b_val_out[0]), .data_in(dyn_b_out_ba), .stop_in(b_stop_out[0]),
    .val_out(a_val_in[1]), .data_out(a_data_in[1]), .stop_out(a_stop_in[1]),
    .error(line_err[1])
  );

  rs_line #(.N(1), .W(W), .INIT_VALID(1'b1), .INIT_DATA(INIT_BC)) u_dyn_bc (
    .clk, .rst_n,
    .val_in(b_val_out[1]), .data_in(dyn_b_out_bc), .stop_in(b_stop_out[1]),
    .val_out(c_val_in[0]), .data_out(c_data_in[0]), .stop_out(c_stop_in[0]),
    .error(line_err[2])
  );

  // Node C: input 0 = from B; outputs 0 = to A, 1 = external.
  shell_wrapper #(.N_IN(1), .N_OUT(2), .W(W)) u_sw_c (
    .clk, .rst_n,
    .val_in(c_val_in), .data_in(c_data_in), .stop_in(c_stop_in),
    .pearl_data(c_pearl), .pearl_clock(dyn_c_fire),
    .val_out(c_val_out), .stop_out(c_stop_out)
  );
  assign dyn_c_in_bc = c_pearl[0];

  rs_line #(.N(3), .W(W), .INIT_VALID(3'b001), .INIT_DATA(INIT_CA)) u_dyn_ca (
    .clk, .rst_n,
    .val_in(c_val_out[0]), .data_in(dyn_c_out_ca), .stop_in(c_stop_out[0]),
    .val_out(a_val_in[2]), .data_out(a_data_in[2]), .stop_out(a_stop_in[2]),
    .error(line_err[3])
  );

  rs_line #(.N(1), .W(W), .INIT_VALID(1'b0), .INIT_DATA('0)) u_dyn_out (
    .clk, .rst_n,
    .val_in(c_val_out[1]), .data_in(dyn_c_out_ext), .stop_in(c_stop_out[1]),
    .val_out(dyn_out_val), .data_out(dyn_out_data), .stop_out(dyn_out_stop),
    .error(line_err[4])
  );

  assign dyn_error = |line_err;

  // ======================= static scheduling =======================

  logic ab_val, ba_val, bc_val, ca_val;
  logic [W-1:0] ab_data, ba_data, bc_data, ca_data;
  logic ba_hold, ca_hold, ba_ovf, ca_ovf;
  logic ba_fr_val, ca_fr_val;
  logic st_err_q, st_err_now;
  logic a_periodic, b_periodic, c_periodic;

  if (OPT_INIT) begin : g_sched_opt
    // Start-up tuned: the periodic words, each with its first letter as prefix.
    schedule_gen #(.PREFIX_LEN(1), .PERIOD_LEN(5), .PREFIX(1'b0), .PERIOD(5'b10110))
      u_sched_a (.clk, .rst_n, .fire(st_a_fire), .periodic(a_periodic));
    schedule_gen #(.PREFIX_LEN(1), .PERIOD_LEN(5), .PREFIX(1'b1), .PERIOD(5'b01011))
      u_sched_b (.clk, .rst_n, .fire(st_b_fire), .periodic(b_periodic));
    schedule_gen #(.PREFIX_LEN(1), .PERIOD_LEN(5), .PREFIX(1'b1), .PERIOD(5'b10101))
      u_sched_c (.clk, .rst_n, .fire(st_c_fire), .periodic(c_periodic));
  end else begin : g_sched_asap
    schedule_gen #(.PREFIX_LEN(6), .PERIOD_LEN(5), .PREFIX(6'b001101), .PERIOD(5'b01101))
      u_sched_a (.clk, .rst_n, .fire(st_a_fire), .periodic(a_periodic));
    schedule_gen #(.PREFIX_LEN(6), .PERIOD_LEN(5), .PREFIX(6'b100110), .PERIOD(5'b10110))
      u_sched_b (.clk, .rst_n, .fire(st_b_fire), .periodic(b_periodic));
    schedule_gen #(.PREFIX_LEN(6), .PERIOD_LEN(5), .PREFIX(6'b110011), .PERIOD(5'b01011))
      u_sched_c (.clk, .rst_n, .fire(st_c_fire), .periodic(c_periodic));
  end

  static_link #(.N(1), .W(W), .INIT_VALID(1'b1), .INIT_DATA(INIT_AB)) u_st_ab (
    .clk, .rst_n, .val_in(st_a_fire), .data_in(st_a_out_ab),
    .val_out(ab_val), .data_out(ab_data)
  );
  // Left link, equalized from latency 1 to 2; its token starts next to B.
  static_link #(.N(2), .W(W), .INIT_VALID(2'b01), .INIT_DATA(INIT_BA)) u_st_ba (
    .clk, .rst_n, .val_in(st_b_fire), .data_in(st_b_out_ba),
    .val_out(ba_val), .data_out(ba_data)
  );
  static_link #(.N(1), .W(W), .INIT_VALID(1'b1), .INIT_DATA(INIT_BC)) u_st_bc (
    .clk, .rst_n, .val_in(st_b_fire), .data_in(st_b_out_bc),
    .val_out(bc_val), .data_out(bc_data)
  );
  // Right link: its token starts next to C, or one stage further on when the
  // start-up is tuned.
  static_link #(.N(3), .W(W), .INIT_VALID(OPT_INIT ? 3'b010 : 3'b001), .INIT_DATA(INIT_CA)) u_st_ca (
    .clk, .rst_n, .val_in(st_c_fire), .data_in(st_c_out_ca),
    .val_out(ca_val), .data_out(ca_data)
  );

  // Fractional registers at the entries of the reconvergent node A.
  hold_gen u_hold_ba (.clk, .rst_n, .current(ba_val), .next(st_a_fire),
                      .hold(ba_hold), .overflow(ba_ovf));
  fractional_register #(.W(W)) u_fr_ba (
    .clk, .rst_n, .val_in(ba_val), .data_in(ba_data), .hold(ba_hold),
    .val_out(ba_fr_val), .data_out(st_a_in_ba)
  );
  if (!OPT_INIT) begin : g_fr_ca
    hold_gen u_hold_ca (.clk, .rst_n, .current(ca_val), .next(st_a_fire),
                        .hold(ca_hold), .overflow(ca_ovf));
    fractional_register #(.W(W)) u_fr_ca (
      .clk, .rst_n, .val_in(ca_val), .data_in(ca_data), .hold(ca_hold),
      .val_out(ca_fr_val), .data_out(st_a_in_ca)
    );
  end else begin : g_no_fr_ca
    // The tuned start-up needs no fractional register on the right input.
    assign ca_hold     = 1'b0;
    assign ca_ovf      = 1'b0;
    assign ca_fr_val   = ca_val;
    assign st_a_in_ca  = ca_data;
  end

  assign st_in_take  = st_a_fire;
  assign st_a_in_ext = st_in_data;
  assign st_b_in_ab  = ab_data;
  assign st_c_in_bc  = bc_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_out_val  <= 1'b0;
      st_out_data <= '0;
    end else begin
      st_out_val  <= st_c_fire;
      if (st_c_fire) st_out_data <= st_c_out_ext;
    end
  end

  // Schedule consistency: a node fires exactly when its tokens are delivered.
  assign st_err_now = ba_ovf || ca_ovf
                   || (ba_fr_val != st_a_fire) || (ca_fr_val != st_a_fire)
                   || (ab_val != st_b_fire) || (bc_val != st_c_fire);

  always_ff @(posedge clk) begin
    if (!rst_n)          st_err_q <= 1'b0;
    else if (st_err_now) st_err_q <= 1'b1;
  end
  assign st_error = st_err_q;
  assign st_periodic = a_periodic && b_periodic && c_periodic;

  a_static_consistent : assert property (@(posedge clk) disable iff (!rst_n) !st_err_now);
  a_dynamic_no_error  : assert property (@(posedge clk) disable iff (!rst_n) !dyn_error);

endmodule
