// Statically scheduled link: a line of N plain registers that carries a
// token (valid bit plus value) one stage per cycle, with no back-pressure.
//
// In a statically scheduled design the firing instants are known in advance,
// so a link no longer needs relay stations: every token simply advances one
// register per cycle and appears at the output N cycles after it entered.
// Where the consumer does not fire on arrival, a fractional register placed
// after the link keeps the token. INIT_VALID bit i starts stage i (stage 0
// nearest the producer) with a token of value INIT_DATA. The register line is
// what the static scheme prescribes; the parameters are this design's.
module static_link #(
  parameter int unsigned  N          = 1,
  parameter int unsigned  W          = 16,
  parameter logic [N-1:0] INIT_VALID = '0,
  parameter logic [W-1:0] INIT_DATA  = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         val_in,
  input  logic [W-1:0] data_in,
  output logic         val_out,
  output logic [W-1:0] data_out
);

  logic [N-1:0]        val_q;
  logic [N-1:0][W-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q <= INIT_VALID;
      for (int i = 0; i < N; i++) data_q[i] <= INIT_VALID[i] ? INIT_DATA : '0;
    end else begin
      val_q[0]  <= val_in;
      data_q[0] <= data_in;
      for (int i = 1; i < N; i++) begin
        val_q[i]  <= val_q[i-1];
        data_q[i] <= data_q[i-1];
      end
    end
  end

  assign val_out  = val_q[N-1];
  assign data_out = data_q[N-1];

endmodule
