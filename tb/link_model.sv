// link_model: behavioural stand-in for the L1/L2 IP cores at both ends of
// a link and the cable or switch between them: a fixed delay of LATENCY
// cycles from the transmit stream of one node to the receive stream of the
// other.  The transmit side accepts a flit with probability READY_PCT/100
// per cycle (the MAC's own backpressure); the receive side cannot be
// stopped.  Not synthesizable logic of the design; testbench use only.
module link_model #(
  parameter int unsigned W         = 256,
  parameter int unsigned EW        = 5,
  parameter int unsigned LATENCY   = 82,
  parameter int unsigned READY_PCT = 100
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  input  logic          in_sop,
  input  logic          in_eop,
  input  logic [EW-1:0] in_empty,
  output logic          out_valid,
  output logic [W-1:0]  out_data,
  output logic          out_sop,
  output logic          out_eop,
  output logic [EW-1:0] out_empty
);
  typedef struct packed {
    logic          v;
    logic [W-1:0]  d;
    logic          s, e;
    logic [EW-1:0] m;
  } beat_t;

  beat_t line [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) line[i] <= '0;
      in_ready <= 1'b0;
    end else begin
      line[0] <= '{v: in_valid && in_ready, d: in_data, s: in_sop, e: in_eop, m: in_empty};
      for (int i = 1; i < LATENCY; i++) line[i] <= line[i-1];
      in_ready <= ($urandom % 100) < READY_PCT;
    end
  end

  assign out_valid = line[LATENCY-1].v;
  assign out_data  = line[LATENCY-1].d;
  assign out_sop   = line[LATENCY-1].s;
  assign out_eop   = line[LATENCY-1].e;
  assign out_empty = line[LATENCY-1].m;
endmodule
