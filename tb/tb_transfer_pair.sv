// tb_transfer_pair: testbench helper that times one message transfer
// between two network nodes.  Node A's application sends one message of
// MSG_FLITS 256-bit flits (generated by tb_stream_source) to node B, whose
// application reads without backpressure (checked by tb_stream_sink).
// Node B sends no data, so its credits return in credit-only packets.
// The link in each direction is a link_model delay line of LAT network
// cycles.  Both nodes use TX buffer depth TX_DEPTH, which is also their
// packet size D_CU (the two are equal in the reference design).  The pair has its own application clock (APP_HALF_NS half
// period) and network clock (NET_HALF_NS).
//
// After `start` rises the pair releases reset, waits for the handshake,
// enables the source and reports: `t_ns`, the time from the first flit
// accepted at A's application port to the last flit read at B's; `flits`
// received; `errors` in data or framing; `done` when the whole message
// has arrived.
module tb_transfer_pair #(
  parameter bit          SWITCHED    = 1'b1,
  parameter int unsigned RX_DEPTH    = 2048,
  parameter int unsigned TX_DEPTH    = 32,
  parameter int unsigned LAT         = 126,
  parameter real         NET_HALF_NS = 3.226,
  parameter real         APP_HALF_NS = 2.2,
  parameter int unsigned MSG_FLITS   = 128,
  parameter int unsigned SEED        = 5
) (
  input  logic        start,
  output logic        done,
  output real         t_ns,
  output int unsigned flits,
  output int unsigned errors
);
  localparam int unsigned W = 256, EW = 5;

  logic app_clk = 0, net_clk = 0, rst_n = 0;
  always #(APP_HALF_NS) app_clk = ~app_clk;
  always #(NET_HALF_NS) net_clk = ~net_clk;

  logic         a_tx_v, a_tx_r, a_tx_s, a_tx_e, a_rx_v, a_rx_s, a_rx_e;
  logic [W-1:0] a_tx_d, a_rx_d;
  logic         b_tx_r, b_rx_v, b_rx_s, b_rx_e;
  logic [W-1:0] b_rx_d;
  logic          al_tv, al_tr, al_ts, al_te, al_rv, al_rs, al_re;
  logic [W-1:0]  al_td, al_rd;
  logic [EW-1:0] al_tm, al_rm;
  logic          bl_tv, bl_tr, bl_ts, bl_te, bl_rv, bl_rs, bl_re;
  logic [W-1:0]  bl_td, bl_rd;
  logic [EW-1:0] bl_tm, bl_rm;
  logic          a_up, b_up;

  fpga_network_node #(.SWITCHED(SWITCHED), .RX_DEPTH(RX_DEPTH), .TX_DEPTH(TX_DEPTH), .D_CU(TX_DEPTH)) u_a (
    .app_clk, .app_rst_n(rst_n),
    .app_tx_valid(a_tx_v), .app_tx_ready(a_tx_r), .app_tx_data(a_tx_d),
    .app_tx_sop(a_tx_s), .app_tx_eop(a_tx_e),
    .app_rx_valid(a_rx_v), .app_rx_ready(1'b1), .app_rx_data(a_rx_d),
    .app_rx_sop(a_rx_s), .app_rx_eop(a_rx_e),
    .net_clk, .net_rst_n(rst_n),
    .link_tx_valid(al_tv), .link_tx_ready(al_tr), .link_tx_data(al_td),
    .link_tx_sop(al_ts), .link_tx_eop(al_te), .link_tx_empty(al_tm),
    .link_rx_valid(al_rv), .link_rx_data(al_rd), .link_rx_sop(al_rs),
    .link_rx_eop(al_re), .link_rx_empty(al_rm),
    .link_up(a_up), .credits(), .rx_count(), .rx_overflow(), .frame_error(),
    .ev_full_packet(), .ev_eop_packet(), .ev_force_send(), .ev_credit_only_tx(),
    .ev_credit_only_rx(), .ev_credit_stall(), .ev_frame_rx(),
    .cnt_clear(1'b0), .cnt_total(), .cnt_stalls()
  );

  fpga_network_node #(.SWITCHED(SWITCHED), .RX_DEPTH(RX_DEPTH), .TX_DEPTH(TX_DEPTH), .D_CU(TX_DEPTH)) u_b (
    .app_clk, .app_rst_n(rst_n),
    .app_tx_valid(1'b0), .app_tx_ready(b_tx_r), .app_tx_data('0),
    .app_tx_sop(1'b0), .app_tx_eop(1'b0),
    .app_rx_valid(b_rx_v), .app_rx_ready(1'b1), .app_rx_data(b_rx_d),
    .app_rx_sop(b_rx_s), .app_rx_eop(b_rx_e),
    .net_clk, .net_rst_n(rst_n),
    .link_tx_valid(bl_tv), .link_tx_ready(bl_tr), .link_tx_data(bl_td),
    .link_tx_sop(bl_ts), .link_tx_eop(bl_te), .link_tx_empty(bl_tm),
    .link_rx_valid(bl_rv), .link_rx_data(bl_rd), .link_rx_sop(bl_rs),
    .link_rx_eop(bl_re), .link_rx_empty(bl_rm),
    .link_up(b_up), .credits(), .rx_count(), .rx_overflow(), .frame_error(),
    .ev_full_packet(), .ev_eop_packet(), .ev_force_send(), .ev_credit_only_tx(),
    .ev_credit_only_rx(), .ev_credit_stall(), .ev_frame_rx(),
    .cnt_clear(1'b0), .cnt_total(), .cnt_stalls()
  );

  link_model #(.W(W), .EW(EW), .LATENCY(LAT), .READY_PCT(100)) u_ab (
    .clk(net_clk), .rst_n,
    .in_valid(al_tv), .in_ready(al_tr), .in_data(al_td), .in_sop(al_ts),
    .in_eop(al_te), .in_empty(al_tm),
    .out_valid(bl_rv), .out_data(bl_rd), .out_sop(bl_rs), .out_eop(bl_re), .out_empty(bl_rm)
  );
  link_model #(.W(W), .EW(EW), .LATENCY(LAT), .READY_PCT(100)) u_ba (
    .clk(net_clk), .rst_n,
    .in_valid(bl_tv), .in_ready(bl_tr), .in_data(bl_td), .in_sop(bl_ts),
    .in_eop(bl_te), .in_empty(bl_tm),
    .out_valid(al_rv), .out_data(al_rd), .out_sop(al_rs), .out_eop(al_re), .out_empty(al_rm)
  );

  logic        en = 0;
  int unsigned s_msgs, s_flits, k_msgs, k_flits, k_err;
  tb_stream_source #(.W(W), .SEED(SEED), .NLONG(1), .LONGLEN(MSG_FLITS)) u_src (
    .clk(app_clk), .rst_n, .en, .rate_pct(100), .max_msgs(1),
    .valid(a_tx_v), .ready(a_tx_r), .data(a_tx_d), .sop(a_tx_s), .eop(a_tx_e),
    .msgs_sent(s_msgs), .flits_sent(s_flits));
  tb_stream_sink #(.W(W), .SEED(SEED), .NLONG(1), .LONGLEN(MSG_FLITS)) u_snk (
    .clk(app_clk), .rst_n, .valid(b_rx_v), .ready(1'b1), .data(b_rx_d),
    .sop(b_rx_s), .eop(b_rx_e), .msgs_rcvd(k_msgs), .flits_rcvd(k_flits), .errors(k_err));

  realtime t_first = 0, t_last = 0;
  bit      first_seen = 0;
  always @(posedge app_clk) if (rst_n) begin
    if (a_tx_v && a_tx_r && !first_seen) begin
      first_seen = 1;
      t_first    = $realtime;
    end
    if (b_rx_v) t_last = $realtime;
  end

  assign flits  = k_flits;
  assign errors = k_err;
  assign done   = (k_msgs == 1);
  assign t_ns   = t_last - t_first;

  initial begin
    wait (start);
    repeat (3) @(posedge net_clk);
    rst_n = 1;
    wait (a_up && b_up);
    repeat (20) @(posedge net_clk);
    @(negedge app_clk);
    en = 1;
  end

  logic unused_pair;
  assign unused_pair = ^{a_rx_v, a_rx_d, a_rx_s, a_rx_e, b_tx_r, s_msgs, s_flits};
endmodule
