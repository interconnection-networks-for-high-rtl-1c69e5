// fpga_network_node: the network modules of one FPGA link port, between the
// application (stream computing pipeline) and the L1/L2 IP core.
//
//   app clock                  |  network clock
//   app_tx -> [width conv] -> [dual-clock FIFO] -> FC TX -> [frame encoder] -> link_tx
//   app_rx <- [width conv] <- [dual-clock FIFO] <- FC RX <- [frame decoder] <- link_rx
//
// The width converters adapt the computing core's word (APP_W, n pipelines
// x 32 bytes) to the W-bit network flit; with APP_W = W they are a plain
// register stage.
//
// The flow controller (FC) provides a connection-oriented, lossless link
// with backpressure: after reset it runs a sync handshake with the peer,
// then sends the application stream in packets of up to D_CU data flits,
// each led by a control flit, and only as far as the credits returned by
// the peer's receive buffer allow.
//
// SWITCHED selects the link type.  SWITCHED=1 (default): the link port is
// an Ethernet MAC behind a switch, so every FC packet is wrapped in an
// Ethernet frame (frame_encoder/frame_decoder) and the port carries
// Avalon-ST-like frames with sop/eop/empty.  SWITCHED=0: a point-to-point
// serial link IP takes the FC flits directly (link_tx_empty is 0, the
// link_rx sop/eop/empty inputs are unused).  The receive buffer must be
// deeper for the switched link because its round trip is longer: 2048
// flits against 512 for the direct link.
//
// The L1/L2 IP core itself (MAC, PHY, transceivers) is outside this block:
// link_tx is its transmit stream (with ready), link_rx its receive stream
// (no backpressure).  Both link ports and the FC run on net_clk; the
// application streams on app_clk.
//
// Status outputs (net_clk domain): link_up, the credit counter, the RX
// buffer fill, an RX overflow flag (never set when the peer is a working
// FC), a frame error flag, one-cycle event pulses, and a cycle counter of
// the FC input (total cycles since link up, and cycles the FC refused a
// flit the application offered).
//
// Defaults follow the document's switched configuration: 256-bit flits,
// TX buffer and credit-update interval 32 flits, RX buffer 2048 flits,
// 1500-byte MTU, and a 32-byte application word (one unit pipeline).  The
// app-side FIFO depth, force-send period and MAC
// addresses are this design's choices.
//
// Lint reports net_rst_n as used both asynchronously and synchronously:
// the synchronous use is only the `disable iff` of the assertions inside
// the flow controller and encoder, which builds no hardware.
module fpga_network_node
  import fc_pkg::*;
#(
  parameter int unsigned W                 = 256,
  parameter int unsigned APP_W             = 256,
  parameter int unsigned TX_DEPTH          = 32,
  parameter int unsigned D_CU              = 32,
  parameter int unsigned RX_DEPTH          = 2048,
  parameter int unsigned REMOTE_RX_DEPTH   = RX_DEPTH,
  parameter int unsigned FORCE_SEND_CYCLES = 64,
  parameter bit          SWITCHED          = 1'b1,
  parameter int unsigned MTU               = 1500,
  parameter int unsigned APP_FIFO_DEPTH    = 16,
  parameter logic [47:0] SRC_MAC           = 48'h02_00_00_00_00_00,
  parameter logic [47:0] DST_MAC           = 48'h02_00_00_00_00_01,
  localparam int unsigned EW  = $clog2(W / 8),
  localparam int unsigned CCW = $clog2(REMOTE_RX_DEPTH + 1),
  localparam int unsigned RCW = $clog2(RX_DEPTH + 1)
) (
  // application side
  input  logic           app_clk,
  input  logic           app_rst_n,
  input  logic           app_tx_valid,
  output logic           app_tx_ready,
  input  logic [APP_W-1:0] app_tx_data,
  input  logic           app_tx_sop,
  input  logic           app_tx_eop,
  output logic           app_rx_valid,
  input  logic           app_rx_ready,
  output logic [APP_W-1:0] app_rx_data,
  output logic           app_rx_sop,
  output logic           app_rx_eop,
  // network side
  input  logic           net_clk,
  input  logic           net_rst_n,
  output logic           link_tx_valid,
  input  logic           link_tx_ready,
  output logic [W-1:0]   link_tx_data,
  output logic           link_tx_sop,
  output logic           link_tx_eop,
  output logic [EW-1:0]  link_tx_empty,
  input  logic           link_rx_valid,
  input  logic [W-1:0]   link_rx_data,
  input  logic           link_rx_sop,
  input  logic           link_rx_eop,
  input  logic [EW-1:0]  link_rx_empty,
  // status (net_clk)
  output logic           link_up,
  output logic [CCW-1:0] credits,
  output logic [RCW-1:0] rx_count,
  output logic           rx_overflow,
  output logic           frame_error,
  output logic           ev_full_packet,
  output logic           ev_eop_packet,
  output logic           ev_force_send,
  output logic           ev_credit_only_tx,
  output logic           ev_credit_only_rx,
  output logic           ev_credit_stall,
  output logic           ev_frame_rx,
  input  logic           cnt_clear,
  output logic [47:0]    cnt_total,
  output logic [47:0]    cnt_stalls
);

  // ---------------- application <-> network clock crossing ----------------
  logic         fc_in_valid, fc_in_ready, fc_in_sop, fc_in_eop;
  logic [W-1:0] fc_in_data;
  logic         fc_out_valid, fc_out_ready, fc_out_sop, fc_out_eop;
  logic [W-1:0] fc_out_data;

  logic         cv_tx_valid, cv_tx_ready, cv_tx_sop, cv_tx_eop;
  logic [W-1:0] cv_tx_data;
  logic         cv_rx_valid, cv_rx_ready, cv_rx_sop, cv_rx_eop;
  logic [W-1:0] cv_rx_data;

  width_conv #(.IN_W(APP_W), .OUT_W(W)) u_tx_conv (
    .clk(app_clk), .rst_n(app_rst_n),
    .in_valid(app_tx_valid), .in_ready(app_tx_ready), .in_data(app_tx_data),
    .in_sop(app_tx_sop), .in_eop(app_tx_eop),
    .out_valid(cv_tx_valid), .out_ready(cv_tx_ready), .out_data(cv_tx_data),
    .out_sop(cv_tx_sop), .out_eop(cv_tx_eop)
  );

  width_conv #(.IN_W(W), .OUT_W(APP_W)) u_rx_conv (
    .clk(app_clk), .rst_n(app_rst_n),
    .in_valid(cv_rx_valid), .in_ready(cv_rx_ready), .in_data(cv_rx_data),
    .in_sop(cv_rx_sop), .in_eop(cv_rx_eop),
    .out_valid(app_rx_valid), .out_ready(app_rx_ready), .out_data(app_rx_data),
    .out_sop(app_rx_sop), .out_eop(app_rx_eop)
  );

  dual_clock_fifo #(.WIDTH(W + 2), .DEPTH(APP_FIFO_DEPTH)) u_tx_cdc (
    .wr_clk(app_clk), .wr_rst_n(app_rst_n),
    .wr_valid(cv_tx_valid), .wr_ready(cv_tx_ready),
    .wr_data({cv_tx_sop, cv_tx_eop, cv_tx_data}),
    .rd_clk(net_clk), .rd_rst_n(net_rst_n),
    .rd_valid(fc_in_valid), .rd_ready(fc_in_ready),
    .rd_data({fc_in_sop, fc_in_eop, fc_in_data})
  );

  dual_clock_fifo #(.WIDTH(W + 2), .DEPTH(APP_FIFO_DEPTH)) u_rx_cdc (
    .wr_clk(net_clk), .wr_rst_n(net_rst_n),
    .wr_valid(fc_out_valid), .wr_ready(fc_out_ready),
    .wr_data({fc_out_sop, fc_out_eop, fc_out_data}),
    .rd_clk(app_clk), .rd_rst_n(app_rst_n),
    .rd_valid(cv_rx_valid), .rd_ready(cv_rx_ready),
    .rd_data({cv_rx_sop, cv_rx_eop, cv_rx_data})
  );

  // ---------------- flow controller ----------------
  logic           pk_valid, pk_ready, pk_sop, pk_eop;
  logic [W-1:0]   pk_data;
  logic [LEN_W:0] pk_nflits;
  logic           fl_valid;
  logic [W-1:0]   fl_data;

  flow_controller #(
    .W(W), .TX_DEPTH(TX_DEPTH), .D_CU(D_CU), .RX_DEPTH(RX_DEPTH),
    .REMOTE_RX_DEPTH(REMOTE_RX_DEPTH), .FORCE_SEND_CYCLES(FORCE_SEND_CYCLES)
  ) u_fc (
    .clk(net_clk), .rst_n(net_rst_n),
    .app_in_valid(fc_in_valid), .app_in_ready(fc_in_ready), .app_in_data(fc_in_data),
    .app_in_sop(fc_in_sop), .app_in_eop(fc_in_eop),
    .app_out_valid(fc_out_valid), .app_out_ready(fc_out_ready), .app_out_data(fc_out_data),
    .app_out_sop(fc_out_sop), .app_out_eop(fc_out_eop),
    .link_tx_valid(pk_valid), .link_tx_ready(pk_ready), .link_tx_data(pk_data),
    .link_tx_sop(pk_sop), .link_tx_eop(pk_eop), .link_tx_nflits(pk_nflits),
    .link_rx_valid(fl_valid), .link_rx_data(fl_data),
    .link_up(link_up), .credits(credits), .rx_count(rx_count), .rx_overflow(rx_overflow),
    .ev_full_packet(ev_full_packet), .ev_eop_packet(ev_eop_packet),
    .ev_force_send(ev_force_send), .ev_credit_only_tx(ev_credit_only_tx),
    .ev_credit_only_rx(ev_credit_only_rx), .ev_credit_stall(ev_credit_stall)
  );

  // ---------------- link adaptation ----------------
  if (SWITCHED) begin : g_eth
    frame_encoder #(.W(W), .MTU(MTU), .SRC_MAC(SRC_MAC), .DST_MAC(DST_MAC)) u_enc (
      .clk(net_clk), .rst_n(net_rst_n),
      .in_valid(pk_valid), .in_ready(pk_ready), .in_data(pk_data),
      .in_sop(pk_sop), .in_eop(pk_eop), .in_nflits(pk_nflits),
      .out_valid(link_tx_valid), .out_ready(link_tx_ready), .out_data(link_tx_data),
      .out_sop(link_tx_sop), .out_eop(link_tx_eop), .out_empty(link_tx_empty)
    );
    frame_decoder #(.W(W)) u_dec (
      .clk(net_clk), .rst_n(net_rst_n),
      .in_valid(link_rx_valid), .in_data(link_rx_data),
      .in_sop(link_rx_sop), .in_eop(link_rx_eop), .in_empty(link_rx_empty),
      .out_valid(fl_valid), .out_data(fl_data),
      .ev_frame(ev_frame_rx), .err_short(frame_error)
    );
  end else begin : g_direct
    assign link_tx_valid = pk_valid;
    assign pk_ready      = link_tx_ready;
    assign link_tx_data  = pk_data;
    assign link_tx_sop   = pk_sop;
    assign link_tx_eop   = pk_eop;
    assign link_tx_empty = '0;
    assign fl_valid      = link_rx_valid;
    assign fl_data       = link_rx_data;
    assign ev_frame_rx   = 1'b0;
    assign frame_error   = 1'b0;
    logic unused_direct;
    assign unused_direct = ^{pk_nflits, link_rx_sop, link_rx_eop, link_rx_empty};
  end

  // ---------------- cycle counters ----------------
  cycle_counter #(.CW(48)) u_cnt (
    .clk(net_clk), .rst_n(net_rst_n),
    .clear(cnt_clear), .run(link_up),
    .stall(fc_in_valid && !fc_in_ready),
    .total(cnt_total), .stalls(cnt_stalls)
  );

endmodule
