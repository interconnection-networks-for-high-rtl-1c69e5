// flow_controller: the full-duplex credit-based flow controller (FC) of one
// link, a transmitter (fc_tx) and a receiver (fc_rx) plus the connection
// handshake that runs after reset.
//
// Handshake: after reset the FC sends nothing but sync flits.  Each sync
// flit carries an acknowledge bit that is set once a sync flit from the
// peer has been seen.  The connection is up (link_up) when this side has
// received a sync flit with the acknowledge set and has itself sent one;
// only then do packets flow.  Sync flits that still arrive afterwards are
// dropped by the receiver.  Both ends run the same logic, so either may
// leave reset first.
//
// The transmitter's credit counter is fed by the receiver (credits found in
// the peer's headers) and the receiver's count of RX buffer reads is fed
// back to the transmitter, which returns it to the peer in its headers or
// in credit-only packets.  Half-duplex use needs no setting: a side with
// nothing to send still returns credits in credit-only packets.
//
// Interfaces: application in/out streams (valid/ready, SOP/EOP), link
// out (valid/ready) and link in (valid only), all on one clock.  Follows
// the protocol description; the acknowledge bit of the sync flit is this
// design's own addition that makes the handshake safe when one side misses
// the other's first sync flits.
//
// Lint reports the reset as used both asynchronously and synchronously:
// the synchronous use is only the assertions' `disable iff`, which builds
// no hardware.
module flow_controller
  import fc_pkg::*;
#(
  parameter int unsigned W                 = 256,
  parameter int unsigned TX_DEPTH          = 32,
  parameter int unsigned D_CU              = 32,
  parameter int unsigned RX_DEPTH          = 2048,
  parameter int unsigned REMOTE_RX_DEPTH   = RX_DEPTH,
  parameter int unsigned FORCE_SEND_CYCLES = 64,
  localparam int unsigned CCW = $clog2(REMOTE_RX_DEPTH + 1),
  localparam int unsigned RCW = $clog2(RX_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // application -> FC
  input  logic           app_in_valid,
  output logic           app_in_ready,
  input  logic [W-1:0]   app_in_data,
  input  logic           app_in_sop,
  input  logic           app_in_eop,
  // FC -> application
  output logic           app_out_valid,
  input  logic           app_out_ready,
  output logic [W-1:0]   app_out_data,
  output logic           app_out_sop,
  output logic           app_out_eop,
  // FC -> link
  output logic           link_tx_valid,
  input  logic           link_tx_ready,
  output logic [W-1:0]   link_tx_data,
  output logic           link_tx_sop,
  output logic           link_tx_eop,
  output logic [LEN_W:0] link_tx_nflits,
  // link -> FC
  input  logic           link_rx_valid,
  input  logic [W-1:0]   link_rx_data,
  // status
  output logic           link_up,
  output logic [CCW-1:0] credits,
  output logic [RCW-1:0] rx_count,
  output logic           rx_overflow,
  output logic           ev_full_packet,
  output logic           ev_eop_packet,
  output logic           ev_force_send,
  output logic           ev_credit_only_tx,
  output logic           ev_credit_only_rx,
  output logic           ev_credit_stall
);

  logic seen_remote, got_ack, sent_ack;
  logic sync_sent, sync_seen, sync_seen_ack;
  logic cr_valid;
  logic [CU_W-1:0] cr_amt, ret_pending, ret_amt;
  logic ret_take;
  logic unused_ev_header;   // per-packet pulse, not needed here

  fc_tx #(
    .W(W), .TX_DEPTH(TX_DEPTH), .D_CU(D_CU),
    .REMOTE_RX_DEPTH(REMOTE_RX_DEPTH), .FORCE_SEND_CYCLES(FORCE_SEND_CYCLES)
  ) u_tx (
    .clk, .rst_n,
    .in_valid(app_in_valid), .in_ready(app_in_ready), .in_data(app_in_data),
    .in_sop(app_in_sop), .in_eop(app_in_eop),
    .out_valid(link_tx_valid), .out_ready(link_tx_ready), .out_data(link_tx_data),
    .out_sop(link_tx_sop), .out_eop(link_tx_eop), .out_nflits(link_tx_nflits),
    .sync_mode(!link_up), .sync_ack(seen_remote), .sync_sent(sync_sent),
    .credit_add_valid(cr_valid), .credit_add(cr_amt),
    .ret_pending(ret_pending), .ret_take_valid(ret_take), .ret_take_amt(ret_amt),
    .credits(credits),
    .ev_full_packet(ev_full_packet), .ev_eop_packet(ev_eop_packet),
    .ev_force_send(ev_force_send), .ev_credit_only(ev_credit_only_tx),
    .ev_credit_stall(ev_credit_stall)
  );

  fc_rx #(.W(W), .RX_DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n,
    .in_valid(link_rx_valid), .in_data(link_rx_data),
    .link_up(link_up), .sync_seen(sync_seen), .sync_seen_ack(sync_seen_ack),
    .credit_add_valid(cr_valid), .credit_add(cr_amt),
    .out_valid(app_out_valid), .out_ready(app_out_ready), .out_data(app_out_data),
    .out_sop(app_out_sop), .out_eop(app_out_eop),
    .ret_pending(ret_pending), .ret_take_valid(ret_take), .ret_take_amt(ret_amt),
    .rx_count(rx_count), .overflow(rx_overflow),
    .ev_header(unused_ev_header), .ev_credit_only(ev_credit_only_rx)
  );

  // connection handshake
  logic got_ack_n, sent_ack_n;
  assign got_ack_n  = got_ack || sync_seen_ack;
  assign sent_ack_n = sent_ack || (sync_sent && seen_remote);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_remote <= 1'b0;
      got_ack     <= 1'b0;
      sent_ack    <= 1'b0;
      link_up     <= 1'b0;
    end else begin
      if (sync_seen) seen_remote <= 1'b1;
      got_ack  <= got_ack_n;
      sent_ack <= sent_ack_n;
      link_up  <= got_ack_n && sent_ack_n;
    end
  end

  a_no_packets_before_up: assert property (@(posedge clk) disable iff (!rst_n)
      link_tx_valid && !link_up |-> link_tx_data[W-1 -: 32] == SYNC_MAGIC);

endmodule
