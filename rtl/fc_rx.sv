// fc_rx: receive half of the credit-based flow controller.
//
// The link delivers one flit per valid cycle and cannot be stopped.  The
// receiver tells control flits from data flits by position: the flit after
// a packet's last data flit is always the next header.  A header's CU field
// goes to the local transmitter's credit counter (credit_add is wired
// straight from those input bits, valid with credit_add_valid); its
// length says how many
// data flits follow, and they are written into the RX buffer together with
// the SOP/EOP marks rebuilt from the header flags.  A sync flit in header
// position is reported to the connection handshake and otherwise dropped;
// before the connection is up everything else is dropped too.
//
// The application drains the RX buffer through a valid/ready port; every
// read frees one buffer slot and is owed back to the peer as a credit
// (ret_pending), which the local transmitter embeds in its next header.
// Because the peer only sends against credits, the RX buffer cannot
// overflow; if it ever does, the flit is dropped and `overflow` is latched.
//
// Follows the protocol: header fields, credit return per RX buffer read,
// RX buffer depth.  This design's choices: dropping before the connection
// is up, the sticky overflow flag, the SOP/EOP sideband on the output.
//
// Lint reports the reset as used both asynchronously and synchronously:
// the synchronous use is only the assertions' `disable iff`, which builds
// no hardware.
module fc_rx
  import fc_pkg::*;
#(
  parameter int unsigned W        = 256,
  parameter int unsigned RX_DEPTH = 2048,
  localparam int unsigned RCW = $clog2(RX_DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // flits from the link
  input  logic            in_valid,
  input  logic [W-1:0]    in_data,
  // connection handshake
  input  logic            link_up,
  output logic            sync_seen,
  output logic            sync_seen_ack,
  // credits from the peer's headers, to the local credit counter
  output logic            credit_add_valid,
  output logic [CU_W-1:0] credit_add,
  // application stream out
  output logic            out_valid,
  input  logic            out_ready,
  output logic [W-1:0]    out_data,
  output logic            out_sop,
  output logic            out_eop,
  // credits owed to the peer
  output logic [CU_W-1:0] ret_pending,
  input  logic            ret_take_valid,
  input  logic [CU_W-1:0] ret_take_amt,
  // status
  output logic [RCW-1:0]  rx_count,
  output logic            overflow,
  output logic            ev_header,
  output logic            ev_credit_only
);

  typedef enum logic {ST_HDR, ST_DATA} st_t;
  st_t st;

  fc_hdr_t          hdr_in;
  logic [LEN_W-1:0] remaining;
  logic             pkt_sop, pkt_eop, first;
  logic             is_sync;

  assign hdr_in  = fc_hdr_t'(in_data[HDR_W-1:0]);
  logic unused_res;              // reserved header bit, ignored
  assign unused_res = hdr_in.res;
  assign is_sync = (in_data[W-1 -: 32] == SYNC_MAGIC);

  assign sync_seen        = in_valid && (st == ST_HDR) && is_sync;
  assign sync_seen_ack    = sync_seen && in_data[0];
  assign ev_header        = in_valid && (st == ST_HDR) && !is_sync && link_up;
  assign ev_credit_only   = ev_header && hdr_in.co;
  assign credit_add_valid = ev_header;
  assign credit_add       = hdr_in.cu;

  // ---------------- RX buffer ----------------
  logic         push, unused_full, fifo_ovf, pop;
  logic [W+1:0] fifo_rd;
  assign push = in_valid && (st == ST_DATA);
  assign pop  = out_valid && out_ready;

  sync_fifo #(.WIDTH(W + 2), .DEPTH(RX_DEPTH)) u_rxbuf (
    .clk, .rst_n,
    .wr_en   (push),
    .wr_data ({first & pkt_sop, (remaining == LEN_W'(1)) & pkt_eop, in_data}),
    .full    (unused_full),   // credits keep the buffer from filling
    .rd_en   (out_ready),
    .rd_valid(out_valid),
    .rd_data (fifo_rd),
    .count   (rx_count),
    .overflow(fifo_ovf)
  );

  assign out_sop  = fifo_rd[W+1];
  assign out_eop  = fifo_rd[W];
  assign out_data = fifo_rd[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_HDR;
      remaining   <= '0;
      pkt_sop     <= 1'b0;
      pkt_eop     <= 1'b0;
      first       <= 1'b0;
      ret_pending <= '0;
      overflow    <= 1'b0;
    end else begin
      ret_pending <= ret_pending + CU_W'(pop)
                     - (ret_take_valid ? ret_take_amt : '0);
      if (fifo_ovf) overflow <= 1'b1;
      unique case (st)
        ST_HDR: if (ev_header && hdr_in.len != '0) begin
          remaining <= hdr_in.len;
          pkt_sop   <= hdr_in.sop;
          pkt_eop   <= hdr_in.eop;
          first     <= 1'b1;
          st        <= ST_DATA;
        end
        ST_DATA: if (in_valid) begin
          first     <= 1'b0;
          remaining <= remaining - LEN_W'(1);
          if (remaining == LEN_W'(1)) st <= ST_HDR;
        end
        default: st <= ST_HDR;
      endcase
    end
  end

  a_rxbuf_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !fifo_ovf);

endmodule
