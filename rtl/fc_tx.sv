// fc_tx: transmit half of the credit-based flow controller.
//
// Application flits enter a store-and-forward TX buffer.  A packet leaves
// as one control flit (header: length, SOP/EOP, credit-only flag, credit
// update) followed by `len` data flits.  A data packet is started when
//   * the buffer holds D_CU flits (a full packet), or
//   * the buffer holds the last flit of an application message (EOP), or
//   * flits have waited FORCE_SEND_CYCLES cycles without either happening
//     ("force send"),
// and only while the credit counter is above zero; a packet never holds
// more data flits than there are credits.  The credit counter starts at the peer's RX buffer depth, drops by one per
// data flit sent and grows by the credit updates the local receiver finds
// in the peer's headers; at zero the transmitter stops, which is how the
// peer's backpressure reaches this side.  Credits owed to the peer (reads
// of the local RX buffer) ride in the CU field of every header; when D_CU
// of them are owed and no data packet is due, a credit-only packet
// (len = 0, CO = 1) is sent instead.  While `sync_mode` is high the
// transmitter sends nothing but sync flits.
//
// Timing: the header is offered in the cycle the packet is decided and
// the data flits follow back to back, so a stream of full packets uses
// D_CU+1 link cycles per D_CU data flits (overhead 1/(1+D_CU)).
//
// ret_take_amt is ret_pending passed through: all owed credits are taken
// whenever a header leaves (ret_take_valid).
//
// Link side: valid/ready stream of whole flits; out_sop marks the header,
// out_eop the last flit of a packet, out_nflits (valid with out_sop) gives
// the packet length in flits for the frame encoder.
//
// Follows the protocol: header fields, store-and-forward TX buffer of depth
// D_CU, credit counter initialised to the RX buffer allocation, credit-only
// packets, force send.  This design's choices: a packet is cut short
// to the credits left, a packet ends at an application
// EOP, all owed credits are piggybacked on each header, the force-send
// period, and the header bit placement (see fc_pkg).
//
// Lint reports the reset as used both asynchronously and synchronously:
// the synchronous use is only the assertions' `disable iff`, which builds
// no hardware.
module fc_tx
  import fc_pkg::*;
#(
  parameter int unsigned W                 = 256,
  parameter int unsigned TX_DEPTH          = 32,
  parameter int unsigned D_CU              = 32,
  parameter int unsigned REMOTE_RX_DEPTH   = 2048,
  parameter int unsigned FORCE_SEND_CYCLES = 64,
  localparam int unsigned TCW = $clog2(TX_DEPTH + 1),
  localparam int unsigned CCW = $clog2(REMOTE_RX_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // application stream in
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [W-1:0]      in_data,
  input  logic              in_sop,
  input  logic              in_eop,
  // FC packet stream out
  output logic              out_valid,
  input  logic              out_ready,
  output logic [W-1:0]      out_data,
  output logic              out_sop,
  output logic              out_eop,
  output logic [LEN_W:0]    out_nflits,
  // connection handshake
  input  logic              sync_mode,
  input  logic              sync_ack,
  output logic              sync_sent,
  // credits received from the peer (decoded by the local receiver)
  input  logic              credit_add_valid,
  input  logic [CU_W-1:0]   credit_add,
  // credits owed to the peer (reads of the local RX buffer)
  input  logic [CU_W-1:0]   ret_pending,
  output logic              ret_take_valid,
  output logic [CU_W-1:0]   ret_take_amt,
  // status
  output logic [CCW-1:0]    credits,
  output logic              ev_full_packet,
  output logic              ev_eop_packet,
  output logic              ev_force_send,
  output logic              ev_credit_only,
  output logic              ev_credit_stall
);

  typedef enum logic [1:0] {ST_IDLE, ST_HDR, ST_DATA} st_t;
  st_t st;

  // ---------------- TX buffer ----------------
  logic [W+1:0] fifo_rd;
  logic         fifo_full, fifo_rd_valid, fifo_rd_en, fifo_ovf;
  logic [TCW-1:0] count;
  logic         data_pop;  // a data flit leaves the buffer this cycle
  logic         hold;      // an EOP flit is buffered: take no more flits
  logic         wr_fire;

  // a full buffer takes a flit in the cycle one leaves it, so a stream of
  // full packets loses only the header cycle
  assign in_ready = (!fifo_full || data_pop) && !hold;
  assign wr_fire  = in_valid && in_ready;

  sync_fifo #(.WIDTH(W + 2), .DEPTH(TX_DEPTH)) u_txbuf (
    .clk, .rst_n,
    .wr_en   (wr_fire),
    .wr_data ({in_sop, in_eop, in_data}),
    .full    (fifo_full),
    .rd_en   (fifo_rd_en),
    .rd_valid(fifo_rd_valid),
    .rd_data (fifo_rd),
    .count   (count),
    .overflow(fifo_ovf)
  );

  // ---------------- packet decision ----------------
  localparam int unsigned FTW = $clog2(FORCE_SEND_CYCLES + 1);
  logic [FTW-1:0] force_timer;
  logic [LEN_W-1:0] data_len;
  logic trig_full, trig_eop, trig_force, data_due, data_go, co_go;

  logic [LEN_W-1:0] avail_len;
  assign avail_len  = (count >= TCW'(D_CU)) ? LEN_W'(D_CU) : LEN_W'(count);
  assign data_len   = (CCW'(avail_len) > credits) ? LEN_W'(credits) : avail_len;
  assign trig_full  = (count >= TCW'(D_CU));
  assign trig_eop   = hold;
  assign trig_force = (count != '0) && (force_timer == FTW'(FORCE_SEND_CYCLES));
  assign data_due   = trig_full || trig_eop || trig_force;
  assign data_go    = (st == ST_IDLE) && !sync_mode && data_due && (credits != '0);
  assign co_go      = (st == ST_IDLE) && !sync_mode && !data_go &&
                      (ret_pending >= CU_W'(D_CU));

  fc_hdr_t hdr, hdr_new, hdr_out;
  logic [LEN_W-1:0] remaining;

  always_comb begin
    hdr_new.len = data_go ? data_len : '0;
    hdr_new.sop = data_go && fifo_rd[W+1];
    hdr_new.eop = data_go && hold && (TCW'(data_len) == count);
    hdr_new.co  = !data_go;
    hdr_new.res = 1'b0;
    hdr_new.cu  = ret_pending;
  end
  assign hdr_out = (st == ST_HDR) ? hdr : hdr_new;

  // ---------------- outputs ----------------
  logic [W-1:0] sync_flit, hdr_flit;
  always_comb begin
    sync_flit = '0;
    sync_flit[W-1 -: 32] = SYNC_MAGIC;
    sync_flit[0] = sync_ack;
    hdr_flit = '0;
    hdr_flit[HDR_W-1:0] = hdr_out;
  end

  always_comb begin
    out_valid  = 1'b0;
    out_data   = fifo_rd[W-1:0];
    out_sop    = 1'b0;
    out_eop    = 1'b0;
    out_nflits = '0;
    fifo_rd_en = 1'b0;
    unique case (st)
      ST_IDLE: if (sync_mode) begin
        out_valid  = 1'b1;
        out_data   = sync_flit;
        out_sop    = 1'b1;
        out_eop    = 1'b1;
        out_nflits = (LEN_W+1)'(1);
      end else if (data_go || co_go) begin
        out_valid  = 1'b1;
        out_data   = hdr_flit;
        out_sop    = 1'b1;
        out_eop    = (hdr_out.len == '0);
        out_nflits = {1'b0, hdr_out.len} + (LEN_W+1)'(1);
      end
      ST_HDR: begin
        out_valid  = 1'b1;
        out_data   = hdr_flit;
        out_sop    = 1'b1;
        out_eop    = (hdr_out.len == '0);
        out_nflits = {1'b0, hdr_out.len} + (LEN_W+1)'(1);
      end
      ST_DATA: begin
        out_valid  = fifo_rd_valid;
        out_eop    = (remaining == LEN_W'(1));
        fifo_rd_en = out_ready;
      end
      default: ;
    endcase
  end

  assign sync_sent      = (st == ST_IDLE) && sync_mode && out_ready;
  assign ret_take_valid = data_go || co_go;
  assign ret_take_amt   = ret_pending;

  assign data_pop = (st == ST_DATA) && out_ready && fifo_rd_valid;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_IDLE;
      hdr         <= '0;
      remaining   <= '0;
      hold        <= 1'b0;
      credits     <= CCW'(REMOTE_RX_DEPTH);
      force_timer <= '0;
    end else begin
      // credit counter
      credits <= credits + (credit_add_valid ? CCW'(credit_add) : '0)
                         - CCW'(data_pop);

      // hold after an EOP flit until the packet carrying it starts
      if (wr_fire && in_eop)
        hold <= 1'b1;
      else if (data_go && (TCW'(data_len) == count))
        hold <= 1'b0;

      // force-send timer: runs while flits wait and no packet is due
      if (st != ST_IDLE || count == '0 || data_go || trig_full || trig_eop)
        force_timer <= '0;
      else if (force_timer != FTW'(FORCE_SEND_CYCLES))
        force_timer <= force_timer + FTW'(1);

      unique case (st)
        ST_IDLE: if (data_go || co_go) begin
          // header leaves now if the link takes it, else it is held
          hdr       <= hdr_new;
          remaining <= hdr_new.len;
          if (!out_ready)               st <= ST_HDR;
          else if (hdr_new.len != '0)   st <= ST_DATA;
        end
        ST_HDR: if (out_ready) begin
          remaining <= hdr.len;
          st        <= (hdr.len == '0) ? ST_IDLE : ST_DATA;
        end
        ST_DATA: if (data_pop) begin
          remaining <= remaining - LEN_W'(1);
          if (remaining == LEN_W'(1)) st <= ST_IDLE;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  assign ev_full_packet  = data_go && trig_full;
  assign ev_eop_packet   = data_go && !trig_full && trig_eop;
  assign ev_force_send   = data_go && !trig_full && !trig_eop;
  assign ev_credit_only  = co_go;
  assign ev_credit_stall = (st == ST_IDLE) && !sync_mode && data_due && (credits == '0);

  // ---------------- protocol rules ----------------
  a_no_txbuf_overflow: assert property (@(posedge clk) disable iff (!rst_n) !fifo_ovf);
  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits <= CCW'(REMOTE_RX_DEPTH));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready && !sync_mode |=> out_valid);

endmodule
