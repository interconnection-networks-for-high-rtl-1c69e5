// frame_encoder: wraps each flow-controller packet into an Ethernet frame
// for the MAC of a switched (Ethernet) link.
//
// The 14-byte data link header - destination MAC, source MAC and
// type/length - is put in front of the FC packet, which is carried
// unchanged as the frame payload.  The MAC IP core adds preamble and FCS
// itself.  Bytes are sent most significant first, so the header fills the
// top 14 bytes of the first output flit and every payload flit is split
// across two output flits: the encoder keeps the low 14 bytes of each
// input flit in a carry register and emits them at the top of the next
// output flit.  A packet of N flits therefore leaves as N+1 flits, the last
// one partly filled (out_empty counts its unused bytes).  A payload shorter
// than the 46-byte Ethernet minimum is padded with zeros; type/length holds
// the unpadded payload length in bytes.
//
// Timing: no pipeline register; the first output flit leaves in the same
// cycle as the first input flit, and the encoder takes one extra cycle per
// packet for the tail flit (in_ready is low then).  in_nflits, valid with
// in_sop, gives the packet length.
//
// Follows the description of the encoder (MAC addresses and T/L inserted,
// 1500-byte MTU as a parameter, a packet taken as one payload); the byte
// order, the padding and the streaming realignment are this design's
// choices.  Requires W >= 256 so that a one-flit packet needs one tail flit.
//
// Lint reports the reset as used both asynchronously and synchronously:
// the synchronous use is only the assertions' `disable iff`, which builds
// no hardware.
module frame_encoder
  import fc_pkg::*;
#(
  parameter int unsigned W          = 256,
  parameter int unsigned MTU        = 1500,
  parameter logic [47:0] SRC_MAC    = 48'h02_00_00_00_00_00,
  parameter logic [47:0] DST_MAC    = 48'h02_00_00_00_00_01,
  localparam int unsigned BPF = W / 8,
  localparam int unsigned HB  = ETH_HDR_BYTES * 8,
  localparam int unsigned EW  = $clog2(BPF)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   in_data,
  input  logic           in_sop,
  input  logic           in_eop,
  input  logic [LEN_W:0] in_nflits,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [W-1:0]   out_data,
  output logic           out_sop,
  output logic           out_eop,
  output logic [EW-1:0]  out_empty
);

  if (W < 256 || W % 8 != 0) begin : g_bad_width
    $error("frame_encoder needs a byte-multiple W of at least 256 bits");
  end

  typedef enum logic [1:0] {ST_FIRST, ST_MID, ST_TAIL} st_t;
  st_t st;

  logic [HB-1:0] carry;
  logic [EW-1:0] tail_empty;
  eth_hdr_t      hdr;

  // payload bytes of this packet and the bytes left for the tail flit
  logic [LEN_W+EW:0] pay_bytes, frame_bytes, tail_bytes;
  always_comb begin
    pay_bytes   = (LEN_W+EW+1)'(in_nflits) * (LEN_W+EW+1)'(BPF);
    frame_bytes = (LEN_W+EW+1)'(ETH_HDR_BYTES) +
                  ((pay_bytes < (LEN_W+EW+1)'(ETH_MIN_PAYLOAD)) ?
                   (LEN_W+EW+1)'(ETH_MIN_PAYLOAD) : pay_bytes);
    tail_bytes  = frame_bytes - pay_bytes;
    hdr.dst     = DST_MAC;
    hdr.src     = SRC_MAC;
    hdr.tl      = 16'(pay_bytes);
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_sop   = 1'b0;
    out_eop   = 1'b0;
    out_empty = '0;
    in_ready  = 1'b0;
    unique case (st)
      ST_FIRST: begin
        out_valid = in_valid;
        out_data  = {hdr, in_data[W-1:HB]};
        out_sop   = 1'b1;
        in_ready  = out_ready;
      end
      ST_MID: begin
        out_valid = in_valid;
        out_data  = {carry, in_data[W-1:HB]};
        in_ready  = out_ready;
      end
      ST_TAIL: begin
        out_valid = 1'b1;
        out_data  = {carry, {(W-HB){1'b0}}};
        out_eop   = 1'b1;
        out_empty = tail_empty;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= ST_FIRST;
      carry      <= '0;
      tail_empty <= '0;
    end else begin
      unique case (st)
        ST_FIRST: if (in_valid && out_ready) begin
          carry      <= in_data[HB-1:0];
          tail_empty <= EW'(BPF - int'(tail_bytes));
          st         <= in_eop ? ST_TAIL : ST_MID;
        end
        ST_MID: if (in_valid && out_ready) begin
          carry <= in_data[HB-1:0];
          if (in_eop) st <= ST_TAIL;
        end
        ST_TAIL: if (out_ready) st <= ST_FIRST;
        default: st <= ST_FIRST;
      endcase
    end
  end

  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
      st == ST_FIRST && in_valid |-> in_sop);
  a_mtu: assert property (@(posedge clk) disable iff (!rst_n)
      st == ST_FIRST && in_valid |-> pay_bytes <= (LEN_W+EW+1)'(MTU));

endmodule
