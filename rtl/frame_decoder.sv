// frame_decoder: takes Ethernet frames from the MAC of a switched link,
// strips the 14-byte data link header and any pad, and hands the FC packet
// flits to the flow controller.
//
// The inverse of frame_encoder: the type/length field (the unpadded payload
// length) says how many W-bit payload flits the frame holds.  Each output
// flit is the low W-112 bits kept from the previous input flit followed by
// the top 14 bytes of the current one.  Flits after the last payload flit
// (pad) are discarded up to the frame's EOP.  The MAC's receive side has no
// backpressure, so neither has this block: one output flit per input flit
// from the second flit of a frame on, one cycle after the MAC delivers it
// (combinational path, no register): the low 112 bits of out_data are
// wired straight from the top of in_data.
//
// `ev_frame` pulses per frame start, `err_short` latches if a frame ends
// before its type/length says; the flits of such a frame that arrived
// before its end have already been passed on (the MAC discards frames with
// a bad checksum, so a short frame means a broken link).  Destination addresses are not checked: the
// switch delivers only frames addressed to this port.  Follows the
// decoder's description (strip the header, pass the payload); the rest is
// this design's choice.  Requires W >= 256, like the encoder.
module frame_decoder
  import fc_pkg::*;
#(
  parameter int unsigned W = 256,
  localparam int unsigned BPF = W / 8,
  localparam int unsigned HB  = ETH_HDR_BYTES * 8,
  localparam int unsigned EW  = $clog2(BPF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  input  logic          in_sop,
  input  logic          in_eop,
  input  logic [EW-1:0] in_empty,
  output logic          out_valid,
  output logic [W-1:0]  out_data,
  output logic          ev_frame,
  output logic          err_short
);

  if (W < 256 || W % 8 != 0) begin : g_bad_width
    $error("frame_decoder needs a byte-multiple W of at least 256 bits");
  end

  typedef enum logic [1:0] {ST_IDLE, ST_BODY, ST_DROP} st_t;
  st_t st;

  logic [W-HB-1:0] carry;
  logic [15:0]     remaining;
  logic [15:0]     nflits_in;

  // type/length: the last two header bytes
  assign nflits_in = in_data[W-HB +: 16] / 16'(BPF);
  assign ev_frame  = in_valid && in_sop;

  assign out_valid = in_valid && !in_sop && (st == ST_BODY);
  assign out_data  = {carry, in_data[W-1 -: HB]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= ST_IDLE;
      carry     <= '0;
      remaining <= '0;
      err_short <= 1'b0;
    end else if (in_valid) begin
      if (in_sop) begin
        if (st == ST_BODY) err_short <= 1'b1;
        carry     <= in_data[W-HB-1:0];
        remaining <= nflits_in;
        st        <= (nflits_in == '0 || in_eop) ? ST_IDLE : ST_BODY;
      end else begin
        unique case (st)
          ST_BODY: begin
            carry     <= in_data[W-HB-1:0];
            remaining <= remaining - 16'd1;
            if (remaining == 16'd1) st <= in_eop ? ST_IDLE : ST_DROP;
            else if (in_eop) begin
              err_short <= 1'b1;
              st        <= ST_IDLE;
            end
          end
          ST_DROP: if (in_eop) st <= ST_IDLE;
          default: ;
        endcase
      end
    end
  end

  // in_empty only matters to byte-oriented consumers; the length field
  // already fixes how many whole flits the payload holds.
  logic unused_empty;
  assign unused_empty = ^in_empty;

endmodule
