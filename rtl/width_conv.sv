// width_conv: data-width converter between a computing core's stream and a
// link's stream (valid/ready on both sides).
//
// With n parallel unit pipelines the core reads or writes n x 32 bytes per
// cycle, while a network port moves W = 256 bits per cycle; this block turns
// one width into the other.  IN_W and OUT_W must be integer multiples of one
// another (R = ratio).
//   * Narrowing (IN_W > OUT_W): an input word is taken into a holding
//     register and sent out as R slices, least significant slice first;
//     the next input word is accepted in the cycle the last slice leaves,
//     so a continuous stream keeps the output busy every cycle.
//   * Widening (IN_W < OUT_W): R input words are packed, first word in the
//     least significant slice, and the output word is offered once all R
//     are in; it is accepted while the first word of the next group
//     arrives, so neither side loses a cycle.  A message that ends (eop)
//     inside a group closes the group early; its unused upper slices are
//     zero.
// Message framing travels with the data: sop marks the first and eop the
// last output word of a message.
//   * Equal widths: a one-word register stage.
// Latency is one cycle from the last needed input word to the output.
//
// The document names these converters and the widths they sit between
// (32-byte pipeline words, 256-bit network datapath); the slice order and
// the handshake are this design's choices.
module width_conv #(
  parameter int unsigned IN_W  = 512,
  parameter int unsigned OUT_W = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  input  logic             in_sop,
  input  logic             in_eop,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data,
  output logic             out_sop,
  output logic             out_eop
);

  if ((IN_W % OUT_W != 0) && (OUT_W % IN_W != 0)) begin : g_bad_ratio
    $error("width_conv: IN_W and OUT_W must divide one another");
  end

  if (IN_W >= OUT_W) begin : g_narrow
    localparam int unsigned R  = IN_W / OUT_W;
    localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;

    logic [IN_W-1:0] hold;
    logic            hold_sop, hold_eop;
    logic            full;
    logic [RW-1:0]   idx;
    logic            last;

    assign last      = (idx == RW'(R - 1));
    assign out_valid = full;
    assign out_data  = hold[idx*OUT_W +: OUT_W];
    assign out_sop   = hold_sop && (idx == '0);
    assign out_eop   = hold_eop && last;
    assign in_ready  = !full || (out_ready && last);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold     <= '0;
        hold_sop <= 1'b0;
        hold_eop <= 1'b0;
        full     <= 1'b0;
        idx      <= '0;
      end else begin
        if (full && out_ready) idx <= last ? '0 : idx + RW'(1);
        if (in_valid && in_ready) begin
          hold     <= in_data;
          hold_sop <= in_sop;
          hold_eop <= in_eop;
          full     <= 1'b1;
        end else if (full && out_ready && last) begin
          full <= 1'b0;
        end
      end
    end
  end else begin : g_widen
    localparam int unsigned R  = OUT_W / IN_W;
    localparam int unsigned RW = $clog2(R);

    logic [OUT_W-1:0] acc;
    logic [RW-1:0]    idx;
    logic             full, acc_sop, acc_eop;
    logic             close;

    assign out_valid = full;
    assign out_data  = acc;
    assign out_sop   = acc_sop;
    assign out_eop   = acc_eop;
    assign close     = (idx == RW'(R - 1)) || in_eop;
    // a new group may start while the finished one is being taken
    assign in_ready  = !full || out_ready;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc     <= '0;
        idx     <= '0;
        full    <= 1'b0;
        acc_sop <= 1'b0;
        acc_eop <= 1'b0;
      end else begin
        if (full && out_ready) full <= 1'b0;
        if (in_valid && in_ready) begin
          if (idx == '0) begin
            // first word of a group clears the slices above it
            acc     <= OUT_W'(in_data);
            acc_sop <= in_sop;
          end else begin
            acc[idx*IN_W +: IN_W] <= in_data;
          end
          acc_eop <= in_eop;
          idx     <= close ? '0 : idx + RW'(1);
          if (close) full <= 1'b1;
        end
      end
    end
  end

endmodule
