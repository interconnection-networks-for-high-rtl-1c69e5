// dual_clock_fifo: FIFO between two unrelated clocks, used between the
// application (computing core) clock and the network clock of the link.
//
// Classic Gray-pointer design: each side keeps a binary pointer one bit
// wider than the address and publishes its Gray-coded copy; the other side
// brings it in through a two-flop synchroniser.  Full and empty are
// computed from the local pointer and the synchronised remote one, so they
// are conservative: the writer may see "full" and the reader "empty" for a
// few cycles longer than true, never the reverse.  The read side is
// first-word-fall-through (rd_valid/rd_ready), the write side valid/ready.
// DEPTH must be a power of two.  Each side has its own active-low reset;
// both should be applied together.
//
// The document names dual-clock FIFOs at the link ports without giving
// their depth or structure; depth and structure are this design's choices.
module dual_clock_fifo #(
  parameter int unsigned WIDTH = 258,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);

  if (DEPTH < 2 || (DEPTH & (DEPTH - 1)) != 0) begin : g_bad_depth
    $error("dual_clock_fifo DEPTH must be a power of two");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] wbin_n;
  logic        wr_fire;
  assign wr_fire  = wr_valid && wr_ready;
  assign wbin_n   = wbin + (AW+1)'(wr_fire);
  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_fire) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] rbin_n;
  logic        rd_fire;
  assign rd_valid = (rgray != wgray_r2);
  assign rd_fire  = rd_valid && rd_ready;
  assign rbin_n   = rbin + (AW+1)'(rd_fire);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
