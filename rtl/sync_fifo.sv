// sync_fifo: single-clock first-word-fall-through FIFO used as the flow
// controller's TX buffer and RX buffer.
//
// The storage is a plain register array (inferred as block or distributed
// RAM).  The head entry is visible on rd_data whenever rd_valid is high and
// is removed by rd_en.  A full FIFO accepts a write in a cycle in which its
// head is read.  Any other write into a full FIFO is ignored and flagged on
// `overflow` for one cycle; callers are expected never to do that.  Depth
// need not be a power of two.  Reset empties the FIFO; the array itself is
// not reset because an empty FIFO never presents an unwritten entry.
module sync_fifo #(
  parameter int unsigned WIDTH = 258,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  output logic [CW-1:0]    count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr    = wr_en && (!full || do_rd);
  assign do_rd    = rd_en && rd_valid;
  assign full     = (count == CW'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign overflow = wr_en && full && !do_rd;

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= ptr_inc(wr_ptr);
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
