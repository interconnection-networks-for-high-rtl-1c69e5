// cycle_counter: hardware cycle counter for measuring a stream transfer.
//
// While `run` is high it counts every cycle in `total` and every cycle in
// which the watched stream is stalled (`stall` high) in `stalls`.  `clear`
// zeroes both (it wins over run).  The utilisation ratio of a run is
// (total - stalls) / total, the quantity the performance model calls
// 1 - r_stall.  Counters saturate instead of wrapping.
//
// The document uses such counters to measure total and stall cycles; the
// width and the clear/run interface are this design's choices.
module cycle_counter #(
  parameter int unsigned CW = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          run,
  input  logic          stall,
  output logic [CW-1:0] total,
  output logic [CW-1:0] stalls
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total  <= '0;
      stalls <= '0;
    end else if (clear) begin
      total  <= '0;
      stalls <= '0;
    end else if (run) begin
      if (total != '1) total <= total + CW'(1);
      if (stall && stalls != '1) stalls <= stalls + CW'(1);
    end
  end

endmodule
