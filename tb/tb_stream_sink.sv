// tb_stream_sink: testbench checker for the traffic of tb_stream_source
// with the same SEED and MAXLEN.  Takes flits while `ready` (driven by the
// testbench) is high and compares data, SOP and EOP with the recomputed
// sequence, counting flits, messages and mismatches.
module tb_stream_sink #(
  parameter int unsigned W      = 256,
  parameter int unsigned SEED   = 1,
  parameter int unsigned MAXLEN = 64,
  parameter int unsigned NLONG  = 0,
  parameter int unsigned LONGLEN = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         ready,
  input  logic [W-1:0] data,
  input  logic         sop,
  input  logic         eop,
  output int unsigned  msgs_rcvd,
  output int unsigned  flits_rcvd,
  output int unsigned  errors
);
  int unsigned idx;

  function automatic int unsigned hash32(input int unsigned x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    return x ^ (x >> 16);
  endfunction

  function automatic int unsigned msg_len(input int unsigned k);
    return (k < NLONG) ? LONGLEN : 1 + (hash32(SEED * 7919 + k) % MAXLEN);
  endfunction

  function automatic logic [W-1:0] flit(input int unsigned n);
    logic [W-1:0] f;
    for (int i = 0; i < W / 32; i++) f[i*32 +: 32] = hash32(SEED * 104729 + n * 16 + i);
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= 0;
      msgs_rcvd  <= 0;
      flits_rcvd <= 0;
      errors     <= 0;
    end else if (valid && ready) begin
      int unsigned len;
      logic bad;
      len = msg_len(msgs_rcvd);
      bad = (data != flit(flits_rcvd)) || (sop != (idx == 0)) || (eop != (idx == len - 1));
      if (bad) begin
        errors <= errors + 1;
        if (errors < 5)
          $display("  sink seed %0d: mismatch at flit %0d (msg %0d idx %0d)",
                   SEED, flits_rcvd, msgs_rcvd, idx);
      end
      flits_rcvd <= flits_rcvd + 1;
      if (idx == len - 1) begin
        idx       <= 0;
        msgs_rcvd <= msgs_rcvd + 1;
      end else begin
        idx <= idx + 1;
      end
    end
  end
endmodule
