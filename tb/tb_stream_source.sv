// tb_stream_source: testbench traffic generator.  Emits a deterministic
// sequence of messages (SOP on the first flit, EOP on the last) whose
// lengths (the first NLONG messages LONGLEN flits, the
// rest 1..MAXLEN) and flit contents are functions of SEED, so that tb_stream_sink
// can recompute and check them.  A flit is offered with probability
// rate_pct/100 per cycle and then held until accepted.
module tb_stream_source #(
  parameter int unsigned W      = 256,
  parameter int unsigned SEED   = 1,
  parameter int unsigned MAXLEN = 64,
  parameter int unsigned NLONG  = 0,
  parameter int unsigned LONGLEN = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  int unsigned  rate_pct,
  input  int unsigned  max_msgs,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] data,
  output logic         sop,
  output logic         eop,
  output int unsigned  msgs_sent,
  output int unsigned  flits_sent
);
  int unsigned idx, len;

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

  assign len  = msg_len(msgs_sent);
  assign data = flit(flits_sent);
  assign sop  = (idx == 0);
  assign eop  = (idx == len - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= 1'b0;
      idx        <= 0;
      msgs_sent  <= 0;
      flits_sent <= 0;
    end else begin
      logic fired;
      fired = valid && ready;
      if (fired) begin
        flits_sent <= flits_sent + 1;
        if (eop) begin
          idx       <= 0;
          msgs_sent <= msgs_sent + 1;
        end else begin
          idx <= idx + 1;
        end
      end
      if (!valid || fired)
        valid <= en && ((msgs_sent + ((fired && eop) ? 1 : 0)) < max_msgs) &&
                 (($urandom % 100) < rate_pct);
    end
  end
endmodule
