// tb_fc_tx: unit test of the FC transmitter with small sizes (64-bit
// flits, TX buffer and credit interval 8, peer RX buffer 20 flits, force
// send after 16 cycles) and a link that accepts 70 % of the cycles.
// A monitor parses the packets leaving the transmitter, checks every data
// flit against the flits pushed in, checks each header's SOP/EOP against
// the flits it carries, and tracks the credit counter independently.
// Directed steps: sync flits with and without acknowledge; a full packet;
// a packet cut at EOP; a force send; a packet shortened to the credits
// left; a credit stall released by a credit update; a credit-only packet.
module tb_fc_tx;
  import fc_pkg::*;

  localparam int unsigned W = 64, D = 8, RRX = 20, FS = 16;

  int unsigned checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [W-1:0] in_data = '0;
  logic out_valid, out_ready, out_sop, out_eop;
  logic [W-1:0] out_data;
  logic [LEN_W:0] out_nflits;
  logic sync_mode = 1, sync_ack = 0, sync_sent;
  logic cr_v = 0;
  logic [CU_W-1:0] cr_amt = '0, ret_pending = '0, ret_amt;
  logic ret_take;
  logic [4:0] credits;
  logic ev_full, ev_eop, ev_force, ev_co, ev_stall;

  fc_tx #(.W(W), .TX_DEPTH(D), .D_CU(D), .REMOTE_RX_DEPTH(RRX), .FORCE_SEND_CYCLES(FS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sop, .in_eop,
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_nflits,
    .sync_mode, .sync_ack, .sync_sent,
    .credit_add_valid(cr_v), .credit_add(cr_amt),
    .ret_pending, .ret_take_valid(ret_take), .ret_take_amt(ret_amt),
    .credits, .ev_full_packet(ev_full), .ev_eop_packet(ev_eop),
    .ev_force_send(ev_force), .ev_credit_only(ev_co), .ev_credit_stall(ev_stall));

  always_ff @(posedge clk) out_ready <= ($urandom % 100) < 70;

  // ---------------- monitor ----------------
  logic [W+1:0] q[$];            // pushed flits {sop, eop, data}
  fc_hdr_t hdrs[$];              // headers seen
  int unsigned hdr_time[$];
  int unsigned remaining = 0, cyc = 0, idx = 0;
  fc_hdr_t cur;
  int model_cr = RRX;
  int unsigned n_stall = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_stall) n_stall++;
    if (in_valid && in_ready) q.push_back({in_sop, in_eop, in_data});
    if (ret_take) ret_pending <= ret_pending - ret_amt;
    if (cr_v) model_cr += cr_amt;
    if (!sync_mode && out_valid && out_ready) begin
      if (remaining == 0) begin
        check(out_sop, "header flit carries out_sop");
        cur = fc_hdr_t'(out_data[HDR_W-1:0]);
        check(out_data[W-1:HDR_W] == '0, "upper bits of a control flit are zero");
        check(out_nflits == (LEN_W+1)'(cur.len) + 1, "out_nflits = len + 1");
        check(int'(cur.len) <= model_cr, "packet length within credits");
        hdrs.push_back(cur);
        hdr_time.push_back(cyc);
        remaining = cur.len;
        idx = 0;
        check(out_eop == (cur.len == 0), "eop on a header only for len 0");
      end else begin
        logic [W+1:0] e;
        e = q.pop_front();
        check(out_data == e[W-1:0], "data flit in order");
        if (idx == 0) check(cur.sop == e[W+1], "header SOP = first flit's SOP");
        if (remaining == 1) check(cur.eop == e[W], "header EOP = last flit's EOP");
        check(out_eop == (remaining == 1), "out_eop on last data flit");
        model_cr -= 1;
        remaining--;
        idx++;
      end
    end
  end

  always @(negedge clk) if (rst_n)
    check(int'(credits) == model_cr, $sformatf("credit counter %0d, model %0d", credits, model_cr));

  task automatic push(input int unsigned n, input bit last_eop, input int unsigned base);
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = W'(base + i); in_sop = (i == 0); in_eop = last_eop && (i == n - 1);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
  endtask

  task automatic wait_hdrs(input int unsigned n);
    int unsigned t = 0;
    while (hdrs.size() < n && t < 500) begin @(posedge clk); t++; end
    check(hdrs.size() >= n, $sformatf("packet %0d sent", n));
  endtask

  initial begin : seq
    int unsigned t0, last_push;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // sync flits
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(out_valid && out_data[W-1 -: 32] == SYNC_MAGIC && !out_data[0], "sync flit, ack 0");
    check(sync_sent == out_ready, "sync_sent follows the link handshake");
    sync_ack = 1;
    @(negedge clk);
    check(out_valid && out_data[W-1 -: 32] == SYNC_MAGIC && out_data[0], "sync flit, ack 1");
    check(credits == 5'(RRX), "credits start at the peer's RX depth");
    @(posedge clk);
    sync_mode <= 0;

    // full packet
    push(D, 0, 100);
    wait_hdrs(1);
    check(hdrs[0].len == D && hdrs[0].sop && !hdrs[0].eop && !hdrs[0].co, "full packet header");

    // packet ending at EOP
    push(3, 1, 200);
    wait_hdrs(2);
    check(hdrs[1].len == 3 && hdrs[1].sop && hdrs[1].eop, "EOP packet header");

    // force send
    while (remaining != 0 || q.size() != 0) @(posedge clk);
    push(2, 0, 300);
    last_push = cyc;
    wait_hdrs(3);
    check(hdrs[2].len == 2 && !hdrs[2].eop, "force-send packet header");
    check(hdr_time[2] - last_push >= FS, $sformatf("force send after %0d cycles", hdr_time[2] - last_push));

    // credits: 20 - 13 = 7 left; 8 flits wait
    while (remaining != 0) @(posedge clk);
    push(D, 0, 400);
    wait_hdrs(4);
    check(hdrs[3].len == 7, $sformatf("packet shortened to the credits left (%0d)", hdrs[3].len));
    repeat (30) @(posedge clk);
    check(credits == 0 && n_stall > 0 && hdrs.size() == 4, "credit stall at zero credits");
    @(posedge clk);
    cr_v <= 1; cr_amt <= 12'd8;
    @(posedge clk);
    cr_v <= 0;
    wait_hdrs(5);
    check(hdrs[4].len == 1, "stall released by a credit update");

    // credit-only packet
    while (remaining != 0) @(posedge clk);
    ret_pending <= 12'd9;
    wait_hdrs(6);
    check(hdrs[5].len == 0 && hdrs[5].co && hdrs[5].cu == 12'd9, "credit-only packet carries the owed credits");
    repeat (3) @(posedge clk);
    check(ret_pending == 0, "owed credits taken");
    check(q.size() == 0, "every pushed flit sent");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
