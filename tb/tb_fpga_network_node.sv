// tb_fpga_network_node: end-to-end test of two network nodes (node A and
// node B) at the default parameters - switched Ethernet framing, 256-bit
// flits, TX buffer / credit interval 32, RX buffer 2048 - joined by a
// delay-line model of MAC + switch + MAC in each direction.
//
// Application clock 4.4 ns, network clock 6.4 ns.  Phases:
//   1. staggered resets; both sides must finish the sync handshake;
//   2. four 1024-flit messages each way (full duplex); the delivered rate
//      is checked against the packet overhead: 32 data flits per 34
//      Ethernet flits (one control flit, one frame tail flit);
//   3. random messages both ways;
//   4. half duplex A->B: B must return credits in credit-only packets;
//   5. backpressure: B's application stops reading; A must run out of
//      credits and stop, B's RX buffer must not overflow; then B reads
//      every other cycle, then freely;
//   6. slow trickle A->B: packets must leave by force send.
// Every flit is checked for content and SOP/EOP; at the end the credit
// counters must be back within one credit interval of full.
module tb_fpga_network_node;
  import fc_pkg::*;

  localparam int unsigned W        = 256;
  localparam int unsigned EW       = 5;
  localparam int unsigned RX_DEPTH = 2048;
  localparam int unsigned D_CU     = 32;
  localparam int unsigned LAT      = 203;   // one-way link + switch, cycles
  localparam real         EXP_EFF  = 32.0 / 34.0;
  localparam int unsigned NLONG    = 4;

  int unsigned checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic app_clk = 0, net_clk = 0;
  always #2.2 app_clk = ~app_clk;
  always #3.2 net_clk = ~net_clk;

  logic rst_a = 0, rst_b = 0;   // active-low, both domains of a node

  // ---------------- node A / node B ----------------
  logic         a_tx_v, a_tx_r, a_tx_s, a_tx_e, a_rx_v, a_rx_r, a_rx_s, a_rx_e;
  logic [W-1:0] a_tx_d, a_rx_d;
  logic         b_tx_v, b_tx_r, b_tx_s, b_tx_e, b_rx_v, b_rx_r, b_rx_s, b_rx_e;
  logic [W-1:0] b_tx_d, b_rx_d;

  logic          al_tv, al_tr, al_ts, al_te, al_rv, al_rs, al_re;
  logic [W-1:0]  al_td, al_rd;
  logic [EW-1:0] al_tm, al_rm;
  logic          bl_tv, bl_tr, bl_ts, bl_te, bl_rv, bl_rs, bl_re;
  logic [W-1:0]  bl_td, bl_rd;
  logic [EW-1:0] bl_tm, bl_rm;

  logic a_up, b_up, a_ovf, b_ovf, a_ferr, b_ferr;
  logic [11:0] a_cr, b_cr, a_rxc, b_rxc;
  logic a_evf, a_eve, a_evfs, a_evcot, a_evcor, a_evst, a_evfr;
  logic b_evf, b_eve, b_evfs, b_evcot, b_evcor, b_evst, b_evfr;
  logic [47:0] a_tot, a_stl, b_tot, b_stl;
  logic cnt_clear = 0;

  fpga_network_node u_a (
    .app_clk, .app_rst_n(rst_a),
    .app_tx_valid(a_tx_v), .app_tx_ready(a_tx_r), .app_tx_data(a_tx_d),
    .app_tx_sop(a_tx_s), .app_tx_eop(a_tx_e),
    .app_rx_valid(a_rx_v), .app_rx_ready(a_rx_r), .app_rx_data(a_rx_d),
    .app_rx_sop(a_rx_s), .app_rx_eop(a_rx_e),
    .net_clk, .net_rst_n(rst_a),
    .link_tx_valid(al_tv), .link_tx_ready(al_tr), .link_tx_data(al_td),
    .link_tx_sop(al_ts), .link_tx_eop(al_te), .link_tx_empty(al_tm),
    .link_rx_valid(al_rv), .link_rx_data(al_rd), .link_rx_sop(al_rs),
    .link_rx_eop(al_re), .link_rx_empty(al_rm),
    .link_up(a_up), .credits(a_cr), .rx_count(a_rxc), .rx_overflow(a_ovf),
    .frame_error(a_ferr), .ev_full_packet(a_evf), .ev_eop_packet(a_eve),
    .ev_force_send(a_evfs), .ev_credit_only_tx(a_evcot), .ev_credit_only_rx(a_evcor),
    .ev_credit_stall(a_evst), .ev_frame_rx(a_evfr),
    .cnt_clear, .cnt_total(a_tot), .cnt_stalls(a_stl)
  );

  fpga_network_node u_b (
    .app_clk, .app_rst_n(rst_b),
    .app_tx_valid(b_tx_v), .app_tx_ready(b_tx_r), .app_tx_data(b_tx_d),
    .app_tx_sop(b_tx_s), .app_tx_eop(b_tx_e),
    .app_rx_valid(b_rx_v), .app_rx_ready(b_rx_r), .app_rx_data(b_rx_d),
    .app_rx_sop(b_rx_s), .app_rx_eop(b_rx_e),
    .net_clk, .net_rst_n(rst_b),
    .link_tx_valid(bl_tv), .link_tx_ready(bl_tr), .link_tx_data(bl_td),
    .link_tx_sop(bl_ts), .link_tx_eop(bl_te), .link_tx_empty(bl_tm),
    .link_rx_valid(bl_rv), .link_rx_data(bl_rd), .link_rx_sop(bl_rs),
    .link_rx_eop(bl_re), .link_rx_empty(bl_rm),
    .link_up(b_up), .credits(b_cr), .rx_count(b_rxc), .rx_overflow(b_ovf),
    .frame_error(b_ferr), .ev_full_packet(b_evf), .ev_eop_packet(b_eve),
    .ev_force_send(b_evfs), .ev_credit_only_tx(b_evcot), .ev_credit_only_rx(b_evcor),
    .ev_credit_stall(b_evst), .ev_frame_rx(b_evfr),
    .cnt_clear, .cnt_total(b_tot), .cnt_stalls(b_stl)
  );

  // A -> B always ready (throughput phase), B -> A with MAC backpressure
  link_model #(.W(W), .EW(EW), .LATENCY(LAT), .READY_PCT(100)) u_ab (
    .clk(net_clk), .rst_n(rst_a && rst_b),
    .in_valid(al_tv), .in_ready(al_tr), .in_data(al_td), .in_sop(al_ts),
    .in_eop(al_te), .in_empty(al_tm),
    .out_valid(bl_rv), .out_data(bl_rd), .out_sop(bl_rs), .out_eop(bl_re), .out_empty(bl_rm)
  );
  link_model #(.W(W), .EW(EW), .LATENCY(LAT), .READY_PCT(85)) u_ba (
    .clk(net_clk), .rst_n(rst_a && rst_b),
    .in_valid(bl_tv), .in_ready(bl_tr), .in_data(bl_td), .in_sop(bl_ts),
    .in_eop(bl_te), .in_empty(bl_tm),
    .out_valid(al_rv), .out_data(al_rd), .out_sop(al_rs), .out_eop(al_re), .out_empty(al_rm)
  );

  // ---------------- traffic ----------------
  logic        en_a = 0, en_b = 0;
  int unsigned rate_a = 100, rate_b = 100, max_a = 0, max_b = 0;
  int unsigned sa_msgs, sa_flits, sb_msgs, sb_flits;
  int unsigned ka_msgs, ka_flits, ka_err, kb_msgs, kb_flits, kb_err;
  int          rdy_mode_a = 0, rdy_mode_b = 0;  // 0 free, 1 stop, 2 every other

  tb_stream_source #(.W(W), .SEED(11), .NLONG(NLONG)) u_src_a (
    .clk(app_clk), .rst_n(rst_a), .en(en_a), .rate_pct(rate_a), .max_msgs(max_a),
    .valid(a_tx_v), .ready(a_tx_r), .data(a_tx_d), .sop(a_tx_s), .eop(a_tx_e),
    .msgs_sent(sa_msgs), .flits_sent(sa_flits));
  tb_stream_source #(.W(W), .SEED(22), .NLONG(NLONG)) u_src_b (
    .clk(app_clk), .rst_n(rst_b), .en(en_b), .rate_pct(rate_b), .max_msgs(max_b),
    .valid(b_tx_v), .ready(b_tx_r), .data(b_tx_d), .sop(b_tx_s), .eop(b_tx_e),
    .msgs_sent(sb_msgs), .flits_sent(sb_flits));
  tb_stream_sink #(.W(W), .SEED(11), .NLONG(NLONG)) u_snk_b (
    .clk(app_clk), .rst_n(rst_b), .valid(b_rx_v), .ready(b_rx_r), .data(b_rx_d),
    .sop(b_rx_s), .eop(b_rx_e), .msgs_rcvd(kb_msgs), .flits_rcvd(kb_flits), .errors(kb_err));
  tb_stream_sink #(.W(W), .SEED(22), .NLONG(NLONG)) u_snk_a (
    .clk(app_clk), .rst_n(rst_a), .valid(a_rx_v), .ready(a_rx_r), .data(a_rx_d),
    .sop(a_rx_s), .eop(a_rx_e), .msgs_rcvd(ka_msgs), .flits_rcvd(ka_flits), .errors(ka_err));

  logic tog = 0;
  always_ff @(posedge app_clk) tog <= ~tog;
  assign a_rx_r = (rdy_mode_a == 0) || (rdy_mode_a == 2 && tog);
  assign b_rx_r = (rdy_mode_b == 0) || (rdy_mode_b == 2 && tog);

  // ---------------- mechanism counters (network clock) ----------------
  int unsigned n_full, n_eop, n_force, n_co_tx, n_co_rx, n_stall, n_frames, n_pad, n_macbp;
  int unsigned min_cr_a = RX_DEPTH, max_rxc_b = 0, cyc = 0;
  always_ff @(posedge net_clk) begin
    cyc <= cyc + 1;
    if (rst_a && rst_b) begin
      n_full   <= n_full   + a_evf   + b_evf;
      n_eop    <= n_eop    + a_eve   + b_eve;
      n_force  <= n_force  + a_evfs  + b_evfs;
      n_co_tx  <= n_co_tx  + a_evcot + b_evcot;
      n_co_rx  <= n_co_rx  + a_evcor + b_evcor;
      n_stall  <= n_stall  + a_evst  + b_evst;
      n_frames <= n_frames + a_evfr  + b_evfr;
      n_pad    <= n_pad + (al_tv && al_tr && al_te && al_tm == 5'd4)
                        + (bl_tv && bl_tr && bl_te && bl_tm == 5'd4);
      n_macbp  <= n_macbp + (bl_tv && !bl_tr);
      if (a_up && a_cr < min_cr_a) min_cr_a <= a_cr;
      if (b_rxc > max_rxc_b) max_rxc_b <= b_rxc;
    end
  end
  initial begin
    n_full = 0; n_eop = 0; n_force = 0; n_co_tx = 0; n_co_rx = 0;
    n_stall = 0; n_frames = 0; n_pad = 0; n_macbp = 0;
  end

  task automatic wait_net(input int unsigned n);
    repeat (n) @(posedge net_clk);
  endtask

  task automatic wait_delivered(input int unsigned limit);
    int unsigned t = 0;
    while ((kb_msgs < max_a || ka_msgs < max_b) && t < limit) begin
      @(posedge net_clk);
      t++;
    end
    check(kb_msgs == max_a && ka_msgs == max_b,
          $sformatf("all messages delivered (A->B %0d/%0d, B->A %0d/%0d)",
                    kb_msgs, max_a, ka_msgs, max_b));
  endtask

  // ---------------- test sequence ----------------
  initial begin : seq
    int unsigned f0, t_up;
    real eff;

    // 1. staggered resets, sync handshake
    #100 rst_a = 1;
    wait_net(300);
    check(!a_up, "A not up while B is held in reset");
    rst_b = 1;
    t_up = 0;
    while (!(a_up && b_up) && t_up < 5000) begin
      @(posedge net_clk);
      t_up++;
    end
    check(a_up && b_up, "sync handshake completes on both sides");
    check(t_up < 4 * LAT, $sformatf("handshake took %0d cycles (< 4 link latencies)", t_up));
    check(a_cr == 12'(RX_DEPTH) && b_cr == 12'(RX_DEPTH), "credit counters start at RX depth");

    // 2. long messages both ways, throughput
    max_a = NLONG; max_b = NLONG; en_a = 1; en_b = 1;
    wait_net(1000);
    f0 = kb_flits;
    wait_net(2000);
    eff = real'(kb_flits - f0) / 2000.0;
    $display("  A->B delivered %0.4f flits/cycle (packet overhead bound %0.4f)", eff, EXP_EFF);
    check(eff > EXP_EFF - 0.02 && eff < EXP_EFF + 0.01,
          $sformatf("streaming rate %0.4f matches 32/34", eff));
    wait_delivered(40000);

    // 3. random messages both ways
    max_a = NLONG + 60; max_b = NLONG + 60;
    wait_delivered(60000);

    // 4. half duplex A -> B
    f0 = n_co_tx;
    max_a = max_a + 40;
    wait_delivered(40000);
    check(n_co_tx > f0, "credit-only packets in half-duplex transfer");

    // 5. backpressure from B's application
    rdy_mode_b = 1;
    max_a = max_a + 110;
    wait_net(8000);
    check(min_cr_a == 0, $sformatf("A's credit counter ran out (min %0d)", min_cr_a));
    check(n_stall > 0, "A stalled on credits");
    check(max_rxc_b <= RX_DEPTH && !b_ovf, "B's RX buffer never overflowed");
    check(max_rxc_b >= RX_DEPTH - D_CU, $sformatf("B's RX buffer filled (max %0d)", max_rxc_b));
    rdy_mode_b = 2;
    wait_net(6000);
    rdy_mode_b = 0;
    wait_delivered(60000);

    // 6. slow trickle: force send
    f0 = n_force;
    rate_a = 2;
    max_a = max_a + 6;
    wait_delivered(200000);
    check(n_force > f0, "force send of a partly filled TX buffer");

    // idle: owed credits flow back
    wait_net(3000);
    check(a_cr > 12'(RX_DEPTH - D_CU) && b_cr > 12'(RX_DEPTH - D_CU),
          $sformatf("credits returned (A %0d, B %0d)", a_cr, b_cr));
    check(ka_err == 0 && kb_err == 0, $sformatf("data errors A %0d B %0d", ka_err, kb_err));
    check(sa_flits == kb_flits && sb_flits == ka_flits, "flit counts match");
    check(!a_ovf && !b_ovf && !a_ferr && !b_ferr, "no overflow, no frame error");
    check(a_tot > 0 && a_stl > 0 && a_stl < a_tot, "cycle counters count stalls");

    $display("  mechanisms: full=%0d eop=%0d force=%0d co_tx=%0d co_rx=%0d credit_stall=%0d frames=%0d padded=%0d mac_bp=%0d",
             n_full, n_eop, n_force, n_co_tx, n_co_rx, n_stall, n_frames, n_pad, n_macbp);
    check(n_full > 0,   "full packets seen");
    check(n_eop > 0,    "EOP-terminated packets seen");
    check(n_force > 0,  "force sends seen");
    check(n_co_tx > 0 && n_co_rx > 0, "credit-only packets sent and received");
    check(n_stall > 0,  "credit stalls seen");
    check(n_frames > 0, "Ethernet frames decoded");
    check(n_pad > 0,    "padded minimum-size frames seen");
    check(n_macbp > 0,  "MAC backpressure seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (600000) @(posedge net_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
