// tb_flow_controller: two flow controllers (FC0, FC1) joined by a link of
// 128 cycles each way, with TX buffer = credit interval = 128 flits and an
// RX buffer of 512 flits, the setting of the credit-counter timing study.
// FC0 streams to FC1 (half duplex: FC1 only returns credits).
//   case 1: FC1's application reads every cycle: FC0 never runs out of
//           credits and delivers 128 data flits per 129 link cycles;
//   case 2: FC1's application reads every other cycle: FC0's credits run
//           out and the delivered rate settles at one flit per two cycles;
//   case 3: FC1's application stops: FC0 stops with zero credits, FC1's RX
//           buffer holds all but the not yet returned credits and does not overflow; reading
//           resumes and everything arrives in order.
module tb_flow_controller;
  import fc_pkg::*;

  localparam int unsigned W   = 256;
  localparam int unsigned D   = 128;
  localparam int unsigned RXD = 512;
  localparam int unsigned LAT = 128;

  int unsigned checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  // FC0 app side
  logic         s_v, s_r, s_s, s_e;
  logic [W-1:0] s_d;
  // FC1 app side
  logic         k_v, k_r, k_s, k_e;
  logic [W-1:0] k_d;
  // unused return direction
  logic         r0_v, r0_s, r0_e, r1_s, r1_e;
  logic [W-1:0] r0_d, r1_d;
  logic         t1_v, t1_r;
  // links
  logic         l01_v, l01_r, l01_s, l01_e, l10_v, l10_r, l10_s, l10_e;
  logic [W-1:0] l01_d, l10_d;
  logic [LEN_W:0] n0, n1;
  logic         x01_v, x10_v, x01_s, x01_e, x10_s, x10_e;
  logic [W-1:0] x01_d, x10_d;
  logic [4:0]   m0, m1;

  logic up0, up1, ovf0, ovf1;
  logic [9:0] cr0, cr1, rc0, rc1;
  logic f0, e0, fs0, cot0, cor0, st0, f1, e1, fs1, cot1, cor1, st1;

  flow_controller #(.W(W), .TX_DEPTH(D), .D_CU(D), .RX_DEPTH(RXD), .FORCE_SEND_CYCLES(64)) u_fc0 (
    .clk, .rst_n,
    .app_in_valid(s_v), .app_in_ready(s_r), .app_in_data(s_d), .app_in_sop(s_s), .app_in_eop(s_e),
    .app_out_valid(r0_v), .app_out_ready(1'b1), .app_out_data(r0_d), .app_out_sop(r0_s), .app_out_eop(r0_e),
    .link_tx_valid(l01_v), .link_tx_ready(l01_r), .link_tx_data(l01_d),
    .link_tx_sop(l01_s), .link_tx_eop(l01_e), .link_tx_nflits(n0),
    .link_rx_valid(x10_v), .link_rx_data(x10_d),
    .link_up(up0), .credits(cr0), .rx_count(rc0), .rx_overflow(ovf0),
    .ev_full_packet(f0), .ev_eop_packet(e0), .ev_force_send(fs0),
    .ev_credit_only_tx(cot0), .ev_credit_only_rx(cor0), .ev_credit_stall(st0));

  flow_controller #(.W(W), .TX_DEPTH(D), .D_CU(D), .RX_DEPTH(RXD), .FORCE_SEND_CYCLES(64)) u_fc1 (
    .clk, .rst_n,
    .app_in_valid(1'b0), .app_in_ready(t1_r), .app_in_data('0), .app_in_sop(1'b0), .app_in_eop(1'b0),
    .app_out_valid(k_v), .app_out_ready(k_r), .app_out_data(k_d), .app_out_sop(k_s), .app_out_eop(k_e),
    .link_tx_valid(l10_v), .link_tx_ready(l10_r), .link_tx_data(l10_d),
    .link_tx_sop(l10_s), .link_tx_eop(l10_e), .link_tx_nflits(n1),
    .link_rx_valid(x01_v), .link_rx_data(x01_d),
    .link_up(up1), .credits(cr1), .rx_count(rc1), .rx_overflow(ovf1),
    .ev_full_packet(f1), .ev_eop_packet(e1), .ev_force_send(fs1),
    .ev_credit_only_tx(cot1), .ev_credit_only_rx(cor1), .ev_credit_stall(st1));

  link_model #(.W(W), .EW(5), .LATENCY(LAT), .READY_PCT(100)) u_l01 (
    .clk, .rst_n, .in_valid(l01_v), .in_ready(l01_r), .in_data(l01_d), .in_sop(l01_s),
    .in_eop(l01_e), .in_empty(5'd0), .out_valid(x01_v), .out_data(x01_d), .out_sop(x01_s),
    .out_eop(x01_e), .out_empty(m0));
  link_model #(.W(W), .EW(5), .LATENCY(LAT), .READY_PCT(100)) u_l10 (
    .clk, .rst_n, .in_valid(l10_v), .in_ready(l10_r), .in_data(l10_d), .in_sop(l10_s),
    .in_eop(l10_e), .in_empty(5'd0), .out_valid(x10_v), .out_data(x10_d), .out_sop(x10_s),
    .out_eop(x10_e), .out_empty(m1));

  int unsigned s_msgs, s_flits, k_msgs, k_flits, k_err;
  logic en = 0;
  int unsigned max_msgs = 0;
  tb_stream_source #(.W(W), .SEED(5), .NLONG(1000), .LONGLEN(4096)) u_src (
    .clk, .rst_n, .en(en), .rate_pct(100), .max_msgs(max_msgs),
    .valid(s_v), .ready(s_r), .data(s_d), .sop(s_s), .eop(s_e),
    .msgs_sent(s_msgs), .flits_sent(s_flits));
  tb_stream_sink #(.W(W), .SEED(5), .NLONG(1000), .LONGLEN(4096)) u_snk (
    .clk, .rst_n, .valid(k_v), .ready(k_r), .data(k_d), .sop(k_s), .eop(k_e),
    .msgs_rcvd(k_msgs), .flits_rcvd(k_flits), .errors(k_err));

  int rd_mode = 0;   // 0 every cycle, 1 every other cycle, 2 stopped
  logic tog = 0;
  always_ff @(posedge clk) tog <= ~tog;
  assign k_r = (rd_mode == 0) || (rd_mode == 1 && tog);

  int unsigned n_stall = 0, n_co = 0, min_cr = RXD, max_rc = 0;
  logic track = 0;
  always_ff @(posedge clk) begin
    n_stall <= n_stall + (rst_n && st0);
    n_co    <= n_co + (rst_n && cot1);
    if (track && cr0 < min_cr) min_cr <= cr0;
    if (rst_n && rc1 > max_rc) max_rc <= rc1;
  end

  initial begin : seq
    int unsigned k0, t;
    real rate;
    repeat (5) @(posedge clk);
    rst_n = 1;
    t = 0;
    while (!(up0 && up1) && t < 2000) begin @(posedge clk); t++; end
    check(up0 && up1, "handshake completes");
    check(cr0 == 10'(RXD), "credit counter starts at the RX buffer allocation");

    // case 1: constant reads
    en = 1; max_msgs = 3;
    repeat (1500) @(posedge clk);
    track = 1;
    k0 = k_flits;
    repeat (2580) @(posedge clk);
    rate = real'(k_flits - k0) / 2580.0;
    $display("  case 1: %0.4f flits/cycle, min credits %0d", rate, min_cr);
    check(rate > 0.985 && rate < 0.9935, $sformatf("case 1 rate %0.4f = 128/129", rate));
    check(n_stall == 0, "case 1: no credit stall");
    check(min_cr > 0, "case 1: credits never exhausted");
    check(n_co > 0, "case 1: FC1 returns credits in credit-only packets");

    // case 2: reads every other cycle
    rd_mode = 1;
    repeat (3000) @(posedge clk);
    min_cr = RXD;
    k0 = k_flits;
    repeat (4000) @(posedge clk);
    rate = real'(k_flits - k0) / 4000.0;
    $display("  case 2: %0.4f flits/cycle, min credits %0d", rate, min_cr);
    check(rate > 0.49 && rate < 0.51, $sformatf("case 2 rate %0.4f = 1/2", rate));
    check(min_cr == 0, "case 2: credit counter depleted");
    check(n_stall > 0, "case 2: TX stalls on credits");

    // case 3: reads stopped
    rd_mode = 2;
    repeat (3000) @(posedge clk);
    check(rc1 > 10'(RXD - D), $sformatf("case 3: RX buffer filled up to the unreturned credits (%0d)", rc1));
    check(cr0 == 0, "case 3: FC0 out of credits");
    check(!ovf1 && max_rc <= RXD, $sformatf("case 3: no RX overflow (ovf %0d max %0d)", ovf1, max_rc));
    k0 = s_flits;
    repeat (500) @(posedge clk);
    check(s_flits - k0 <= 2 * D + 16, "case 3: transmitter stopped");
    rd_mode = 0;
    t = 0;
    while (k_msgs < max_msgs && t < 40000) begin @(posedge clk); t++; end
    check(k_msgs == max_msgs && k_flits == s_flits, "all flits delivered");
    check(k_err == 0, $sformatf("data errors %0d", k_err));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
