// tb_stream_workloads: times single message transfers of the sizes used to
// evaluate the network - a one-flit (32-byte) message, a 4 KB message and
// a 1 MB message - over a switched Ethernet link and over a direct serial
// link, six node pairs running side by side (tb_transfer_pair).
//
// Clocks and latencies follow the measured platform: switched link at
// 154.99 MHz with 126 cycles one way (0.496 us cable and MAC plus 0.318 us
// switch), direct link at 150.81 MHz with 53 cycles one way (0.354 us),
// application clock 227 MHz.  All nodes use their default parameters
// except the direct pairs (no framing, RX buffer 512 flits).
//
// Checks: every message arrives intact; the 1 MB transfers reach the
// packet-overhead bound (32 B x f x 32/34 switched, x 32/33 direct)
// within 3 %; the extra time of 4 KB over 32 B is the time of 127 flits
// at that rate plus the D_CU = 32 cycles the store-and-forward TX buffer
// needs to fill before the first full packet leaves (within 15 %); the
// one-flit time is at least the link's
// one-way delay.  The effective bandwidths are printed; the real MAC and
// serial-link overheads (preamble, gaps, lane framing) are not modelled,
// so the hardware's measured figures are lower.
//
// A second group of six pairs sweeps the TX buffer depth, 32, 64 and 128
// flits (each also the packet size D_CU), on the direct link with a 4 KB
// and a 128 KB message.  The reference design reports that a smaller TX
// buffer gives higher throughput on short streams, because the
// store-and-forward buffer must fill before a packet leaves, and that the
// depths converge on long streams.  Checks: every message intact; on 4 KB
// depth 32 is faster than 64 and 64 faster than 128; on 128 KB the three
// lie within 4 % and depth 128 (header overhead 1/129 against 1/33) is not
// slower than 32.  A single link is modelled, not the two bundled links
// of the reference measurement.
module tb_stream_workloads;
  int unsigned checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam real SW_HALF = 3.226, DR_HALF = 3.3155;   // ns
  localparam int unsigned SW_LAT = 126, DR_LAT = 53;
  localparam int unsigned MB = 32768, KB4 = 128, KB128 = 4096;

  logic start = 0;
  logic        d[12];
  real         t[12];
  int unsigned f[12], e[12];

  tb_transfer_pair #(.SWITCHED(1), .RX_DEPTH(2048), .LAT(SW_LAT), .NET_HALF_NS(SW_HALF), .MSG_FLITS(1),   .SEED(1))
    p_sw_1  (.start, .done(d[0]), .t_ns(t[0]), .flits(f[0]), .errors(e[0]));
  tb_transfer_pair #(.SWITCHED(1), .RX_DEPTH(2048), .LAT(SW_LAT), .NET_HALF_NS(SW_HALF), .MSG_FLITS(KB4), .SEED(2))
    p_sw_4k (.start, .done(d[1]), .t_ns(t[1]), .flits(f[1]), .errors(e[1]));
  tb_transfer_pair #(.SWITCHED(1), .RX_DEPTH(2048), .LAT(SW_LAT), .NET_HALF_NS(SW_HALF), .MSG_FLITS(MB),  .SEED(3))
    p_sw_1m (.start, .done(d[2]), .t_ns(t[2]), .flits(f[2]), .errors(e[2]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(1),   .SEED(4))
    p_dr_1  (.start, .done(d[3]), .t_ns(t[3]), .flits(f[3]), .errors(e[3]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB4), .SEED(5))
    p_dr_4k (.start, .done(d[4]), .t_ns(t[4]), .flits(f[4]), .errors(e[4]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(MB),  .SEED(6))
    p_dr_1m (.start, .done(d[5]), .t_ns(t[5]), .flits(f[5]), .errors(e[5]));

  // TX buffer depth sweep, direct link
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(32),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB4),   .SEED(11))
    p32_s  (.start, .done(d[6]),  .t_ns(t[6]),  .flits(f[6]),  .errors(e[6]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(64),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB4),   .SEED(12))
    p64_s  (.start, .done(d[7]),  .t_ns(t[7]),  .flits(f[7]),  .errors(e[7]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(128), .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB4),   .SEED(13))
    p128_s (.start, .done(d[8]),  .t_ns(t[8]),  .flits(f[8]),  .errors(e[8]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(32),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB128), .SEED(14))
    p32_l  (.start, .done(d[9]),  .t_ns(t[9]),  .flits(f[9]),  .errors(e[9]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(64),  .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB128), .SEED(15))
    p64_l  (.start, .done(d[10]), .t_ns(t[10]), .flits(f[10]), .errors(e[10]));
  tb_transfer_pair #(.SWITCHED(0), .RX_DEPTH(512), .TX_DEPTH(128), .LAT(DR_LAT), .NET_HALF_NS(DR_HALF), .MSG_FLITS(KB128), .SEED(16))
    p128_l (.start, .done(d[11]), .t_ns(t[11]), .flits(f[11]), .errors(e[11]));

  initial begin : seq
    real f_sw, f_dr, bw, bound, per_flit;
    real sb[12];
    f_sw = 1000.0 / (2.0 * SW_HALF);   // MHz
    f_dr = 1000.0 / (2.0 * DR_HALF);
    #10 start = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] &&
          d[6] && d[7] && d[8] && d[9] && d[10] && d[11]);
    #100;
    for (int i = 0; i < 6; i++)
      check(e[i] == 0 && f[i] == ((i % 3 == 0) ? 1 : (i % 3 == 1) ? KB4 : MB),
            $sformatf("pair %0d: message intact (%0d flits, %0d errors)", i, f[i], e[i]));

    $display("  switched: 32 B %0.3f us, 4 KB %0.3f us, 1 MB %0.1f us", t[0] / 1000.0, t[1] / 1000.0, t[2] / 1000.0);
    $display("  direct  : 32 B %0.3f us, 4 KB %0.3f us, 1 MB %0.1f us", t[3] / 1000.0, t[4] / 1000.0, t[5] / 1000.0);

    bw = 32.0 * MB / t[2];                      // bytes per ns = GB/s
    bound = 32.0 * f_sw / 1000.0 * 32.0 / 34.0;
    $display("  switched 1 MB: %0.3f GB/s, bound %0.3f GB/s", bw, bound);
    check(bw > 0.97 * bound && bw <= bound * 1.001, "switched 1 MB reaches the packet-overhead bound");
    bw = 32.0 * MB / t[5];
    bound = 32.0 * f_dr / 1000.0 * 32.0 / 33.0;
    $display("  direct   1 MB: %0.3f GB/s, bound %0.3f GB/s", bw, bound);
    check(bw > 0.97 * bound && bw <= bound * 1.001, "direct 1 MB reaches the packet-overhead bound");

    per_flit = 127.0 * (2.0 * SW_HALF) * 34.0 / 32.0 + 32.0 * (2.0 * SW_HALF);
    check((t[1] - t[0]) > 0.85 * per_flit && (t[1] - t[0]) < 1.15 * per_flit,
          $sformatf("switched: 4 KB minus 32 B = %0.1f ns, model %0.1f ns", t[1] - t[0], per_flit));
    per_flit = 127.0 * (2.0 * DR_HALF) * 33.0 / 32.0 + 32.0 * (2.0 * DR_HALF);
    check((t[4] - t[3]) > 0.85 * per_flit && (t[4] - t[3]) < 1.15 * per_flit,
          $sformatf("direct: 4 KB minus 32 B = %0.1f ns, model %0.1f ns", t[4] - t[3], per_flit));
    check(t[0] > SW_LAT * 2.0 * SW_HALF && t[3] > DR_LAT * 2.0 * DR_HALF,
          "one-flit time covers the one-way link delay");
    check(t[0] > t[3], "switched one-flit latency above direct (framing and longer path)");

    // TX buffer depth sweep
    for (int i = 6; i < 12; i++) begin
      check(e[i] == 0 && f[i] == ((i < 9) ? KB4 : KB128),
            $sformatf("sweep pair %0d: message intact (%0d flits, %0d errors)", i, f[i], e[i]));
      sb[i] = 32.0 * real'(f[i]) / t[i];   // bytes per ns = GB/s
    end
    $display("  TX depth sweep, 4 KB  : 32 %0.3f GB/s, 64 %0.3f GB/s, 128 %0.3f GB/s", sb[6], sb[7], sb[8]);
    $display("  TX depth sweep, 128 KB: 32 %0.3f GB/s, 64 %0.3f GB/s, 128 %0.3f GB/s", sb[9], sb[10], sb[11]);
    check(t[6] < t[7], "4 KB: TX depth 32 faster than depth 64");
    check(t[7] < t[8], "4 KB: TX depth 64 faster than depth 128");
    check(sb[9] > 0.96 * sb[11] && sb[11] > 0.96 * sb[9] && sb[10] > 0.96 * sb[9],
          "128 KB: the three TX depths converge within 4 %");
    check(sb[11] >= 0.999 * sb[9], "128 KB: TX depth 128 not slower than depth 32");
    check(sb[9] > sb[6], "TX depth 32: long stream faster than short");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
