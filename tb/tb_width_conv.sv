// tb_width_conv: runs three converters side by side (512->256 narrowing,
// 256->512 widening, 256->1024 widening) with random valid and ready and
// messages of random length, predicts every output word and its sop/eop
// from the input words in a queue kept here (slice order least significant
// first; a message ending inside a group closes it with zero upper
// slices), and checks that a continuous
// stream with an always-ready sink moves one output word per cycle on the
// narrowing side and one input word per cycle on the widening sides.
module tb_width_conv;
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

  int unsigned vpct = 70, rpct = 70;

  // ---- narrowing 512 -> 256 ----
  logic a_iv = 0, a_ir, a_ov, a_or = 0, a_is = 0, a_ie = 0, a_os, a_oe;
  logic [511:0] a_id = '0;
  logic [255:0] a_od;
  width_conv #(.IN_W(512), .OUT_W(256)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .in_sop(a_is), .in_eop(a_ie), .out_valid(a_ov), .out_ready(a_or), .out_data(a_od),
    .out_sop(a_os), .out_eop(a_oe));

  // ---- widening 256 -> 512 ----
  logic b_iv = 0, b_ir, b_ov, b_or = 0, b_is = 0, b_ie = 0, b_os, b_oe;
  logic [255:0] b_id = '0;
  logic [511:0] b_od;
  width_conv #(.IN_W(256), .OUT_W(512)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .in_sop(b_is), .in_eop(b_ie), .out_valid(b_ov), .out_ready(b_or), .out_data(b_od),
    .out_sop(b_os), .out_eop(b_oe));

  // ---- widening 256 -> 1024 ----
  logic c_iv = 0, c_ir, c_ov, c_or = 0, c_is = 0, c_ie = 0, c_os, c_oe;
  logic [255:0] c_id = '0;
  logic [1023:0] c_od;
  width_conv #(.IN_W(256), .OUT_W(1024)) dut_c (
    .clk, .rst_n, .in_valid(c_iv), .in_ready(c_ir), .in_data(c_id),
    .in_sop(c_is), .in_eop(c_ie), .out_valid(c_ov), .out_ready(c_or), .out_data(c_od),
    .out_sop(c_os), .out_eop(c_oe));

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  typedef struct packed { logic sop, eop; logic [255:0] d; } w_t;
  w_t qa[$], qb[$], qc[$];
  int unsigned na_in = 0, na_out = 0, nb_in = 0, nb_out = 0, nc_in = 0, nc_out = 0;
  int unsigned nb_early = 0;
  bit ok_a = 1, ok_b = 1, ok_c = 1;

  // expected wide word: up to r queued words, closed early by an eop
  function automatic bit pop_group(ref w_t q[$], input int r, output logic [1023:0] d,
                                   output logic sop, output logic eop, output int n);
    d = '0; sop = 0; eop = 0; n = 0;
    while (n < r) begin
      w_t w;
      if (q.size() == 0) return 0;
      w = q.pop_front();
      d[n*256 +: 256] = w.d;
      if (n == 0) sop = w.sop;
      eop = w.eop;
      n++;
      if (w.eop) break;
    end
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    logic [1023:0] e;
    logic es, ee;
    int n;
    if (a_iv && a_ir) begin
      qa.push_back({a_is, 1'b0, a_id[255:0]}); qa.push_back({1'b0, a_ie, a_id[511:256]});
      na_in++;
    end
    if (a_ov && a_or) begin
      if (qa.size() == 0 || {a_os, a_oe, a_od} != qa.pop_front()) ok_a = 0;
      na_out++;
    end
    if (b_iv && b_ir) begin
      qb.push_back({b_is, b_ie, b_id}); nb_in++;
    end
    if (b_ov && b_or) begin
      if (!pop_group(qb, 2, e, es, ee, n) || b_od != e[511:0] || b_os != es || b_oe != ee) ok_b = 0;
      if (n < 2) nb_early++;
      nb_out++;
    end
    if (c_iv && c_ir) begin
      qc.push_back({c_is, c_ie, c_id}); nc_in++;
    end
    if (c_ov && c_or) begin
      if (!pop_group(qc, 4, e, es, ee, n) || c_od != e || c_os != es || c_oe != ee) ok_c = 0;
      nc_out++;
    end
  end

  // message framing of the three input streams: random lengths
  int unsigned la = 0, lb = 0, lc = 0;
  int unsigned maxlen = 7;
  // drivers change inputs only after a handshake or while idle
  always @(negedge clk) begin
    if (!a_iv || a_ir) begin
      if (a_iv) la = a_ie ? 0 : la + 1;
      a_iv <= rst_n && ($urandom % 100) < vpct;
      a_id <= {rnd256(), rnd256()};
      a_is <= (la == 0);
      a_ie <= ($urandom % maxlen) == 0;
    end
    if (!b_iv || b_ir) begin
      if (b_iv) lb = b_ie ? 0 : lb + 1;
      b_iv <= rst_n && ($urandom % 100) < vpct;
      b_id <= rnd256();
      b_is <= (lb == 0);
      b_ie <= ($urandom % maxlen) == 0;
    end
    if (!c_iv || c_ir) begin
      if (c_iv) lc = c_ie ? 0 : lc + 1;
      c_iv <= rst_n && ($urandom % 100) < vpct;
      c_id <= rnd256();
      c_is <= (lc == 0);
      c_ie <= ($urandom % maxlen) == 0;
    end
    a_or <= ($urandom % 100) < rpct;
    b_or <= ($urandom % 100) < rpct;
    c_or <= ($urandom % 100) < rpct;
  end

  initial begin : seq
    int unsigned a0, b0, c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(ok_a, "narrowing: slices in order, least significant first");
    check(ok_b, "widening x2: words packed in order");
    check(ok_c, "widening x4: words packed in order");
    check(na_out > 500 && nb_out > 300 && nc_out > 150, "all three moved data under random handshakes");
    check(nb_early > 10, "messages ending inside a group closed it early");
    // full rate: continuous input in messages of whole groups (one eop
    // every 1000 words at most), sink always ready
    maxlen = 100000; vpct = 100; rpct = 100;
    repeat (20) @(posedge clk);
    a0 = na_out; b0 = nb_in; c0 = nc_in;
    repeat (400) @(posedge clk);
    check(na_out - a0 == 400, $sformatf("narrowing: %0d output words in 400 cycles", na_out - a0));
    check(nb_in - b0 == 400, $sformatf("widening x2: %0d input words in 400 cycles", nb_in - b0));
    check(nc_in - c0 == 400, $sformatf("widening x4: %0d input words in 400 cycles", nc_in - c0));
    // drain and compare totals
    vpct = 0;
    repeat (20) @(posedge clk);
    check(ok_a && ok_b && ok_c, "data still correct at full rate");
    check(na_out == 2 * na_in && qa.size() == 0, "narrowing: two slices per input word");
    check(qb.size() < 2 && qc.size() < 4, "widening: at most one partial group left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
