// tb_frame_encoder: feeds FC packets of 1..40 flits (256-bit) into the
// frame encoder with a MAC that accepts 60 % of the cycles, rebuilds each
// output frame as a byte string from data/sop/eop/empty, and checks it
// byte by byte against a frame assembled here: destination MAC, source
// MAC, type/length = payload bytes, the payload, zero pad up to the
// 46-byte minimum.  Also checks that a packet of N flits leaves as N+1
// flits.
module tb_frame_encoder;
  import fc_pkg::*;

  localparam int unsigned W = 256, BPF = 32;
  localparam logic [47:0] SRC = 48'h02_11_22_33_44_55, DST = 48'h02_66_77_88_99_aa;

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
  logic [LEN_W:0] in_nflits = '0;
  logic out_valid, out_ready, out_sop, out_eop;
  logic [W-1:0] out_data;
  logic [4:0] out_empty;

  frame_encoder #(.W(W), .SRC_MAC(SRC), .DST_MAC(DST)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_nflits,
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_empty);

  always_ff @(posedge clk) out_ready <= ($urandom % 100) < 60;

  byte unsigned exp_frames[$][$];
  byte unsigned cur[$];
  int unsigned  exp_nflits[$];
  int unsigned  nout = 0, nframes = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int unsigned nbytes;
    if (out_sop) begin
      cur = {};
      nout = 0;
    end
    nbytes = out_eop ? BPF - out_empty : BPF;
    for (int unsigned b = 0; b < nbytes; b++) cur.push_back(out_data[W-1-8*b -: 8]);
    nout++;
    if (out_eop) begin
      byte unsigned e[$];
      e = exp_frames.pop_front();
      check(cur.size() == e.size(), $sformatf("frame %0d length %0d, want %0d", nframes, cur.size(), e.size()));
      check(cur == e, $sformatf("frame %0d contents", nframes));
      check(nout == exp_nflits.pop_front() + 1, "N+1 output flits for N input flits");
      nframes++;
    end
  end

  task automatic send_packet(input int unsigned n, input int unsigned seed);
    byte unsigned f[$];
    int unsigned pay = n * BPF;
    for (int b = 0; b < 6; b++) f.push_back(DST[47-8*b -: 8]);
    for (int b = 0; b < 6; b++) f.push_back(SRC[47-8*b -: 8]);
    f.push_back(pay[15:8]); f.push_back(pay[7:0]);
    for (int unsigned i = 0; i < n; i++) begin
      logic [W-1:0] d;
      for (int k = 0; k < W / 32; k++) d[k*32 +: 32] = $urandom;
      for (int unsigned b = 0; b < BPF; b++) f.push_back(d[W-1-8*b -: 8]);
      @(negedge clk);
      in_valid = 1; in_data = d; in_sop = (i == 0); in_eop = (i == n - 1);
      in_nflits = (LEN_W+1)'(n);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    for (int unsigned p = pay; p < ETH_MIN_PAYLOAD; p++) f.push_back(8'h00);
    exp_frames.push_back(f);
    exp_nflits.push_back(n);
    in_valid = 0; in_sop = 0; in_eop = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin : seq
    int unsigned sent = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_packet(1, 0); send_packet(2, 0); send_packet(33, 0);
    sent = 3;
    for (int i = 0; i < 40; i++) begin
      send_packet(1 + $urandom % 40, i);
      sent++;
    end
    repeat (200) @(posedge clk);
    check(nframes == sent, $sformatf("%0d frames out of %0d", nframes, sent));
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
