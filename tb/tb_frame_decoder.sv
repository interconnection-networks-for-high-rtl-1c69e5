// tb_frame_decoder: builds Ethernet frames here (14-byte header with
// type/length = payload bytes, payload of 1..40 256-bit flits, zero pad
// to 46 bytes, packed most significant byte first with sop/eop/empty),
// sends them with random gaps, and checks that exactly the payload flits
// come out, in order.  Frames with extra trailing pad flits are included;
// a frame cut short must raise the error flag.
module tb_frame_decoder;
  import fc_pkg::*;

  localparam int unsigned W = 256, BPF = 32;

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

  logic in_valid = 0, in_sop = 0, in_eop = 0;
  logic [W-1:0] in_data = '0;
  logic [4:0] in_empty = '0;
  logic out_valid, ev_frame, err_short;
  logic [W-1:0] out_data;

  frame_decoder #(.W(W)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_sop, .in_eop, .in_empty,
    .out_valid, .out_data, .ev_frame, .err_short);

  logic [W-1:0] exp_q[$];
  int unsigned nout = 0, nframes = 0, junk_ok = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_frame) nframes++;
    if (out_valid && junk_ok > 0) junk_ok--;
    else if (out_valid) begin
      logic [W-1:0] e;
      check(exp_q.size() > 0, "no unexpected output flit");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(out_data == e, $sformatf("payload flit %0d", nout));
      end
      nout++;
    end
  end

  task automatic send_frame(input int unsigned n, input int unsigned extra, input bit cut);
    byte unsigned f[$];
    int unsigned pay = n * BPF;
    int unsigned nb;
    for (int b = 0; b < 12; b++) f.push_back(8'($urandom));
    f.push_back(pay[15:8]); f.push_back(pay[7:0]);
    for (int unsigned i = 0; i < n; i++) begin
      logic [W-1:0] d;
      for (int k = 0; k < W / 32; k++) d[k*32 +: 32] = $urandom;
      for (int unsigned b = 0; b < BPF; b++) f.push_back(d[W-1-8*b -: 8]);
      if (!cut) exp_q.push_back(d);
    end
    for (int unsigned p = pay; p < ETH_MIN_PAYLOAD; p++) f.push_back(8'h00);
    for (int unsigned p = 0; p < extra * BPF; p++) f.push_back(8'h00);
    if (cut) f = f[0:BPF + 5];
    nb = f.size();
    for (int unsigned o = 0; o < nb; o += BPF) begin
      logic [W-1:0] d = '0;
      int unsigned k = 0;
      for (int unsigned b = o; b < o + BPF && b < nb; b++) begin
        d[W-1-8*(b-o) -: 8] = f[b];
        k++;
      end
      @(negedge clk);
      in_valid = 1; in_data = d; in_sop = (o == 0); in_eop = (o + BPF >= nb);
      in_empty = 5'(BPF - k);
      repeat ($urandom % 2) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin : seq
    int unsigned total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(1, 0, 0); total += 1;
    send_frame(2, 0, 0); total += 2;
    send_frame(3, 2, 0); total += 3;
    for (int i = 0; i < 40; i++) begin
      int unsigned n = 1 + $urandom % 40;
      send_frame(n, 0, 0);
      total += n;
    end
    repeat (10) @(posedge clk);
    check(nout == total && exp_q.size() == 0, $sformatf("%0d payload flits out, want %0d", nout, total));
    check(nframes == 43, "frame starts counted");
    check(!err_short, "no error on good frames");
    // The truncated frame ends inside its first payload flit: that flit
    // still comes out (the decoder has no store-and-forward), nothing more.
    junk_ok = 1;
    send_frame(4, 0, 1);
    repeat (5) @(posedge clk);
    check(err_short, "a truncated frame raises the error flag");
    check(junk_ok == 0, "the truncated frame delivered its partial flit");
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
