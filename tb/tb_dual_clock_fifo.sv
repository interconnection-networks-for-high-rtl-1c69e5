// tb_dual_clock_fifo: checks the dual-clock FIFO with unrelated write and
// read clocks (4.4 ns and 6.4 ns, like the application and network clocks
// of the top-level test).  Words are a running sequence number, so order,
// loss and duplication are all caught by comparing with a counter.  Phases:
// fill while the reader is stopped (the FIFO must take exactly DEPTH words
// and then refuse), drain, then random valid/ready on both sides.  Also
// checks that an empty FIFO shows no valid word and that a full one
// keeps wr_ready low.
module tb_dual_clock_fifo;
  localparam int unsigned WIDTH = 32, DEPTH = 16, N = 3000;

  int unsigned checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #2.2 wclk = ~wclk;
  always #3.2 rclk = ~rclk;

  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;

  dual_clock_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid, .wr_ready, .wr_data,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid, .rd_ready, .rd_data);

  int unsigned nw = 0, nr = 0, wr_pct = 0, rd_pct = 0;
  bit order_ok = 1;

  // writer: presents sequence number nw, advances on a handshake
  always @(posedge wclk) if (wrst_n) begin
    if (wr_valid && wr_ready) nw++;
  end
  always @(negedge wclk) begin
    wr_valid <= wrst_n && nw < N && ($urandom % 100) < wr_pct;
    wr_data  <= WIDTH'(nw);
  end

  // reader: every accepted word must be the next number
  always @(posedge rclk) if (rrst_n) begin
    if (rd_valid && rd_ready) begin
      if (rd_data != WIDTH'(nr)) order_ok = 0;
      nr++;
    end
  end
  always @(negedge rclk) rd_ready <= ($urandom % 100) < rd_pct;

  initial begin : seq
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(!rd_valid, "empty after reset");
    wr_pct = 100;
    // reader stopped: exactly DEPTH words go in
    repeat (100) @(posedge wclk);
    check(nw == DEPTH, $sformatf("stopped reader: %0d words accepted, want %0d", nw, DEPTH));
    check(!wr_ready, "full FIFO refuses writes");
    check(rd_valid && rd_data == '0, "head word visible while reader is stopped");
    // writer stopped, reader drains
    wr_pct = 0; rd_pct = 100;
    repeat (60) @(posedge rclk);
    check(nr == DEPTH, $sformatf("drained %0d words", nr));
    check(!rd_valid, "empty after draining");
    // random traffic both ways
    wr_pct = 60; rd_pct = 50;
    repeat (2500) @(posedge rclk);
    wr_pct = 100; rd_pct = 100;
    wait (nr == N);
    repeat (10) @(posedge rclk);
    check(order_ok, "words come out in order without loss or duplication");
    check(nr == N && nw == N, $sformatf("all %0d words through (w=%0d r=%0d)", N, nw, nr));
    check(!rd_valid, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
