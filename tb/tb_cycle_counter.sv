// tb_cycle_counter: drives random run/stall patterns and compares both
// counters with counts kept here; checks that clear wins over run, that
// counting stops while run is low, and (with a 6-bit instance) that the
// counters saturate at all ones instead of wrapping.
module tb_cycle_counter;
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

  logic clear = 0, run = 0, stall = 0;
  logic [47:0] total, stalls;
  logic [5:0]  total_s, stalls_s;

  cycle_counter dut (.clk, .rst_n, .clear, .run, .stall, .total, .stalls);
  cycle_counter #(.CW(6)) dut_s (.clk, .rst_n, .clear, .run, .stall,
                                 .total(total_s), .stalls(stalls_s));

  longint unsigned et = 0, es = 0;

  task automatic step(input bit c, input bit r, input bit s);
    @(negedge clk);
    clear = c; run = r; stall = s;
    @(posedge clk);
    if (c) begin
      et = 0; es = 0;
    end else if (r) begin
      et++;
      if (s) es++;
    end
  endtask

  initial begin : seq
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(0, 0, 0);
    #1 check(total == 0 && stalls == 0, "zero after reset");
    for (int i = 0; i < 500; i++) step(0, ($urandom % 4) != 0, ($urandom % 3) == 0);
    #1 check(total == 48'(et) && stalls == 48'(es),
             $sformatf("random run/stall: %0d/%0d, want %0d/%0d", total, stalls, et, es));
    check(total_s == 6'h3f && stalls_s == 6'h3f, "6-bit counters saturate");
    for (int i = 0; i < 20; i++) step(0, 0, 1);
    #1 check(total == 48'(et), "no counting while run is low");
    step(1, 1, 1);
    #1 check(total == 0 && stalls == 0 && total_s == 0, "clear wins over run");
    for (int i = 0; i < 10; i++) step(0, 1, i < 4);
    #1 check(total == 10 && stalls == 4, "10 cycles, 4 stalled");
    check(total_s == 10 && stalls_s == 4, "small counter counts the same");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
