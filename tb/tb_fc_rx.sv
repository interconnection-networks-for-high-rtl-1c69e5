// tb_fc_rx: unit test of the FC receiver (64-bit flits, RX buffer of 16).
// Drives flits as a link would and checks: sync flits are reported with
// their acknowledge bit and never stored; other flits before link_up are
// dropped; headers pass their credit update on; data flits are stored
// with SOP/EOP rebuilt from the header flags; a credit-only header stores
// nothing; a sync flit after link_up is ignored; every application read is
// owed back as a credit and taken credits are subtracted.
module tb_fc_rx;
  import fc_pkg::*;

  localparam int unsigned W = 64, RXD = 16;

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

  logic in_valid = 0, link_up = 0, out_ready = 0, take_v = 0;
  logic [W-1:0] in_data = '0;
  logic sync_seen, sync_ack, cr_v, out_valid, out_sop, out_eop, ovf, ev_hdr, ev_co;
  logic [CU_W-1:0] cr_amt, ret_pending, take_amt = '0;
  logic [W-1:0] out_data;
  logic [4:0] rx_count;

  fc_rx #(.W(W), .RX_DEPTH(RXD)) dut (
    .clk, .rst_n, .in_valid, .in_data, .link_up, .sync_seen, .sync_seen_ack(sync_ack),
    .credit_add_valid(cr_v), .credit_add(cr_amt),
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop,
    .ret_pending, .ret_take_valid(take_v), .ret_take_amt(take_amt),
    .rx_count, .overflow(ovf), .ev_header(ev_hdr), .ev_credit_only(ev_co));

  int unsigned n_sync = 0, n_ack = 0, cr_sum = 0, n_co = 0;
  always @(posedge clk) if (rst_n) begin
    n_sync += sync_seen;
    n_ack  += sync_ack;
    n_co   += ev_co;
    if (cr_v) cr_sum += cr_amt;
  end

  function automatic logic [W-1:0] sync_flit(input bit ack);
    logic [W-1:0] f = '0;
    f[W-1 -: 32] = SYNC_MAGIC;
    f[0] = ack;
    return f;
  endfunction
  function automatic logic [W-1:0] hdr_flit(input int len, input bit s, input bit e,
                                            input bit co, input int cu);
    fc_hdr_t h;
    h = '{len: LEN_W'(len), sop: s, eop: e, co: co, res: 1'b0, cu: CU_W'(cu)};
    return W'(h);
  endfunction

  task automatic send(input logic [W-1:0] f);
    in_valid <= 1; in_data <= f;
    @(posedge clk);
    in_valid <= 0;
  endtask

  // read one flit from the RX buffer and check it
  task automatic expect_flit(input logic [W-1:0] d, input bit s, input bit e);
    @(negedge clk);
    check(out_valid, "RX buffer has data");
    check(out_data == d && out_sop == s && out_eop == e,
          $sformatf("read %h sop %0d eop %0d (want %h %0d %0d)", out_data, out_sop, out_eop, d, s, e));
    out_ready = 1;
    @(posedge clk);
    #1 out_ready = 0;
  endtask

  initial begin : seq
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // before link up
    send(sync_flit(0));
    send(sync_flit(1));
    send(hdr_flit(2, 1, 1, 0, 5));
    send(64'hdead);
    send(64'hbeef);
    repeat (2) @(posedge clk);
    check(n_sync == 2 && n_ack == 1, "sync flits reported with acknowledge");
    check(rx_count == 0 && cr_sum == 0, "nothing stored or credited before link up");

    link_up = 1;
    // packet 1: 3 flits, SOP and EOP
    send(hdr_flit(3, 1, 1, 0, 7));
    send(64'h11); send(64'h12); send(64'h13);
    // sync flit arriving late: ignored
    send(sync_flit(1));
    // packet 2: 4 flits, SOP only
    send(hdr_flit(4, 1, 0, 0, 0));
    send(64'h21); send(64'h22); send(64'h23); send(64'h24);
    // credit-only
    send(hdr_flit(0, 0, 0, 1, 9));
    // packet 3: 2 flits, EOP only (continuation)
    send(hdr_flit(2, 0, 1, 0, 1));
    send(64'h31); send(64'h32);
    repeat (2) @(posedge clk);
    check(rx_count == 9, $sformatf("9 data flits stored (%0d)", rx_count));
    check(cr_sum == 17, $sformatf("credits passed on: %0d", cr_sum));
    check(n_co == 1, "credit-only header seen");
    check(n_sync == 3, "late sync flit reported, not stored");

    expect_flit(64'h11, 1, 0); expect_flit(64'h12, 0, 0); expect_flit(64'h13, 0, 1);
    expect_flit(64'h21, 1, 0); expect_flit(64'h22, 0, 0); expect_flit(64'h23, 0, 0);
    expect_flit(64'h24, 0, 0); expect_flit(64'h31, 0, 0); expect_flit(64'h32, 0, 1);
    @(negedge clk);
    check(!out_valid, "RX buffer empty");
    check(ret_pending == 9, $sformatf("9 reads owed as credits (%0d)", ret_pending));
    take_v = 1; take_amt = 12'd5;
    @(posedge clk);
    #1 take_v = 0;
    check(ret_pending == 4, "taken credits subtracted");
    check(!ovf, "no overflow");

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
