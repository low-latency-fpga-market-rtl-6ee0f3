// tb_tob_tracker -- self-checking test of the top-of-book tracker, together
// with the price-level array it scans.
//
// The testbench plays the book engine: it adds and removes orders at random
// penny levels of the four symbols (bids in the lower half of each window,
// asks in the upper half), writes each changed entry into the array and
// reports it as an event. After each event has settled it compares best
// bid/ask, their quantities, both depths and the empty-side flags of every
// symbol with values computed by brute force from its own copy of the book.
// It also times a 100-level downward scan (about 100 + 3 clocks) and checks
// that every kind of update (new best, refresh, scan, side emptied) happened.
module tb_tob_tracker;
  import itch_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                 ev_valid = 0, ev_ready, ev_side = 0, ev_was_valid = 0;
  logic [SYM_W-1:0]     ev_sym = 0;
  logic [WINDOW_W-1:0]  ev_off = 0;
  pa_entry_t            ev_entry = '0;
  logic [PA_ADDR_W-1:0] pa_addr, a_addr = 0;
  pa_entry_t            pa_rdata, a_rdata, a_wdata = '0;
  logic                 a_we = 0, init_busy;
  logic                 have_bid [N_SYMBOLS], have_ask [N_SYMBOLS];
  logic [WINDOW_W-1:0]  best_bid [N_SYMBOLS], best_ask [N_SYMBOLS];
  logic [31:0]          bid_qty [N_SYMBOLS], ask_qty [N_SYMBOLS];
  logic [WINDOW_W:0]    bid_depth [N_SYMBOLS], ask_depth [N_SYMBOLS];
  logic                 scanning;
  logic [31:0]          scan_count;

  price_level_array pa (.clk, .rst, .init_busy, .a_addr, .a_we, .a_wdata, .a_rdata,
                        .b_addr(pa_addr), .b_rdata(pa_rdata));
  tob_tracker dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // model: shares and orders per symbol and penny
  longint qty [4][2048];
  int     cnt [4][2048];
  int n_newbest = 0, n_refresh = 0, n_emptied = 0;

  // apply a change and report it
  task automatic update(input int s, input bit side, input int off, input longint dq, input int dc);
    pa_entry_t e;
    bit was;
    was = cnt[s][off] != 0;
    qty[s][off] += dq;
    cnt[s][off] += dc;
    e = '0;
    e.agg_qty = 32'(qty[s][off]);
    e.order_count = 16'(cnt[s][off]);
    e.valid = cnt[s][off] != 0;
    @(negedge clk);
    while (!ev_ready) @(negedge clk);
    // statistics on what the tracker is about to do
    if (!side) begin
      if (e.valid && (!have_bid[s] || off > best_bid[s])) n_newbest++;
      else if (e.valid && off == best_bid[s]) n_refresh++;
    end else begin
      if (e.valid && (!have_ask[s] || off < best_ask[s])) n_newbest++;
      else if (e.valid && off == best_ask[s]) n_refresh++;
    end
    a_addr = {2'(s), 11'(off)}; a_we = 1; a_wdata = e;
    ev_valid = 1; ev_sym = 2'(s); ev_side = side; ev_off = 11'(off);
    ev_entry = e; ev_was_valid = was;
    @(negedge clk);
    a_we = 0; ev_valid = 0;
    while (!ev_ready) @(negedge clk);
  endtask

  task automatic compare();
    for (int s = 0; s < 4; s++) begin
      int bb = -1, ba = -1, db = 0, da = 0;
      for (int o = 0; o < 1024; o++) if (cnt[s][o] != 0) begin bb = o; db++; end
      for (int o = 2047; o >= 1024; o--) if (cnt[s][o] != 0) begin ba = o; da++; end
      check(have_bid[s] == (bb >= 0), $sformatf("sym %0d have_bid", s));
      check(have_ask[s] == (ba >= 0), $sformatf("sym %0d have_ask", s));
      if (bb >= 0) begin
        check(best_bid[s] == 11'(bb), $sformatf("sym %0d best bid %0d vs %0d", s, best_bid[s], bb));
        check(bid_qty[s] == 32'(qty[s][bb]), $sformatf("sym %0d bid qty", s));
      end
      if (ba >= 0) begin
        check(best_ask[s] == 11'(ba), $sformatf("sym %0d best ask %0d vs %0d", s, best_ask[s], ba));
        check(ask_qty[s] == 32'(qty[s][ba]), $sformatf("sym %0d ask qty", s));
      end
      check(bid_depth[s] == 12'(db), $sformatf("sym %0d bid depth", s));
      check(ask_depth[s] == 12'(da), $sformatf("sym %0d ask depth", s));
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    foreach (qty[s, o]) begin qty[s][o] = 0; cnt[s][o] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    while (init_busy) @(posedge clk);

    // timed scan: bids at 500 and 400 on symbol 2; remove 500
    update(2, 0, 400, 10, 1);
    update(2, 0, 500, 20, 1);
    compare();
    @(negedge clk);
    while (!ev_ready) @(negedge clk);
    a_addr = {2'd2, 11'd500}; a_we = 1; a_wdata = '0;
    qty[2][500] = 0; cnt[2][500] = 0;
    ev_valid = 1; ev_sym = 2; ev_side = 0; ev_off = 500; ev_entry = '0; ev_was_valid = 1;
    t0 = $time;
    @(negedge clk);
    a_we = 0; ev_valid = 0;
    while (!ev_ready) @(negedge clk);
    t1 = ($time - t0) / 10;
    check(t1 >= 100 && t1 <= 106, $sformatf("100-level scan took %0d clocks", t1));
    compare();
    // empty the side: scan to the bottom of the window
    update(2, 0, 400, -10, -1);
    n_emptied += !have_bid[2];
    compare();

    for (int n = 0; n < 3000; n++) begin
      int s, o;
      bit side;
      s = $urandom % 4;
      side = $urandom % 2;
      // clustered prices near the inside of each side
      o = side ? 1024 + ($urandom % 40) : 1023 - ($urandom % 40);
      if (cnt[s][o] > 0 && ($urandom % 2)) begin
        // remove one order, or part of one
        if ($urandom % 2) update(s, side, o, -(qty[s][o] / cnt[s][o]), -1);
        else              update(s, side, o, -1, 0);
        if (!side && !have_bid[s]) n_emptied++;
        if (side && !have_ask[s]) n_emptied++;
      end else begin
        update(s, side, o, 1 + $urandom % 500, 1);
      end
      compare();
    end
    check(scan_count > 10, $sformatf("scans happened (%0d)", scan_count));
    check(n_newbest > 0 && n_refresh > 0 && n_emptied > 0, "every kind of update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
