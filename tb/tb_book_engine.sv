// tb_book_engine -- self-checking test of the book engine with the memories
// it drives: a 1,024-slot order hash table, the full price-level array and
// the top-of-book tracker.
//
// The testbench plays the parser -> book FIFO: a queue of decoded messages
// (random Adds on four symbols, bids below asks, Execute, Execute-with-
// price, Cancel, Delete and Replace of live orders, plus Adds that fall out
// of the window or match no filter entry, and messages for unknown
// references). The same messages are applied to a software order book.
// After each message has settled it compares the number of live orders
// (HT_LOAD), best bid and ask with their quantities and depths per symbol,
// and every touched price level in the array memory. It also checks that
// each message produces one done strobe whose latency equals now - t_first,
// the clocks taken by one Add into an empty table, the win_err / miss /
// full_err strobes, and that the table refuses an Add once full.
module tb_book_engine;
  import itch_pkg::*;
  import itch_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int SLOTS = 1024;
  localparam int IW = 10;

  logic [31:0] now;
  always_ff @(posedge clk) now <= rst ? 32'd0 : now + 1;

  // engine
  logic        msg_avail, msg_pop, done, win_err, full_err, miss, busy;
  itch_msg_t   msg_in;
  logic [31:0] latency;
  // hash table
  logic        ht_cmd_valid, ht_cmd_ready, ht_rsp_valid, ht_rsp_found, ht_rsp_full, ht_busy;
  logic [1:0]  ht_cmd_op;
  logic [63:0] ht_cmd_ref;
  ht_slot_t    ht_cmd_slot, ht_rsp_slot;
  logic [IW-1:0] ht_cmd_idx, ht_rsp_idx;
  logic [31:0] ht_load, max_probe;
  // price array
  logic [PA_ADDR_W-1:0] pa_addr, pb_addr;
  logic        pa_we, pa_busy;
  pa_entry_t   pa_wdata, pa_rdata, pb_rdata;
  // tracker
  logic        ev_valid, ev_ready, ev_side, ev_was_valid;
  logic [SYM_W-1:0] ev_sym;
  logic [WINDOW_W-1:0] ev_off;
  pa_entry_t   ev_entry;
  logic        have_bid [N_SYMBOLS], have_ask [N_SYMBOLS];
  logic [WINDOW_W-1:0] best_bid [N_SYMBOLS], best_ask [N_SYMBOLS];
  logic [31:0] bid_qty [N_SYMBOLS], ask_qty [N_SYMBOLS];
  logic [WINDOW_W:0] bid_depth [N_SYMBOLS], ask_depth [N_SYMBOLS];
  logic        scanning;
  logic [31:0] scan_count;

  book_engine #(.HT_SLOTS(SLOTS)) dut (
    .clk, .rst, .run(1'b1), .mem_busy(ht_busy || pa_busy), .now,
    .msg_avail, .msg_in, .msg_pop,
    .ht_cmd_valid, .ht_cmd_ready, .ht_cmd_op, .ht_cmd_ref, .ht_cmd_slot, .ht_cmd_idx,
    .ht_rsp_valid, .ht_rsp_found, .ht_rsp_full, .ht_rsp_idx, .ht_rsp_slot,
    .pa_addr, .pa_we, .pa_wdata, .pa_rdata,
    .ev_valid, .ev_ready, .ev_sym, .ev_side, .ev_off, .ev_entry, .ev_was_valid,
    .done, .latency, .win_err, .full_err, .miss, .busy);

  order_hash_table #(.SLOTS(SLOTS)) ht (
    .clk, .rst, .stats_clear(1'b0), .init_busy(ht_busy),
    .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd_op(ht_cmd_op),
    .cmd_ref(ht_cmd_ref), .cmd_slot(ht_cmd_slot), .cmd_idx(ht_cmd_idx),
    .rsp_valid(ht_rsp_valid), .rsp_found(ht_rsp_found), .rsp_full(ht_rsp_full),
    .rsp_idx(ht_rsp_idx), .rsp_slot(ht_rsp_slot), .ht_load, .max_probe);

  price_level_array pa (
    .clk, .rst, .init_busy(pa_busy), .a_addr(pa_addr), .a_we(pa_we), .a_wdata(pa_wdata),
    .a_rdata(pa_rdata), .b_addr(pb_addr), .b_rdata(pb_rdata));

  tob_tracker trk (
    .clk, .rst, .ev_valid, .ev_ready, .ev_sym, .ev_side, .ev_off, .ev_entry, .ev_was_valid,
    .pa_addr(pb_addr), .pa_rdata(pb_rdata), .have_bid, .have_ask, .best_bid, .best_ask,
    .bid_qty, .ask_qty, .bid_depth, .ask_depth, .scanning, .scan_count);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ message FIFO
  itch_msg_t q[$];
  assign msg_avail = q.size() != 0;
  assign msg_in    = (q.size() != 0) ? q[0] : '0;
  always @(posedge clk) if (msg_pop) void'(q.pop_front());

  int n_done = 0, n_win = 0, n_full = 0, n_miss = 0, lat_bad = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (done) begin
        n_done++;
        if (latency != now - 1 - t_stamp) lat_bad++;
      end
      if (win_err)  n_win++;
      if (full_err) n_full++;
      if (miss)     n_miss++;
    end
  end
  logic [31:0] t_stamp = 0;

  book_model bk;
  int center [4] = '{5000, 12000, 30000, 800};

  task automatic send(input itch_msg_t mm);
    @(negedge clk);
    mm.t_first = now;
    t_stamp = now;
    q.push_back(mm);
    @(negedge clk);
    while (q.size() != 0 || busy || scanning || !ev_ready) @(negedge clk);
  endtask

  task automatic compare(input string tag);
    check(ht_load == 32'(bk.orders.num()), $sformatf("%s: HT_LOAD %0d vs %0d", tag, ht_load, bk.orders.num()));
    for (int s = 0; s < 4; s++) begin
      int bb, ba;
      bb = bk.best(s, 0);
      ba = bk.best(s, 1);
      check(have_bid[s] == (bb >= 0) && have_ask[s] == (ba >= 0), $sformatf("%s: sym %0d sides present", tag, s));
      if (bb >= 0) begin
        check(best_bid[s] == 11'(bb), $sformatf("%s: sym %0d best bid %0d vs %0d", tag, s, best_bid[s], bb));
        check(bid_qty[s] == 32'(bk.qty_at(s, bb)), $sformatf("%s: sym %0d bid qty", tag, s));
      end
      if (ba >= 0) begin
        check(best_ask[s] == 11'(ba), $sformatf("%s: sym %0d best ask %0d vs %0d", tag, s, best_ask[s], ba));
        check(ask_qty[s] == 32'(bk.qty_at(s, ba)), $sformatf("%s: sym %0d ask qty", tag, s));
      end
      check(bid_depth[s] == 12'(bk.depth(s, 0)), $sformatf("%s: sym %0d bid depth", tag, s));
      check(ask_depth[s] == 12'(bk.depth(s, 1)), $sformatf("%s: sym %0d ask depth", tag, s));
    end
  endtask

  task automatic compare_levels();
    foreach (bk.agg[k]) begin
      int s, o;
      s = k / 4096;
      o = k % 4096;
      check(pa.mem[{2'(s), 11'(o)}].agg_qty == 32'(bk.agg[k]) &&
            pa.mem[{2'(s), 11'(o)}].order_count == 16'(bk.cnt[k]) &&
            pa.mem[{2'(s), 11'(o)}].valid == (bk.cnt[k] != 0),
            $sformatf("level sym %0d off %0d", s, o));
    end
  endtask

  function automatic itch_msg_t mk_add(longint unsigned r, int s, bit side);
    itch_msg_t mm;
    int p;
    mm = '0;
    mm.kind = MSG_ADD; mm.sym_match = 1; mm.symbol_id = 2'(s);
    mm.order_ref = r; mm.side = side;
    mm.shares = 1 + $urandom % 5000;
    p = side ? center[s] + $urandom % 60 : center[s] - 1 - $urandom % 60;
    mm.price = p * 100 + $urandom % 100;
    return mm;
  endfunction

  function automatic longint unsigned pick_live();
    longint unsigned keys[$];
    foreach (bk.orders[r]) keys.push_back(r);
    return keys[$urandom % keys.size()];
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    itch_msg_t mm;
    longint unsigned next_ref = 1;
    int t0, n_sent = 0, exp_win = 0, exp_miss = 0, n_kind[6];
    bk = new();
    foreach (n_kind[k]) n_kind[k] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (ht_busy || pa_busy) @(posedge clk);

    // one Add into an empty table: clocks from the FIFO pop to done
    mm = mk_add(next_ref++, 0, 0);
    @(negedge clk);
    mm.t_first = now;
    t_stamp = now;
    q.push_back(mm);
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    check(t0 >= 8 && t0 <= 14, $sformatf("Add into an empty table took %0d clocks", t0));
    bk.add(mm.order_ref, 0, 0, mm.shares, mm.price);
    n_sent++;
    while (busy || scanning) @(negedge clk);
    compare("first add");

    for (int n = 0; n < 4000; n++) begin
      int k;
      k = $urandom % 100;
      mm = '0;
      if (bk.orders.num() < 20 || (k < 40 && bk.orders.num() < 600)) begin
        int s;
        s = $urandom % 4;
        mm = mk_add(next_ref++, s, $urandom % 2);
        if (k == 1 && bk.based[s]) begin                         // out of the window
          mm.price = (center[s] + 3000) * 100;
          exp_win++;
        end
        if (k == 2) mm.sym_match = 0;                            // filtered out
        if (k == 2) exp_miss++;
        if (mm.sym_match) bk.add(mm.order_ref, s, mm.side, mm.shares, mm.price);
      end else if (k < 45) begin
        // unknown reference
        mm.kind = msg_kind_e'(1 + $urandom % 5);
        mm.order_ref = 64'hFFFF_0000_0000 + n;
        mm.new_ref = next_ref++;
        mm.shares = 10;
        mm.price = center[0] * 100;
        exp_miss++;
      end else begin
        longint unsigned r;
        r = pick_live();
        mm.order_ref = r;
        if (k < 60) begin
          mm.kind = MSG_EXEC; mm.shares = 1 + $urandom % 3000;
          bk.reduce(r, mm.shares);
        end else if (k < 68) begin
          mm.kind = MSG_EXEC_PX; mm.shares = 1 + $urandom % 3000; mm.price = $urandom;
          bk.reduce(r, mm.shares);
        end else if (k < 80) begin
          mm.kind = MSG_CANCEL; mm.shares = 1 + $urandom % 3000;
          bk.reduce(r, mm.shares);
        end else if (k < 90) begin
          mm.kind = MSG_DELETE;
          bk.del(r);
        end else begin
          itch_msg_t a;
          a = mk_add(0, bk.orders[r].sym, bk.orders[r].side);
          mm.kind = MSG_REPLACE; mm.new_ref = next_ref++;
          mm.shares = a.shares; mm.price = a.price;
          if (k == 99) begin mm.price = (center[bk.orders[r].sym] + 3000) * 100; exp_win++; end
          bk.replace(r, mm.new_ref, mm.shares, mm.price);
        end
      end
      n_kind[mm.kind]++;
      send(mm);
      n_sent++;
      compare($sformatf("msg %0d", n));
      if (n % 100 == 0) compare_levels();
    end
    compare_levels();

    // fill the table and go one past
    while (bk.orders.num() < SLOTS) begin
      mm = mk_add(next_ref++, $urandom % 4, $urandom % 2);
      bk.add(mm.order_ref, mm.symbol_id, mm.side, mm.shares, mm.price);
      send(mm);
      n_sent++;
    end
    compare("full");
    mm = mk_add(next_ref++, 1, 0);
    send(mm);
    n_sent++;
    check(n_full == 1, $sformatf("full_err once (%0d)", n_full));
    compare("after full");
    compare_levels();
    repeat (3) @(posedge clk);

    check(n_done == n_sent, $sformatf("done strobes %0d vs %0d messages", n_done, n_sent));
    check(lat_bad == 0, $sformatf("%0d wrong latency values", lat_bad));
    check(n_win == exp_win && n_win == bk.n_win_err, $sformatf("win_err %0d vs %0d", n_win, exp_win));
    check(n_miss == exp_miss, $sformatf("miss %0d vs %0d", n_miss, exp_miss));
    check(max_probe > 1, "probe runs happened");
    for (int k = 0; k < 6; k++) check(n_kind[k] > 0, $sformatf("kind %0d exercised", k));
    $display("Add latency %0d clocks, %0d scans, max probe %0d", t0, scan_count, max_probe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
