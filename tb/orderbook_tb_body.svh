// orderbook_tb_body.svh -- end-to-end test shared by tb_orderbook_top
// (reduced hash table and rate window) and tb_orderbook_full (the top at its
// full size). The including module declares FULL, the DUT ports listed
// below and an instance named dut.
//
// Everything enters through the serial pin at BAUD_SEL 7 (14 clocks per
// bit) and the register bus, exactly as on the board:
//   1. after reset, wait for the memories to clear; check CONTROL's reset
//      value; program the four stock filters, BAUD_SEL and RUN; write a
//      caption into the text buffer.
//   2. send random framed ITCH messages (Add, plain and attributed, on four
//      filtered symbols and one unfiltered, Execute, Execute-with-price, Cancel, Delete, Replace,
//      some out-of-window prices, references chosen to collide in the hash
//      table, unsupported types, short messages, bytes with a bad stop bit)
//      and after each one compare MSG_COUNT, ERR_COUNT, HT_LOAD, LATENCY and
//      BEST_BID/BEST_ASK/BID_QTY/ASK_QTY/BID_DEPTH/ASK_DEPTH of a rotating
//      ACTIVE_STOCK with a software order book;
//   3. reset the statistics and check they restart from zero;
//   4. stop the engine (RUN = 0) and keep sending until the message FIFO
//      and then the receive FIFO fill and overflow; check STATUS and
//      ERR_COUNT; restart and check the queued messages are consumed.
// Each mechanism is counted as it happens (in the design or on its
// registers); any that never happened is a failure.

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ character ROM
  always_ff @(posedge clk) font_row <= font_addr[11:4];

  // ------------------------------------------------------------ register bus
  task automatic csr_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = a; avs_writedata = d;
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  task automatic csr_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_read = 1; avs_address = a;
    @(negedge clk);
    avs_chipselect = 0; avs_read = 0;
    d = avs_readdata;
  endtask

  localparam int BIT = 14;               // BAUD_SEL 7
  logic [1:0] active = 0;
  logic       run_bit = 1;
  function automatic logic [31:0] ctl_word(logic [1:0] s, logic r, logic clr);
    return {24'd0, 3'd7, clr, s, 1'b0, r};
  endfunction

  // ------------------------------------------------------------ serial line
  task automatic uart_byte(input logic [7:0] b, input bit bad_stop = 0);
    uart_rx_pin = 0;
    repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rx_pin = b[i];
      repeat (BIT) @(posedge clk);
    end
    uart_rx_pin = !bad_stop;
    repeat (BIT) @(posedge clk);
    if (bad_stop) begin
      uart_rx_pin = 1;
      repeat (3 * BIT) @(posedge clk);
    end
  endtask

  // send a framed message; bad_at >= 0 sends that byte with a bad stop bit
  // and drops the rest of the frame
  task automatic send(input bytes_t m, input int len = -1, input int bad_at = -1);
    bytes_t f;
    f = frame(m);
    if (len >= 0) begin f[1] = 8'(len >> 8); f[2] = 8'(len); end
    foreach (f[i]) begin
      if (i == bad_at) begin uart_byte(f[i], 1); break; end
      uart_byte(f[i]);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_ADD, M_ADD_MPID, M_EXEC, M_EXEC_PX, M_CANCEL, M_DELETE, M_REPLACE, M_FILTER_MISS,
    M_UNKNOWN_REF, M_WINDOW_ERR, M_PARSE_ERR, M_UNSUPPORTED, M_FRAME_ERR,
    M_COLLISION, M_BACK_SHIFT, M_SCAN, M_STATS_CLEAR, M_RATE,
    M_MSGFIFO_FULL, M_RXFIFO_FULL, M_OVERFLOW, M_CAPTION, M_DEPTH_COPY,
    M_FRAME, M_TEXT_PIXEL, M_BAR_PIXEL, M_N
  } mech_e;
  int mech [M_N];

  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_ht.we && dut.u_ht.op == 2'd3 && dut.u_ht.wdata.valid) mech[M_BACK_SHIFT]++;
      if (dut.mf_full)        mech[M_MSGFIFO_FULL]++;
      if (dut.rxf_full)       mech[M_RXFIFO_FULL]++;
      if (dut.rxf_ovf)        mech[M_OVERFLOW]++;
      if (dut.vga_pa_req)     mech[M_DEPTH_COPY]++;
      if (dut.fd_ferr)        mech[M_FRAME_ERR]++;
      if (dut.ps_err)         mech[M_PARSE_ERR]++;
      if (vga_blank_n && vga_b == 8'hFF) mech[M_TEXT_PIXEL]++;
      if (vga_blank_n && (vga_g == 8'hFF || vga_r == 8'hFF) && vga_b == 0) mech[M_BAR_PIXEL]++;
    end
  end
  logic vs_q = 1;
  always @(posedge clk) begin
    if (vs_q && !vga_vs) mech[M_FRAME]++;
    vs_q = vga_vs;
  end
  // a best-price scan starts after the event that empties the best level
  int scan_starts = 0;
  logic scan_q = 0;
  always @(posedge clk) begin
    if (dut.u_tob.scanning && !scan_q) begin scan_starts++; mech[M_SCAN]++; end
    scan_q = dut.u_tob.scanning;
  end

  // ------------------------------------------------------------ reference
  book_model bk;
  string names [5] = '{"AAPL", "MSFT", "NVDA", "TSLA", "GOOG"};
  int center [4] = '{1500, 20000, 9000, 300};
  int exp_msgs = 0, exp_errs = 0;

  task automatic settle();
    // wait until the engine has finished everything sent so far
    logic [31:0] d;
    int guard = 0;
    do begin
      csr_rd(8'h02, d);
      guard++;
    end while (d != 32'(exp_msgs) && guard < 2000);
    check(d == 32'(exp_msgs), $sformatf("MSG_COUNT %0d vs %0d", d, exp_msgs));
    while (dut.bk_busy || dut.trk_scanning) @(posedge clk);
  endtask

  task automatic compare(input string tag);
    logic [31:0] d;
    int bb, ba;
    bb = bk.best(active, 0);
    ba = bk.best(active, 1);
    csr_rd(8'h0A, d); check(d == 32'(exp_errs), $sformatf("%s: ERR_COUNT %0d vs %0d", tag, d, exp_errs));
    csr_rd(8'h18, d); check(d == 32'(bk.orders.num()), $sformatf("%s: HT_LOAD %0d vs %0d", tag, d, bk.orders.num()));
    csr_rd(8'h04, d); check(d == (bb < 0 ? 32'hFFFF_FFFF : 32'(bb)), $sformatf("%s: BEST_BID %0d vs %0d", tag, d, bb));
    csr_rd(8'h05, d); check(d == (ba < 0 ? 32'hFFFF_FFFF : 32'(ba)), $sformatf("%s: BEST_ASK %0d vs %0d", tag, d, ba));
    if (bb >= 0) begin csr_rd(8'h06, d); check(d == 32'(bk.qty_at(active, bb)), $sformatf("%s: BID_QTY", tag)); end
    if (ba >= 0) begin csr_rd(8'h07, d); check(d == 32'(bk.qty_at(active, ba)), $sformatf("%s: ASK_QTY", tag)); end
    csr_rd(8'h08, d); check(d == 32'(bk.depth(active, 0)), $sformatf("%s: BID_DEPTH", tag));
    csr_rd(8'h09, d); check(d == 32'(bk.depth(active, 1)), $sformatf("%s: ASK_DEPTH", tag));
  endtask

  function automatic longint unsigned pick_live();
    longint unsigned keys[$];
    foreach (bk.orders[r]) keys.push_back(r);
    return keys[$urandom % keys.size()];
  endfunction

  // a new reference; sometimes one that folds to the same home slot as a
  // live order (r ^ x ^ x << 14 has the same XOR-fold for any x)
  longint unsigned next_ref = 64'h0000_0100_0000_0001;
  function automatic longint unsigned new_ref();
    longint unsigned r;
    if (bk.orders.num() > 0 && ($urandom % 3) == 0) begin
      longint unsigned x;
      x = 1 + $urandom % 16383;
      r = pick_live() ^ x ^ (x << 14);
      if (!bk.orders.exists(r)) begin
        mech[M_COLLISION]++;
        return r;
      end
    end
    next_ref += 1 + $urandom % 5;
    return next_ref;
  endfunction

  task automatic add_order(input int s, input bit side, input bit far = 0);
    longint unsigned r;
    int unsigned sh, px, p;
    r  = new_ref();
    sh = 1 + $urandom % 5000;
    p  = side ? center[s] + $urandom % 50 : center[s] - 1 - $urandom % 50;
    if (far) p = center[s] + 4000;
    px = p * 100 + $urandom % 100;
    if (!bk.in_win(s, px)) begin mech[M_WINDOW_ERR]++; exp_errs++; end
    bk.add(r, s, side, sh, px);
    exp_msgs++;
    mech[M_ADD]++;
    if ($urandom % 4 == 0) begin
      send(msg_add(r, side, sh, names[s], px, 7, 1));   // attributed form 'F'
      mech[M_ADD_MPID]++;
    end else begin
      send(msg_add(r, side, sh, names[s], px));
    end
  endtask

  task automatic one_message(input int n);
    int k;
    k = $urandom % 100;
    if (bk.orders.num() < 12 || k < 35) begin
      add_order($urandom % 4, $urandom % 2, k == 7 && n > 20);
    end else if (k < 37) begin
      // unfiltered stock: decoded, counted, not booked
      send(msg_add(new_ref(), 0, 100, names[4], 100000));
      exp_msgs++;
      mech[M_FILTER_MISS]++;
    end else if (k < 39) begin
      send(msg_delete(64'hDEAD_0000 + n));
      exp_msgs++;
      mech[M_UNKNOWN_REF]++;
    end else if (k < 40) begin
      bytes_t b;
      b = blank(8'h53, 12, 0);          // system event: not a book message
      send(b);
      mech[M_UNSUPPORTED]++;
    end else if (k < 41) begin
      bytes_t b;
      b = msg_add(1, 0, 1, names[0], 1);
      b = b[0:29];                      // an Add six bytes short
      send(b);
      exp_errs++;
    end else if (k < 42) begin
      send(msg_delete(pick_live()), -1, 3 + $urandom % 15);
      exp_errs++;
    end else begin
      longint unsigned r;
      int unsigned sh;
      r  = pick_live();
      sh = 1 + $urandom % 3000;
      exp_msgs++;
      if (k < 58) begin
        send(msg_exec(r, sh)); bk.reduce(r, sh); mech[M_EXEC]++;
      end else if (k < 66) begin
        send(msg_exec_px(r, sh, $urandom)); bk.reduce(r, sh); mech[M_EXEC_PX]++;
      end else if (k < 78) begin
        send(msg_cancel(r, sh)); bk.reduce(r, sh); mech[M_CANCEL]++;
      end else if (k < 88) begin
        send(msg_delete(r)); bk.del(r); mech[M_DELETE]++;
      end else begin
        longint unsigned nr;
        int unsigned px, p;
        int s;
        s  = bk.orders[r].sym;
        p  = bk.orders[r].side ? center[s] + $urandom % 50 : center[s] - 1 - $urandom % 50;
        px = p * 100 + $urandom % 100;
        nr = new_ref();
        send(msg_replace(r, nr, sh, px));
        bk.replace(r, nr, sh, px);
        mech[M_REPLACE]++;
      end
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, err_before;
    int lat_lo, lat_hi, n_lat = 0;
    bk = new();
    foreach (mech[i]) mech[i] = 0;
    uart_rx_pin = 1;
    avs_address = 0; avs_chipselect = 0; avs_read = 0; avs_write = 0; avs_writedata = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. set-up
    csr_rd(8'h00, d);
    check(d == 32'h1, "CONTROL after reset: RUN, 115200 baud, stock 0");
    while (dut.ht_busy || dut.pa_busy) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      logic [63:0] w;
      w = filter_word(names[s]);
      csr_wr(8'h0C + 8'(2 * s), w[31:0]);
      csr_wr(8'h0C + 8'(2 * s + 1), w[63:32]);
    end
    csr_wr(8'h00, ctl_word(active, 1, 0));
    csr_rd(8'h00, d);
    check(d == ctl_word(active, 1, 0), "CONTROL written");
    begin
      string cap = "ORDER BOOK";
      for (int i = 0; i < cap.len(); i++) begin
        csr_wr(8'h1A, 32'(80 * 31 + 2 + i));
        csr_wr(8'h1B, 32'(cap[i]));
      end
      repeat (2) @(posedge clk);
      for (int i = 0; i < cap.len(); i++)
        check(dut.u_text.mem[80 * 31 + 2 + i] == cap[i], "caption in the text buffer");
      mech[M_CAPTION]++;
    end
    repeat (4 * BIT) @(posedge clk);

    // 2. random messages
    for (int n = 0; n < N_MSG; n++) begin
      int before_msgs;
      before_msgs = exp_msgs;
      one_message(n);
      settle();
      // latency of a message that reached the book: the body takes
      // (len - 1) byte times after its first byte, plus the book update,
      // which may wait for a scan of up to a whole 2,048-penny window
      if (exp_msgs != before_msgs) begin
        csr_rd(8'h03, d);
        lat_lo = 18 * 10 * BIT;
        lat_hi = 35 * 10 * BIT + 2 * BIT + 200 + 2048;
        check(d >= 32'(lat_lo) && d <= 32'(lat_hi), $sformatf("LATENCY %0d", d));
        n_lat++;
      end
      active = 2'(n % 4);
      csr_wr(8'h00, ctl_word(active, 1, 0));
      compare($sformatf("msg %0d", n));
    end
    csr_rd(8'h19, d);
    check(d > 1, $sformatf("MAX_PROBE %0d", d));
    csr_rd(8'h0B, d);
    if (!FULL) begin
      check(d > 0 && d < 32'(exp_msgs), $sformatf("MSG_RATE %0d", d));
      if (d > 0) mech[M_RATE]++;
    end
    csr_rd(8'h01, d);
    check(d[8] == 1'b1, "STATUS parse-error flag set");

    // 3. statistics reset
    csr_wr(8'h00, ctl_word(active, 1, 1));
    csr_rd(8'h02, d); check(d == 0, "MSG_COUNT cleared");
    csr_rd(8'h0A, d); check(d == 0, "ERR_COUNT cleared");
    csr_rd(8'h03, d); check(d == 0, "LATENCY cleared");
    csr_rd(8'h19, d); check(d == 0, "MAX_PROBE cleared");
    csr_rd(8'h01, d); check(d[8] == 1'b0, "parse-error flag cleared");
    csr_rd(8'h18, d); check(d == 32'(bk.orders.num()), "HT_LOAD kept");
    mech[M_STATS_CLEAR]++;
    exp_msgs = 0; exp_errs = 0;
    for (int n = 0; n < 10; n++) begin
      one_message(1000 + n);
      settle();
    end
    compare("after clear");

    // 4. back-pressure: engine stopped, unfiltered Adds until overflow
    csr_wr(8'h00, ctl_word(active, 0, 0));
    csr_rd(8'h0A, err_before);
    for (int n = 0; n < 64 + 12; n++) send(msg_add(64'hBEEF_0000 + n, 0, 100, names[4], 100000));
    csr_rd(8'h01, d);
    check(d[3] == 1'b1, "STATUS shows the receive FIFO full");
    csr_rd(8'h0A, d);
    check(d > err_before, "overflow counted in ERR_COUNT");
    csr_rd(8'h02, d);
    check(d == 32'(exp_msgs), "nothing booked while RUN = 0");
    csr_wr(8'h00, ctl_word(active, 1, 0));
    repeat (20_000) @(posedge clk);
    csr_rd(8'h02, d);
    check(d >= 32'(exp_msgs + 64), $sformatf("queued messages consumed after RUN (%0d)", d - exp_msgs));
    csr_rd(8'h18, d);
    check(d == 32'(bk.orders.num()), "book untouched by unfiltered Adds");

    // every mechanism must have happened
    if (!FULL) wait (mech[M_FRAME] >= 2);
    for (int i = 0; i < M_N; i++) begin
      mech_e e;
      e = mech_e'(i);
      if (FULL && e == M_RATE) continue;
      check(mech[i] > 0, $sformatf("mechanism %s happened", e.name()));
      $display("mechanism %-16s %0d", e.name(), mech[i]);
    end
    check(n_lat > 0 && scan_starts > 0, "latency and scans measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
