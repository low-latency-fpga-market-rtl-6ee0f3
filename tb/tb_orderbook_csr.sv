// tb_orderbook_csr -- self-checking test of the Avalon register file.
//
// Checks the reset value of CONTROL, write/readback of CONTROL, the eight
// STOCK_FILTER words and CHAR_MEM_ADDR, the one-clock clear pulse, the
// caption-buffer write strobe, that every read-only register returns its
// input (random values) with exactly one clock of read latency, that
// writes to read-only and unlisted offsets change nothing, and that reads
// without chipselect leave readdata alone.
module tb_orderbook_csr;
  import itch_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0]  address = 0;
  logic        chipselect = 0, read = 0, write = 0;
  logic [31:0] writedata = 0, readdata;
  logic        run, stats_clear, char_we;
  logic [1:0]  active_stock;
  logic [2:0]  baud_sel;
  logic [63:0] stock_filter [N_SYMBOLS];
  logic [12:0] char_addr;
  logic [7:0]  char_data;
  logic [2:0]  parser_state = 0;
  logic        fifo_full = 0, fifo_empty = 0, parse_error = 0;
  logic [31:0] msg_count = 0, latency = 0, best_bid = 0, best_ask = 0, bid_qty = 0, ask_qty = 0;
  logic [31:0] bid_depth = 0, ask_depth = 0, err_count = 0, msg_rate = 0, ht_load = 0, max_probe = 0;

  orderbook_csr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = a; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  // read: readdata must be valid on the clock after the request
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = a;
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, ctl;
    logic [31:0] filt [8];
    int clr_cycles;
    repeat (3) @(posedge clk);
    rst = 0;
    rd(8'h00, d);
    check(d == 32'h1 && run && baud_sel == 0 && active_stock == 0, "CONTROL reset value");

    for (int n = 0; n < 200; n++) begin
      int k;
      k = $urandom % 5;
      if (k == 0) begin
        ctl = $urandom & 32'hEF;   // no clear bit
        wr(8'h00, ctl);
        check(run == ctl[0] && active_stock == ctl[3:2] && baud_sel == ctl[7:5], "CONTROL outputs");
        rd(8'h00, d);
        check(d == {24'd0, ctl[7:5], 1'b0, ctl[3:2], 1'b0, ctl[0]}, "CONTROL readback");
      end else if (k == 1) begin
        for (int i = 0; i < 8; i++) begin filt[i] = $urandom; wr(8'h0C + 8'(i), filt[i]); end
        for (int s = 0; s < 4; s++)
          check(stock_filter[s] == {filt[2*s+1], filt[2*s]}, $sformatf("filter %0d", s));
        for (int i = 0; i < 8; i++) begin rd(8'h0C + 8'(i), d); check(d == filt[i], "filter readback"); end
      end else if (k == 2) begin
        // read-only registers: random inputs
        logic [31:0] v [14];
        foreach (v[i]) v[i] = $urandom;
        msg_count = v[0]; latency = v[1]; best_bid = v[2]; best_ask = v[3];
        bid_qty = v[4]; ask_qty = v[5]; bid_depth = v[6]; ask_depth = v[7];
        err_count = v[8]; msg_rate = v[9]; ht_load = v[10]; max_probe = v[11];
        parser_state = v[12][2:0]; fifo_full = v[12][3]; fifo_empty = v[12][4]; parse_error = v[12][5];
        for (int i = 0; i < 10; i++) begin rd(8'h02 + 8'(i), d); check(d == v[i], $sformatf("reg %0d", i + 2)); end
        rd(8'h18, d); check(d == v[10], "HT_LOAD");
        rd(8'h19, d); check(d == v[11], "MAX_PROBE");
        rd(8'h01, d); check(d == {23'd0, v[12][5], 3'd0, v[12][4:0]}, "STATUS");
        // writes to read-only or unlisted offsets change nothing
        wr(8'h02, 32'h1234); rd(8'h02, d); check(d == v[0], "MSG_COUNT not writable");
        wr(8'h40, 32'h1234); rd(8'h40, d); check(d == 0, "unlisted reads 0");
        ctl = {24'd0, baud_sel, 1'b0, active_stock, 1'b0, run};
        rd(8'h00, d); check(d == ctl, "CONTROL unchanged by other writes");
      end else if (k == 3) begin
        // caption write
        logic [12:0] a;
        logic [7:0] c;
        a = 13'($urandom % 4800); c = 8'($urandom);
        wr(8'h1A, 32'(a));
        rd(8'h1A, d); check(d == 32'(a), "CHAR_MEM_ADDR readback");
        @(negedge clk);
        chipselect = 1; write = 1; address = 8'h1B; writedata = 32'(c);
        @(negedge clk);
        chipselect = 0; write = 0;
        check(char_we && char_addr == a && char_data == c, "caption write strobe");
        @(negedge clk);
        check(!char_we, "caption strobe is one clock");
      end else begin
        // clear pulse: one clock, reads back as 0
        ctl = {24'd0, baud_sel, 1'b0, active_stock, 1'b0, run};
        @(negedge clk);
        chipselect = 1; write = 1; address = 8'h00; writedata = ctl | 32'h10;
        @(negedge clk);
        chipselect = 0; write = 0;
        clr_cycles = 0;
        repeat (4) begin clr_cycles += stats_clear; @(negedge clk); end
        check(clr_cycles == 1, $sformatf("clear pulse %0d clocks", clr_cycles));
        rd(8'h00, d); check(d == ctl, "clear bit reads 0");
      end
    end
    // no chipselect: readdata holds
    rd(8'h02, d);
    @(negedge clk); read = 1; address = 8'h03; chipselect = 0;
    @(negedge clk); read = 0;
    check(readdata == d, "read without chipselect ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
