// tb_vga_controller -- self-checking test of the 640 x 480 display.
//
// Surrounds the controller with models of the price-level array (two-clock
// read, quantities derived from the address), the caption buffer and the
// character ROM (one-clock reads; a glyph row is simply the character code,
// so the number of lit pixels on a line can be predicted), and toggles the
// tracker's scanning flag at random so that the depth copy must wait.
// Checks: line period 1,600 clocks with a 192-clock sync pulse, frame
// period 525 lines with a 2-line sync pulse, 1,280 visible clocks per line
// and 480 visible lines; that no array read is issued while the tracker
// scans; per depth row, the width of the green (bid) and red (ask) bars
// against the quantities 0-14 levels from the inside; per text line, the
// number of lit pixels against the caption codes and the hexadecimal
// statistics fields.
module tb_vga_controller;
  import itch_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                 have_bid = 1, have_ask = 1, tracker_scanning = 0, pa_req;
  logic [SYM_W-1:0]     sym = 2'd1;
  logic [WINDOW_W-1:0]  best_bid = 11'd1000, best_ask = 11'd1003;
  logic [31:0]          msg_count = 32'h0012_ABCD, msg_rate = 32'd4321, latency = 32'd77;
  logic [31:0]          bid_qty = 32'hBEEF, err_count = 32'd5;
  logic [PA_ADDR_W-1:0] pa_addr;
  pa_entry_t            pa_rdata = '0;
  logic [12:0]          text_addr;
  logic [7:0]           text_data = 0, font_row = 0;
  logic [11:0]          font_addr;
  logic [7:0]           vga_r, vga_g, vga_b;
  logic                 vga_hs, vga_vs, vga_blank_n;

  vga_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int qty_of(logic [12:0] a);
    return (int'(a) * 37) % 6000;
  endfunction
  function automatic logic [7:0] code_of(logic [12:0] a);
    return 8'(int'(a) * 7 + 3);
  endfunction

  // memory models
  logic [12:0] pa_a1;
  always_ff @(posedge clk) begin
    pa_a1 <= pa_addr;
    pa_rdata.agg_qty <= 32'(qty_of(pa_a1));
    text_data <= code_of(text_addr);
    font_row  <= font_addr[11:4];
  end

  int n_scan_reads = 0;
  always @(posedge clk) begin
    if (!rst && pa_req && tracker_scanning) n_scan_reads++;
    if (!rst) tracker_scanning <= ($urandom % 4) == 0;
  end

  // output pixel position: the stage-1 counters as latched with the outputs
  logic [9:0] o_hc, o_vc;
  always_ff @(posedge clk) if (dut.pix_en) begin o_hc <= dut.s1_hc; o_vc <= dut.s1_vc; end

  // timing measurements
  int t = 0, hs_fall = -1, vs_fall = -1, hs_period = 0, hs_low = 0, vs_period = 0, vs_low = 0;
  int hs_bad = 0, vs_bad = 0, frames = 0, vis_clocks = 0, vis_lines = 0, vis_bad = 0;
  logic hs_q = 1, vs_q = 1;
  int green [480], red [480], white [480];
  bit measure = 0;

  always @(posedge clk) begin
    t++;
    if (!rst) begin
      if (hs_q && !vga_hs) begin
        if (hs_fall >= 0 && t - hs_fall != 1600) hs_bad++;
        hs_fall = t; hs_period++;
      end
      if (!vga_hs) hs_low++;
      else if (!hs_q) begin if (hs_low != 192) hs_bad++; hs_low = 0; end
      if (vs_q && !vga_vs) begin
        if (vs_fall >= 0 && t - vs_fall != 1600 * 525) vs_bad++;
        vs_fall = t; vs_period++;
        // line statistics of the frame that just ended
        if (measure) begin
          if (vis_lines != 480) vis_bad++;
          frames++;
        end
        measure = vs_period >= 2;
        vis_lines = 0;
      end
      if (!vga_vs) vs_low++;
      else if (!vs_q) begin if (vs_low != 3200) vs_bad++; vs_low = 0; end
      hs_q = vga_hs; vs_q = vga_vs;
      if (vga_blank_n) begin
        vis_clocks++;
        if (o_hc == 0 && dut.pix_en) vis_lines++;
        if (measure && frames == 0) begin
          if (vga_g == 8'hFF && vga_r == 0) green[o_vc]++;
          if (vga_r == 8'hFF && vga_g == 0) red[o_vc]++;
          if (vga_r == 8'hFF && vga_g == 8'hFF && vga_b == 8'hFF) white[o_vc]++;
        end
      end
    end
  end

  function automatic logic [7:0] hex_ascii(logic [3:0] n);
    return (n < 10) ? 8'h30 + 8'(n) : 8'h37 + 8'(n);
  endfunction

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] vals [8];
    foreach (green[i]) begin green[i] = 0; red[i] = 0; white[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (frames == 1);
    check(hs_bad == 0 && hs_period > 1000, $sformatf("line period and hsync width (%0d bad)", hs_bad));
    check(vs_bad == 0 && vs_period >= 3, $sformatf("frame period and vsync width (%0d bad)", vs_bad));
    check(vis_bad == 0, "480 visible lines");
    check(n_scan_reads == 0, "no array read while the tracker scans");
    // depth bars: rows of 16 lines, level i from the inside
    for (int i = 0; i < 15; i++) begin
      int bq, aq, bl, al;
      bq = qty_of({sym, 11'(best_bid - i)});
      aq = qty_of({sym, 11'(best_ask + i)});
      bl = (bq >> 4) > 320 ? 320 : bq >> 4;
      al = (aq >> 4) > 320 ? 320 : aq >> 4;
      for (int l = 16 * i; l < 16 * i + 16; l++) begin
        check(green[l] == 2 * bl, $sformatf("line %0d bid bar %0d px vs %0d", l, green[l] / 2, bl));
        check(red[l] == 2 * al, $sformatf("line %0d ask bar %0d px vs %0d", l, red[l] / 2, al));
      end
    end
    // text lines
    vals = '{msg_count, msg_rate, latency, 32'(best_bid), 32'(best_ask),
             32'(best_ask - best_bid), bid_qty, err_count};
    for (int l = 240; l < 480; l++) begin
      int row, lit;
      row = l / 8;
      lit = 0;
      for (int c = 0; c < 80; c++) begin
        logic [7:0] code;
        code = code_of(13'(row * 80 + c));
        if (row >= 32 && row <= 46 && row % 2 == 0 && c >= 20 && c <= 27)
          code = hex_ascii(vals[(row - 32) / 2][4 * (27 - c) +: 4]);
        lit += $countones(code);
      end
      check(white[l] == 2 * lit, $sformatf("line %0d lit %0d vs %0d", l, white[l] / 2, lit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
