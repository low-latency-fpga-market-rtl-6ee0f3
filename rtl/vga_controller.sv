// vga_controller -- 640 x 480 display of the live order book.
//
// Timing: the industry-standard 640 x 480, 60 Hz mode with a 25 MHz pixel
// rate, derived from the 50 MHz clock by a pixel enable on every second
// clock: 800 clocks per line (640 visible, 16 front porch, 96 sync, 48 back
// porch) and 525 lines per frame (480, 10, 2, 33), negative sync pulses.
//
// Top half (lines 0-239): depth of book of the selected symbol. Fifteen
// rows of 16 lines; row i shows the price level i pennies from the inside.
// Bids grow left from the centre line in green, asks grow right in red,
// each bar 1 pixel per 2^QTY_SHIFT shares, clipped at 320 pixels. The 30
// quantities are copied from the price-level array once per frame, during
// vertical blanking, through the array's read-only port; the copy only
// issues a read while the top-of-book tracker is not scanning, and the two
// share the port's data by tagging their own reads.
//
// Bottom half (lines 240-479): text. The screen is 80 x 60 cells of 8 x 8
// pixels; a cell shows its character from the caption buffer, except the
// eight value fields (columns 20-27 of text rows 32, 34, ..., 46), which
// show in hexadecimal MSG_COUNT, MSG_RATE, LATENCY, BEST_BID, BEST_ASK,
// the spread BEST_ASK - BEST_BID, BID_QTY and ERR_COUNT. Glyphs come from
// an external character ROM, one registered read (font_addr -> font_row
// one clock later) of 8 pixels, MSB leftmost; a cell uses the even rows of
// the 16-row glyph. Text is white on black.
//
// Pipeline: a pixel's colour and syncs appear two clocks (one pixel) after
// its counters, all delayed alike.
//
// The screen layout (depth bars on top, statistics below, colours, sides)
// follows the design description. The bar scale, the number of rows, the
// hexadecimal value fields and the 8 x 8 cell (the caption buffer is 80 x 60
// cells, which fits 8-line cells, while the character ROM holds 16-line
// glyphs) are this design's own choices.
//
// Of each price-array entry only the aggregate shares are drawn; the other
// bits of pa_rdata are unused on purpose.
module vga_controller
  import itch_pkg::*;
#(
  parameter int unsigned QTY_SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // values to show (selected symbol)
  input  logic                 have_bid,
  input  logic                 have_ask,
  input  logic [SYM_W-1:0]     sym,
  input  logic [WINDOW_W-1:0]  best_bid,
  input  logic [WINDOW_W-1:0]  best_ask,
  input  logic [31:0]          msg_count,
  input  logic [31:0]          msg_rate,
  input  logic [31:0]          latency,
  input  logic [31:0]          bid_qty,
  input  logic [31:0]          err_count,
  // price array read port, shared with the tracker
  input  logic                 tracker_scanning,
  output logic                 pa_req,        // this cycle's read is ours
  output logic [PA_ADDR_W-1:0] pa_addr,
  input  pa_entry_t            pa_rdata,
  // caption buffer
  output logic [12:0]          text_addr,
  input  logic [7:0]           text_data,
  // character ROM
  output logic [11:0]          font_addr,     // {code, glyph row}
  input  logic [7:0]           font_row,
  // VGA
  output logic [7:0]           vga_r,
  output logic [7:0]           vga_g,
  output logic [7:0]           vga_b,
  output logic                 vga_hs,
  output logic                 vga_vs,
  output logic                 vga_blank_n
);

  localparam int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_TOT = 800;
  localparam int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_TOT = 525;
  localparam int unsigned LEVELS = 15;

  // ---------------------------------------------------------------- counters
  logic       pix_en;
  logic [9:0] hc, vc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_en <= 1'b0;
      hc     <= '0;
      vc     <= '0;
    end else begin
      pix_en <= !pix_en;
      if (pix_en) begin
        if (hc == 10'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == 10'(V_TOT - 1)) ? '0 : vc + 10'd1;
        end else begin
          hc <= hc + 10'd1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- depth copy
  logic [31:0] bid_lvl [LEVELS];
  logic [31:0] ask_lvl [LEVELS];
  logic [4:0]  rd_n;            // next read: 0..14 bids, 15..29 asks
  logic        p1_v, p2_v;
  logic [4:0]  p1_n, p2_n;
  logic        vblank;
  logic [4:0]  lvl_i;
  logic [WINDOW_W:0] lvl_off;  // one extra bit: out of window
  logic        lvl_ok;

  assign vblank = (vc >= 10'(V_VIS));
  assign lvl_i  = (rd_n < 5'(LEVELS)) ? rd_n : rd_n - 5'(LEVELS);

  always_comb begin
    if (rd_n < 5'(LEVELS)) begin
      lvl_off = {1'b0, best_bid} - (WINDOW_W+1)'(lvl_i);
      lvl_ok  = have_bid && !lvl_off[WINDOW_W];
    end else begin
      lvl_off = {1'b0, best_ask} + (WINDOW_W+1)'(lvl_i);
      lvl_ok  = have_ask && !lvl_off[WINDOW_W];
    end
  end

  assign pa_req  = vblank && !tracker_scanning && (rd_n < 5'(2 * LEVELS)) && lvl_ok;
  assign pa_addr = {sym, lvl_off[WINDOW_W-1:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_n <= '0;
      p1_v <= 1'b0;
      p2_v <= 1'b0;
      p1_n <= '0;
      p2_n <= '0;
      for (int i = 0; i < LEVELS; i++) begin
        bid_lvl[i] <= '0;
        ask_lvl[i] <= '0;
      end
    end else begin
      p1_v <= pa_req;
      p1_n <= rd_n;
      p2_v <= p1_v;
      p2_n <= p1_n;
      if (!vblank) begin
        rd_n <= '0;
      end else if (rd_n < 5'(2 * LEVELS) && !tracker_scanning) begin
        rd_n <= rd_n + 5'd1;
        // a level outside the window, or an empty side, shows nothing
        if (!lvl_ok) begin
          if (rd_n < 5'(LEVELS)) bid_lvl[4'(lvl_i)] <= '0;
          else                   ask_lvl[4'(lvl_i)] <= '0;
        end
      end
      if (p2_v) begin
        if (p2_n < 5'(LEVELS)) bid_lvl[4'(p2_n)]                <= pa_rdata.agg_qty;
        else                   ask_lvl[4'(p2_n - 5'(LEVELS))] <= pa_rdata.agg_qty;
      end
    end
  end

  // ---------------------------------------------------------------- text
  // value field of a text row: which statistic, if any
  function automatic logic [31:0] stat_value(input logic [2:0] k,
      input logic [31:0] c, r, l, bb, ba, bq, e, input logic hb, ha);
    unique case (k)
      3'd0: return c;
      3'd1: return r;
      3'd2: return l;
      3'd3: return hb ? bb : 32'hFFFF_FFFF;
      3'd4: return ha ? ba : 32'hFFFF_FFFF;
      3'd5: return (hb && ha) ? ba - bb : 32'hFFFF_FFFF;
      3'd6: return bq;
      default: return e;
    endcase
  endfunction

  function automatic logic [7:0] hex_ascii(input logic [3:0] n);
    return (n < 4'd10) ? 8'h30 + 8'(n) : 8'h37 + 8'(n);
  endfunction

  logic [6:0] col;
  logic [5:0] row;
  assign col       = hc[9:3];
  assign row       = vc[8:3];
  assign text_addr = 13'(row) * 13'd80 + 13'(col);

  // stage 1 (one clock after the counters): cell code -> font address
  logic [9:0] s1_hc, s1_vc;
  logic       s1_stat;
  logic [2:0] s1_k;
  logic [2:0] s1_digit;
  logic [31:0] s1_val;
  logic [7:0] code;

  always_ff @(posedge clk) begin
    if (pix_en) begin
      s1_hc    <= hc;
      s1_vc    <= vc;
      s1_stat  <= (row >= 6'd32) && (row <= 6'd46) && !row[0] && (col >= 7'd20) && (col <= 7'd27);
      s1_k     <= 3'((row - 6'd32) >> 1);
      s1_digit <= 3'(7'd27 - col);
    end
  end

  assign s1_val    = stat_value(s1_k, msg_count, msg_rate, latency,
                                32'(best_bid), 32'(best_ask), bid_qty, err_count,
                                have_bid, have_ask);
  assign code      = s1_stat ? hex_ascii(s1_val[4*s1_digit +: 4]) : text_data;
  assign font_addr = {code, s1_vc[2:0], 1'b0};

  // stage 2 (two clocks after the counters): colour and syncs
  logic [31:0] bar_qty;
  logic [9:0]  bar_len;
  logic [3:0]  lvl_row;
  logic        left;
  logic        in_bar, text_on, vis;

  always_comb begin
    lvl_row = s1_vc[7:4];
    left    = (s1_hc < 10'd320);
    bar_qty = '0;
    if (lvl_row < 4'(LEVELS)) bar_qty = left ? bid_lvl[lvl_row] : ask_lvl[lvl_row];
    bar_len = ((bar_qty >> QTY_SHIFT) > 32'd320) ? 10'd320 : 10'(bar_qty >> QTY_SHIFT);
    in_bar  = (s1_vc < 10'd240) && (lvl_row < 4'(LEVELS)) &&
              (left ? (10'd320 - s1_hc <= bar_len) : (s1_hc - 10'd320 < bar_len));
    text_on = (s1_vc >= 10'd240) && font_row[3'd7 - s1_hc[2:0]];
    vis     = (s1_hc < 10'(H_VIS)) && (s1_vc < 10'(V_VIS));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_en) begin
      vga_hs      <= !((s1_hc >= 10'(H_VIS + H_FP)) && (s1_hc < 10'(H_VIS + H_FP + H_SYNC)));
      vga_vs      <= !((s1_vc >= 10'(V_VIS + V_FP)) && (s1_vc < 10'(V_VIS + V_FP + V_SYNC)));
      vga_blank_n <= vis;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      if (vis) begin
        if (in_bar && left)  vga_g <= 8'hFF;
        if (in_bar && !left) vga_r <= 8'hFF;
        if (text_on) begin
          vga_r <= 8'hFF;
          vga_g <= 8'hFF;
          vga_b <= 8'hFF;
        end
      end
    end
  end

endmodule
