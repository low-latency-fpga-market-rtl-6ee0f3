// orderbook_top -- market-data parser and hardware order book, from serial
// pin to top-of-book registers and VGA display.
//
// Data path (one 50 MHz clock, no processor in it):
//   uart_rx          serial pin -> bytes, with framing-error flags
//   sync_fifo (rx)   256-entry receive FIFO of {frame_error, byte}
//   frame_delimiter  0x00 / length-framed byte stream -> ITCH messages
//   itch_parser      message bytes -> itch_msg_t records
//   sync_fifo (msg)  64-entry FIFO of decoded messages
//   book_engine      applies each message to
//     order_hash_table   live orders by reference (16,384 slots)
//     price_level_array  per-penny aggregates (8,192 entries, dual port)
//     tob_tracker        best bid/ask, quantities, depths per symbol
//   stats_counters   message, latency, error and rate counters
//   orderbook_csr    Avalon-MM register file for the host
//   text_buffer + vga_controller  640 x 480 depth and statistics display
//
// The serial input is also brought out unchanged (rx_to_host) for a
// software reference decoder. The character ROM of the display is not part
// of this design; its read port is brought out (font_addr / font_row, one
// clock of read latency).
//
// Registers of the symbol selected by ACTIVE_STOCK are shown on the bus:
// BEST_BID / BEST_ASK read as the penny offset in the symbol's window, or
// 0xFFFF_FFFF while that side of the book is empty.
//
// Parameters: HT_SLOTS is the hash-table size, RATE_WINDOW the clocks in one
// MSG_RATE window (one second at 50 MHz); the FIFO depths follow the
// memory budget. Reset is synchronous and active high; after it the two
// big memories clear themselves (16,384 clocks) before messages are taken.
//
// Some sub-block outputs are left unconnected here and show up as unused
// signals in lint: the UART state, the two FIFO fill counts, the engine's
// miss and busy flags and the tracker's scan counter. They are observation
// points for tests and debugging, not part of the register map.
module orderbook_top
  import itch_pkg::*;
#(
  parameter int unsigned HT_SLOTS       = HT_SLOTS_DEFAULT,
  parameter int unsigned RATE_WINDOW    = CLK_HZ_DEFAULT,
  parameter int unsigned RX_FIFO_DEPTH  = 256,
  parameter int unsigned MSG_FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  // market data
  input  logic        uart_rx_pin,
  output logic        rx_to_host,
  // Avalon-MM slave (word addresses)
  input  logic [7:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // character ROM
  output logic [11:0] font_addr,
  input  logic [7:0]  font_row,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n
);

  localparam int unsigned HW = $clog2(HT_SLOTS);

  assign rx_to_host = uart_rx_pin;

  // ---------------------------------------------------------------- control
  logic        run, stats_clear;
  logic [1:0]  active_stock;
  logic [2:0]  baud_sel;
  logic [63:0] stock_filter [N_SYMBOLS];
  logic        char_we;
  logic [12:0] char_addr;
  logic [7:0]  char_data;
  logic [31:0] now;

  always_ff @(posedge clk) begin
    if (rst) now <= '0;
    else     now <= now + 1;
  end

  // ---------------------------------------------------------------- serial
  logic [7:0] rx_byte;
  logic       rx_valid, rx_ferr;
  logic [1:0] rx_state;

  uart_rx u_rx (
    .clk, .rst,
    .rx         (uart_rx_pin),
    .bit_cycles (baud_cycles(baud_sel)),
    .data       (rx_byte),
    .valid      (rx_valid),
    .frame_error(rx_ferr),
    .state_dbg  (rx_state)
  );

  logic [8:0] rxf_dout;
  logic       rxf_empty, rxf_full, rxf_ovf, rxf_pop;
  logic [$clog2(RX_FIFO_DEPTH):0] rxf_count;

  sync_fifo #(.WIDTH(9), .DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst,
    .push    (rx_valid || rx_ferr),
    .din     ({rx_ferr, rx_byte}),
    .pop     (rxf_pop),
    .dout    (rxf_dout),
    .empty   (rxf_empty),
    .full    (rxf_full),
    .overflow(rxf_ovf),
    .count   (rxf_count)
  );

  // ---------------------------------------------------------------- framing
  logic        fd_in_ready, fd_valid, fd_sof, fd_eom, fd_abort, fd_ferr;
  logic [7:0]  fd_data;
  logic [15:0] fd_len;
  logic        ps_in_ready;

  assign rxf_pop = !rxf_empty && fd_in_ready;

  frame_delimiter u_delim (
    .clk, .rst,
    .in_valid (!rxf_empty),
    .in_data  (rxf_dout[7:0]),
    .in_ferr  (rxf_dout[8]),
    .in_ready (fd_in_ready),
    .out_valid(fd_valid),
    .out_data (fd_data),
    .out_sof  (fd_sof),
    .out_eom  (fd_eom),
    .out_len  (fd_len),
    .out_ready(ps_in_ready),
    .out_abort(fd_abort),
    .ferr     (fd_ferr)
  );

  // ---------------------------------------------------------------- parser
  itch_msg_t  ps_msg, mf_dout;
  logic       ps_msg_valid, ps_err;
  logic [2:0] ps_state;
  logic       mf_empty, mf_full, mf_ovf, mf_pop;
  logic [$clog2(MSG_FIFO_DEPTH):0] mf_count;

  itch_parser u_parser (
    .clk, .rst,
    .in_valid    (fd_valid),
    .in_data     (fd_data),
    .in_sof      (fd_sof),
    .in_eom      (fd_eom),
    .in_len      (fd_len),
    .in_abort    (fd_abort),
    .in_ready    (ps_in_ready),
    .stock_filter(stock_filter),
    .now         (now),
    .msg_full    (mf_full),
    .msg_valid   (ps_msg_valid),
    .msg         (ps_msg),
    .parse_err   (ps_err),
    .state_dbg   (ps_state)
  );

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(MSG_FIFO_DEPTH)) u_msg_fifo (
    .clk, .rst,
    .push    (ps_msg_valid),
    .din     (ps_msg),
    .pop     (mf_pop),
    .dout    (mf_dout),
    .empty   (mf_empty),
    .full    (mf_full),
    .overflow(mf_ovf),
    .count   (mf_count)
  );

  // ---------------------------------------------------------------- book
  logic           ht_busy, pa_busy;
  logic           ht_cmd_valid, ht_cmd_ready, ht_rsp_valid, ht_rsp_found, ht_rsp_full;
  logic [1:0]     ht_cmd_op;
  logic [63:0]    ht_cmd_ref;
  ht_slot_t       ht_cmd_slot, ht_rsp_slot;
  logic [HW-1:0]  ht_cmd_idx, ht_rsp_idx;
  logic [31:0]    ht_load, max_probe;

  order_hash_table #(.SLOTS(HT_SLOTS)) u_ht (
    .clk, .rst,
    .stats_clear(stats_clear),
    .init_busy  (ht_busy),
    .cmd_valid  (ht_cmd_valid),
    .cmd_ready  (ht_cmd_ready),
    .cmd_op     (ht_cmd_op),
    .cmd_ref    (ht_cmd_ref),
    .cmd_slot   (ht_cmd_slot),
    .cmd_idx    (ht_cmd_idx),
    .rsp_valid  (ht_rsp_valid),
    .rsp_found  (ht_rsp_found),
    .rsp_full   (ht_rsp_full),
    .rsp_idx    (ht_rsp_idx),
    .rsp_slot   (ht_rsp_slot),
    .ht_load    (ht_load),
    .max_probe  (max_probe)
  );

  logic [PA_ADDR_W-1:0] pa_a_addr, pa_b_addr, trk_addr, vga_pa_addr;
  logic                 pa_a_we, vga_pa_req;
  pa_entry_t            pa_a_wdata, pa_a_rdata, pa_b_rdata;

  price_level_array u_pa (
    .clk, .rst,
    .init_busy(pa_busy),
    .a_addr   (pa_a_addr),
    .a_we     (pa_a_we),
    .a_wdata  (pa_a_wdata),
    .a_rdata  (pa_a_rdata),
    .b_addr   (pa_b_addr),
    .b_rdata  (pa_b_rdata)
  );

  logic                ev_valid, ev_ready, ev_side, ev_was_valid;
  logic [SYM_W-1:0]    ev_sym;
  logic [WINDOW_W-1:0] ev_off;
  pa_entry_t           ev_entry;
  logic                bk_done, bk_win_err, bk_full_err, bk_miss, bk_busy;
  logic [31:0]         bk_latency;

  book_engine #(.HT_SLOTS(HT_SLOTS)) u_engine (
    .clk, .rst,
    .run          (run),
    .mem_busy     (ht_busy || pa_busy),
    .now          (now),
    .msg_avail    (!mf_empty),
    .msg_in       (mf_dout),
    .msg_pop      (mf_pop),
    .ht_cmd_valid (ht_cmd_valid),
    .ht_cmd_ready (ht_cmd_ready),
    .ht_cmd_op    (ht_cmd_op),
    .ht_cmd_ref   (ht_cmd_ref),
    .ht_cmd_slot  (ht_cmd_slot),
    .ht_cmd_idx   (ht_cmd_idx),
    .ht_rsp_valid (ht_rsp_valid),
    .ht_rsp_found (ht_rsp_found),
    .ht_rsp_full  (ht_rsp_full),
    .ht_rsp_idx   (ht_rsp_idx),
    .ht_rsp_slot  (ht_rsp_slot),
    .pa_addr      (pa_a_addr),
    .pa_we        (pa_a_we),
    .pa_wdata     (pa_a_wdata),
    .pa_rdata     (pa_a_rdata),
    .ev_valid     (ev_valid),
    .ev_ready     (ev_ready),
    .ev_sym       (ev_sym),
    .ev_side      (ev_side),
    .ev_off       (ev_off),
    .ev_entry     (ev_entry),
    .ev_was_valid (ev_was_valid),
    .done         (bk_done),
    .latency      (bk_latency),
    .win_err      (bk_win_err),
    .full_err     (bk_full_err),
    .miss         (bk_miss),
    .busy         (bk_busy)
  );

  logic                have_bid  [N_SYMBOLS], have_ask  [N_SYMBOLS];
  logic [WINDOW_W-1:0] best_bid  [N_SYMBOLS], best_ask  [N_SYMBOLS];
  logic [31:0]         bid_qty   [N_SYMBOLS], ask_qty   [N_SYMBOLS];
  logic [WINDOW_W:0]   bid_depth [N_SYMBOLS], ask_depth [N_SYMBOLS];
  logic                trk_scanning;
  logic [31:0]         trk_scans;

  tob_tracker u_tob (
    .clk, .rst,
    .ev_valid    (ev_valid),
    .ev_ready    (ev_ready),
    .ev_sym      (ev_sym),
    .ev_side     (ev_side),
    .ev_off      (ev_off),
    .ev_entry    (ev_entry),
    .ev_was_valid(ev_was_valid),
    .pa_addr     (trk_addr),
    .pa_rdata    (pa_b_rdata),
    .have_bid    (have_bid),
    .have_ask    (have_ask),
    .best_bid    (best_bid),
    .best_ask    (best_ask),
    .bid_qty     (bid_qty),
    .ask_qty     (ask_qty),
    .bid_depth   (bid_depth),
    .ask_depth   (ask_depth),
    .scanning    (trk_scanning),
    .scan_count  (trk_scans)
  );

  // port B: the tracker's scan first, the display's copy otherwise
  assign pa_b_addr = vga_pa_req ? vga_pa_addr : trk_addr;

  // ---------------------------------------------------------------- stats
  logic [31:0] msg_count, latency, err_count, msg_rate;
  logic        parse_error;

  stats_counters #(.WINDOW(RATE_WINDOW)) u_stats (
    .clk, .rst,
    .clear       (stats_clear),
    .done        (bk_done),
    .done_latency(bk_latency),
    .err_frame   (fd_ferr),
    .err_parse   (ps_err),
    .err_window  (bk_win_err),
    .err_full    (bk_full_err),
    .err_overflow(rxf_ovf || mf_ovf),
    .msg_count   (msg_count),
    .latency     (latency),
    .err_count   (err_count),
    .msg_rate    (msg_rate),
    .parse_error (parse_error)
  );

  // ---------------------------------------------------------------- registers
  logic [31:0] sel_best_bid, sel_best_ask;
  assign sel_best_bid = have_bid[active_stock] ? 32'(best_bid[active_stock]) : 32'hFFFF_FFFF;
  assign sel_best_ask = have_ask[active_stock] ? 32'(best_ask[active_stock]) : 32'hFFFF_FFFF;

  orderbook_csr u_csr (
    .clk, .rst,
    .address     (avs_address),
    .chipselect  (avs_chipselect),
    .read        (avs_read),
    .write       (avs_write),
    .writedata   (avs_writedata),
    .readdata    (avs_readdata),
    .run         (run),
    .active_stock(active_stock),
    .stats_clear (stats_clear),
    .baud_sel    (baud_sel),
    .stock_filter(stock_filter),
    .char_we     (char_we),
    .char_addr   (char_addr),
    .char_data   (char_data),
    .parser_state(ps_state),
    .fifo_full   (rxf_full),
    .fifo_empty  (rxf_empty),
    .parse_error (parse_error),
    .msg_count   (msg_count),
    .latency     (latency),
    .best_bid    (sel_best_bid),
    .best_ask    (sel_best_ask),
    .bid_qty     (bid_qty[active_stock]),
    .ask_qty     (ask_qty[active_stock]),
    .bid_depth   (32'(bid_depth[active_stock])),
    .ask_depth   (32'(ask_depth[active_stock])),
    .err_count   (err_count),
    .msg_rate    (msg_rate),
    .ht_load     (ht_load),
    .max_probe   (max_probe)
  );

  // ---------------------------------------------------------------- display
  logic [12:0] text_raddr;
  logic [7:0]  text_rdata;

  text_buffer u_text (
    .clk,
    .we   (char_we),
    .waddr(char_addr),
    .wdata(char_data),
    .raddr(text_raddr),
    .rdata(text_rdata)
  );

  vga_controller u_vga (
    .clk, .rst,
    .have_bid        (have_bid[active_stock]),
    .have_ask        (have_ask[active_stock]),
    .sym             (active_stock),
    .best_bid        (best_bid[active_stock]),
    .best_ask        (best_ask[active_stock]),
    .msg_count       (msg_count),
    .msg_rate        (msg_rate),
    .latency         (latency),
    .bid_qty         (bid_qty[active_stock]),
    .err_count       (err_count),
    .tracker_scanning(trk_scanning),
    .pa_req          (vga_pa_req),
    .pa_addr         (vga_pa_addr),
    .pa_rdata        (pa_b_rdata),
    .text_addr       (text_raddr),
    .text_data       (text_rdata),
    .font_addr       (font_addr),
    .font_row        (font_row),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n
  );

endmodule
