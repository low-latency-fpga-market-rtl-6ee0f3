// tob_tracker -- incremental top-of-book and depth tracking for the four
// filtered symbols.
//
// The book engine reports every price-array write as an event: symbol,
// side, penny offset, the entry as written and whether the entry was valid
// before. Per symbol and side the tracker keeps the best price (a penny
// offset in the symbol's 2,048-penny window), the shares at that price and
// the number of valid price levels (depth). For a bid event:
//   * a now-valid level above the best bid (or with no best bid) becomes
//     the best bid, and its shares the bid quantity;
//   * an event at the best bid that leaves the level valid only refreshes
//     the bid quantity;
//   * an event at the best bid that clears the level starts a scan down the
//     window from the level below for the next valid entry, which becomes
//     the new best bid; reaching the bottom of the window empties the side.
// The ask side is the mirror image (lower is better, the scan goes up).
// Depth counts go up or down when an event turns valid on or off.
//
// The scan reads the price array through its second port, one address per
// clock, with the array's two-clock read latency; the first valid entry to
// come back ends it and reads still in flight are discarded. A scan of k
// levels therefore takes about k+3 clocks. While it runs ev_ready is low; the
// engine keeps looking up and inserting orders in the hash table and only
// waits before its next price-array write.
//
// The price array holds one entry per penny and symbol, with no side, so
// the scans rely on bids lying below asks (an uncrossed book).
//
// Outputs: per-symbol arrays, and the same values of the symbol selected by
// active_stock for the register file. An empty side reads have_bid/have_ask
// low. The update rules and the scan follow the design description; the
// event interface, the per-symbol depth counters (so that changing
// active_stock needs no recount) and the empty-side flags are this design's
// own.
//
// Only the valid bit and the aggregate shares of an entry matter here; the
// order-count and reserved bits of ev_entry and pa_rdata are unused on purpose.
module tob_tracker
  import itch_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // update events from the book engine
  input  logic                  ev_valid,
  output logic                  ev_ready,
  input  logic [SYM_W-1:0]      ev_sym,
  input  logic                  ev_side,        // 0 bid, 1 ask
  input  logic [WINDOW_W-1:0]   ev_off,
  input  pa_entry_t             ev_entry,       // entry after the write
  input  logic                  ev_was_valid,   // entry valid before the write
  // price array, read-only port
  output logic [PA_ADDR_W-1:0]  pa_addr,
  input  pa_entry_t             pa_rdata,
  // state of every symbol
  output logic                  have_bid  [N_SYMBOLS],
  output logic                  have_ask  [N_SYMBOLS],
  output logic [WINDOW_W-1:0]   best_bid  [N_SYMBOLS],
  output logic [WINDOW_W-1:0]   best_ask  [N_SYMBOLS],
  output logic [31:0]           bid_qty   [N_SYMBOLS],
  output logic [31:0]           ask_qty   [N_SYMBOLS],
  output logic [WINDOW_W:0]     bid_depth [N_SYMBOLS],
  output logic [WINDOW_W:0]     ask_depth [N_SYMBOLS],
  // scan statistics
  output logic                  scanning,
  output logic [31:0]           scan_count
);

  typedef enum logic [1:0] {T_IDLE, T_SCAN} tstate_e;

  tstate_e              state;
  logic [SYM_W-1:0]     s_sym;
  logic                 s_side;
  logic [WINDOW_W-1:0]  s_ptr;         // next offset to read
  logic                 s_issue;       // more addresses to issue
  logic                 p1_v, p2_v;    // reads in flight
  logic [WINDOW_W-1:0]  p1_off, p2_off;
  logic                 issue_now;

  localparam logic [WINDOW_W-1:0] TOP = '1;

  assign ev_ready  = (state == T_IDLE);
  assign scanning  = (state == T_SCAN);
  assign issue_now = (state == T_SCAN) && s_issue;
  assign pa_addr   = {s_sym, s_ptr};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= T_IDLE;
      s_sym      <= '0;
      s_side     <= 1'b0;
      s_ptr      <= '0;
      s_issue    <= 1'b0;
      p1_v       <= 1'b0;
      p2_v       <= 1'b0;
      p1_off     <= '0;
      p2_off     <= '0;
      scan_count <= '0;
      for (int s = 0; s < N_SYMBOLS; s++) begin
        have_bid[s]  <= 1'b0;
        have_ask[s]  <= 1'b0;
        best_bid[s]  <= '0;
        best_ask[s]  <= '0;
        bid_qty[s]   <= '0;
        ask_qty[s]   <= '0;
        bid_depth[s] <= '0;
        ask_depth[s] <= '0;
      end
    end else begin
      // read pipeline, matching the array's two-clock latency
      p1_v   <= issue_now;
      p1_off <= s_ptr;
      p2_v   <= p1_v;
      p2_off <= p1_off;

      unique case (state)
        T_IDLE: begin
          if (ev_valid) begin
            if (!ev_side) begin
              // ---------------- bid side
              if (ev_entry.valid && !ev_was_valid) bid_depth[ev_sym] <= bid_depth[ev_sym] + 1'b1;
              if (!ev_entry.valid && ev_was_valid) bid_depth[ev_sym] <= bid_depth[ev_sym] - 1'b1;
              if (ev_entry.valid) begin
                if (!have_bid[ev_sym] || ev_off > best_bid[ev_sym]) begin
                  have_bid[ev_sym] <= 1'b1;
                  best_bid[ev_sym] <= ev_off;
                  bid_qty[ev_sym]  <= ev_entry.agg_qty;
                end else if (ev_off == best_bid[ev_sym]) begin
                  bid_qty[ev_sym]  <= ev_entry.agg_qty;
                end
              end else if (have_bid[ev_sym] && ev_off == best_bid[ev_sym]) begin
                if (ev_off == '0) begin
                  have_bid[ev_sym] <= 1'b0;
                  bid_qty[ev_sym]  <= '0;
                end else begin
                  state      <= T_SCAN;
                  s_sym      <= ev_sym;
                  s_side     <= 1'b0;
                  s_ptr      <= ev_off - 1'b1;
                  s_issue    <= 1'b1;
                  scan_count <= scan_count + 1;
                end
              end
            end else begin
              // ---------------- ask side
              if (ev_entry.valid && !ev_was_valid) ask_depth[ev_sym] <= ask_depth[ev_sym] + 1'b1;
              if (!ev_entry.valid && ev_was_valid) ask_depth[ev_sym] <= ask_depth[ev_sym] - 1'b1;
              if (ev_entry.valid) begin
                if (!have_ask[ev_sym] || ev_off < best_ask[ev_sym]) begin
                  have_ask[ev_sym] <= 1'b1;
                  best_ask[ev_sym] <= ev_off;
                  ask_qty[ev_sym]  <= ev_entry.agg_qty;
                end else if (ev_off == best_ask[ev_sym]) begin
                  ask_qty[ev_sym]  <= ev_entry.agg_qty;
                end
              end else if (have_ask[ev_sym] && ev_off == best_ask[ev_sym]) begin
                if (ev_off == TOP) begin
                  have_ask[ev_sym] <= 1'b0;
                  ask_qty[ev_sym]  <= '0;
                end else begin
                  state      <= T_SCAN;
                  s_sym      <= ev_sym;
                  s_side     <= 1'b1;
                  s_ptr      <= ev_off + 1'b1;
                  s_issue    <= 1'b1;
                  scan_count <= scan_count + 1;
                end
              end
            end
          end
        end

        T_SCAN: begin
          // issue the next address
          if (s_issue) begin
            if (!s_side) begin
              if (s_ptr == '0) s_issue <= 1'b0;
              else             s_ptr   <= s_ptr - 1'b1;
            end else begin
              if (s_ptr == TOP) s_issue <= 1'b0;
              else              s_ptr   <= s_ptr + 1'b1;
            end
          end
          // check what comes back
          if (p2_v && pa_rdata.valid) begin
            state   <= T_IDLE;
            s_issue <= 1'b0;
            p1_v    <= 1'b0;
            p2_v    <= 1'b0;
            if (!s_side) begin
              best_bid[s_sym] <= p2_off;
              bid_qty[s_sym]  <= pa_rdata.agg_qty;
            end else begin
              best_ask[s_sym] <= p2_off;
              ask_qty[s_sym]  <= pa_rdata.agg_qty;
            end
          end else if (!s_issue && !p1_v && !p2_v) begin
            // whole window read, nothing left on this side
            state <= T_IDLE;
            if (!s_side) begin
              have_bid[s_sym] <= 1'b0;
              bid_qty[s_sym]  <= '0;
            end else begin
              have_ask[s_sym] <= 1'b0;
              ask_qty[s_sym]  <= '0;
            end
          end
        end

        default: state <= T_IDLE;
      endcase
    end
  end

  a_ev_when_ready: assert property (@(posedge clk) disable iff (rst) ev_valid |-> ev_ready);

endmodule
