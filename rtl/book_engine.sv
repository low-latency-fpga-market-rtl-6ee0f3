// book_engine -- applies decoded ITCH messages to the order book.
//
// Takes one itch_msg_t at a time from the parser -> book FIFO and drives the
// order hash table, port A of the price-level array and the top-of-book
// tracker:
//   Add        map the price to a penny offset in the symbol's window, insert
//              the order in the hash table, then add its shares to the
//              price level and count one more order there.
//   Exec/Exec-with-price/Cancel
//              look the order up; take min(shares, remaining) off it; if
//              nothing remains delete it from the table (backward shift),
//              otherwise write the reduced quantity back; then take the same
//              shares off the price level, and one order if it was removed.
//   Delete     look up, delete, take all its shares and one order off.
//   Replace    a fused delete of the original reference followed by an insert
//              of the new reference with the new price and shares, keeping
//              side and symbol.
// Each price-level change is a read-modify-write (read, two clocks of RAM
// latency, write) and is announced to the tracker as an event. The engine
// waits for the tracker to be idle before it starts a price-array access, so
// a best-price scan overlaps the next message's hash-table work but never a
// price-array write.
//
// Penny mapping: penny = floor(price / 100) (the two sub-penny digits of the
// four-decimal ITCH price are dropped), offset = penny - base[symbol]. Each
// symbol's base is set by its first accepted Add so that the 2,048-penny
// window is centred on it (base = penny - 1024, or 0). An Add whose price
// falls outside the window, or a price of 2^24 or more, is dropped with
// win_err; an Add that finds the table full is dropped with full_err. An
// Add whose stock matched no filter entry, and any other message whose
// order is not in the table, is dropped silently (miss).
//
// Every message taken ends with done for one clock and latency = now -
// t_first, the clocks from the message's first byte to the end of its book
// update. Messages are taken only while run is high and both memories have
// finished their clearing sweep.
//
// The operations, the penny floor, the window size, the error handling and
// the fused Replace follow the design description. Its own choices: the base
// comes from the first Add instead of the median of the first 256 messages
// (that would leave the first 256 messages with no window to land in); the
// Replace decrement and increment are issued one after the other on port A
// rather than at once on both ports, since port B belongs to the tracker.
//
// The engine holds the record it is working on in m, but not all of it is used:
// its side and filter-match bits are read straight from msg_in when the
// message is taken, and the locate code is not needed, so these are unused in m.
module book_engine
  import itch_pkg::*;
#(
  parameter int unsigned HT_SLOTS = HT_SLOTS_DEFAULT
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         run,
  input  logic                         mem_busy,   // memories still clearing
  input  logic [31:0]                  now,
  // message FIFO (show-ahead)
  input  logic                         msg_avail,
  input  itch_msg_t                    msg_in,
  output logic                         msg_pop,
  // hash table
  output logic                         ht_cmd_valid,
  input  logic                         ht_cmd_ready,
  output logic [1:0]                   ht_cmd_op,
  output logic [63:0]                  ht_cmd_ref,
  output ht_slot_t                     ht_cmd_slot,
  output logic [$clog2(HT_SLOTS)-1:0]  ht_cmd_idx,
  input  logic                         ht_rsp_valid,
  input  logic                         ht_rsp_found,
  input  logic                         ht_rsp_full,
  input  logic [$clog2(HT_SLOTS)-1:0]  ht_rsp_idx,
  input  ht_slot_t                     ht_rsp_slot,
  // price array port A
  output logic [PA_ADDR_W-1:0]         pa_addr,
  output logic                         pa_we,
  output pa_entry_t                    pa_wdata,
  input  pa_entry_t                    pa_rdata,
  // tracker events
  output logic                         ev_valid,
  input  logic                         ev_ready,
  output logic [SYM_W-1:0]             ev_sym,
  output logic                         ev_side,
  output logic [WINDOW_W-1:0]          ev_off,
  output pa_entry_t                    ev_entry,
  output logic                         ev_was_valid,
  // results
  output logic                         done,
  output logic [31:0]                  latency,
  output logic                         win_err,
  output logic                         full_err,
  output logic                         miss,
  output logic                         busy
);

  localparam logic [1:0] HT_LOOKUP = 2'd0;
  localparam logic [1:0] HT_INSERT = 2'd1;
  localparam logic [1:0] HT_WRITE  = 2'd2;
  localparam logic [1:0] HT_DELETE = 2'd3;
  localparam int unsigned PW = 18;             // penny width: 2^24 / 100 < 2^18

  typedef enum logic [3:0] {
    E_IDLE, E_HT_CMD, E_HT_WAIT, E_PA_WAIT, E_PA_RD0, E_PA_RD1, E_PA_RD2,
    E_PA_WR, E_FINISH
  } estate_e;

  // what to do once the current hash-table command answers
  typedef enum logic [2:0] {
    N_AFTER_INSERT, N_AFTER_LOOKUP, N_AFTER_MODIFY
  } step_e;

  estate_e          state;
  step_e            step;
  itch_msg_t        m;
  logic             replace_ins;      // Replace: the insert half is pending

  // current hash-table command
  logic [1:0]       c_op;
  ht_slot_t         c_slot;
  logic [$clog2(HT_SLOTS)-1:0] c_idx;

  // current price-level operation
  logic [SYM_W-1:0]    p_sym;
  logic                p_side;
  logic [WINDOW_W-1:0] p_off;
  logic                p_inc;         // add (1) or take off (0)
  logic [31:0]         p_qty;
  logic                p_cnt;         // one order more / less

  // per-symbol window base, in pennies
  logic [PW-1:0]    base  [N_SYMBOLS];
  logic             based [N_SYMBOLS];

  // ---------------------------------------------------------------- penny math
  function automatic logic [PW-1:0] penny_of(input logic [31:0] px);
    return PW'(px / 32'd100);
  endfunction

  // window check and offset of price px for symbol s (base may be new)
  logic [PW-1:0]       add_penny, add_base;
  logic [PW:0]         add_diff;
  logic                add_in_win;
  logic [1:0]          add_sym;
  logic [31:0]         add_px;

  always_comb begin
    add_sym    = (m.kind == MSG_ADD) ? m.symbol_id : c_slot.symbol_id;
    add_px     = m.price;
    add_penny  = penny_of(add_px);
    if (based[add_sym]) add_base = base[add_sym];
    else                add_base = (add_penny >= PW'(1024)) ? add_penny - PW'(1024) : '0;
    add_diff   = {1'b0, add_penny} - {1'b0, add_base};
    add_in_win = (add_px < 32'h0100_0000) && !add_diff[PW] && (add_diff < (PW+1)'(1 << WINDOW_W));
  end

  // offset of a stored order
  logic [PW-1:0]       st_penny;
  logic [WINDOW_W-1:0] st_off;
  always_comb begin
    st_penny = penny_of({8'd0, ht_rsp_slot.price});
    st_off   = WINDOW_W'(st_penny - base[ht_rsp_slot.symbol_id]);
  end

  // ---------------------------------------------------------------- outputs
  assign busy         = (state != E_IDLE);
  assign msg_pop      = (state == E_IDLE) && run && !mem_busy && msg_avail;
  assign ht_cmd_valid = (state == E_HT_CMD) && !(c_op == HT_INSERT && !add_in_win);
  assign ht_cmd_op    = c_op;
  assign ht_cmd_ref   = m.order_ref;
  assign ht_cmd_slot  = c_slot;
  assign ht_cmd_idx   = c_idx;

  assign pa_addr = {p_sym, p_off};

  pa_entry_t new_entry;
  always_comb begin
    new_entry = pa_rdata;
    if (p_inc) begin
      new_entry.agg_qty     = pa_rdata.agg_qty + p_qty;
      new_entry.order_count = pa_rdata.order_count + 16'(p_cnt);
    end else begin
      new_entry.agg_qty     = (pa_rdata.agg_qty > p_qty) ? pa_rdata.agg_qty - p_qty : '0;
      new_entry.order_count = (pa_rdata.order_count > 16'(p_cnt)) ?
                              pa_rdata.order_count - 16'(p_cnt) : '0;
    end
    new_entry.valid    = (new_entry.order_count != 16'd0);
    new_entry.reserved = '0;
  end

  logic wr_now;
  assign wr_now       = (state == E_PA_WR);
  assign pa_we        = wr_now;
  assign pa_wdata     = new_entry;
  assign ev_valid     = wr_now;
  assign ev_sym       = p_sym;
  assign ev_side      = p_side;
  assign ev_off       = p_off;
  assign ev_entry     = new_entry;
  assign ev_was_valid = pa_rdata.valid;

  // shares an Execute / Cancel takes off the order found
  logic [31:0] dec;
  assign dec = (m.shares >= {8'd0, ht_rsp_slot.qty}) ? {8'd0, ht_rsp_slot.qty} : m.shares;

  // ---------------------------------------------------------------- FSM

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= E_IDLE;
      step        <= N_AFTER_LOOKUP;
      m           <= '0;
      replace_ins <= 1'b0;
      c_op        <= HT_LOOKUP;
      c_slot      <= '0;
      c_idx       <= '0;
      p_sym       <= '0;
      p_side      <= 1'b0;
      p_off       <= '0;
      p_inc       <= 1'b0;
      p_qty       <= '0;
      p_cnt       <= 1'b0;
      done        <= 1'b0;
      latency     <= '0;
      win_err     <= 1'b0;
      full_err    <= 1'b0;
      miss        <= 1'b0;
      for (int s = 0; s < N_SYMBOLS; s++) begin
        base[s]  <= '0;
        based[s] <= 1'b0;
      end
    end else begin
      done     <= 1'b0;
      win_err  <= 1'b0;
      full_err <= 1'b0;
      miss     <= 1'b0;

      unique case (state)
        // ------------------------------------------------ take a message
        E_IDLE: begin
          if (msg_pop) begin
            m           <= msg_in;
            replace_ins <= 1'b0;
            state       <= E_HT_CMD;
            if (msg_in.kind == MSG_ADD) begin
              c_op             <= HT_INSERT;
              step             <= N_AFTER_INSERT;
              c_slot           <= '0;
              c_slot.valid     <= 1'b1;
              c_slot.order_ref <= msg_in.order_ref;
              c_slot.price     <= msg_in.price[23:0];
              c_slot.qty       <= (msg_in.shares > 32'h00FF_FFFF) ? 24'hFF_FFFF : msg_in.shares[23:0];
              c_slot.side      <= msg_in.side;
              c_slot.symbol_id <= msg_in.symbol_id;
              // filter miss: drop without touching the book
              if (!msg_in.sym_match) begin
                miss  <= 1'b1;
                state <= E_FINISH;
              end
            end else begin
              c_op <= HT_LOOKUP;
              step <= N_AFTER_LOOKUP;
            end
          end
        end

        // ------------------------------------------------ hash-table command
        E_HT_CMD: begin
          // an Add (or the insert half of a Replace) must fit the window
          if (c_op == HT_INSERT && !add_in_win) begin
            win_err <= 1'b1;
            state   <= E_FINISH;
          end else if (ht_cmd_ready) begin
            state <= E_HT_WAIT;
            if (c_op == HT_INSERT && !based[add_sym]) begin
              based[add_sym] <= 1'b1;
              base[add_sym]  <= add_base;
            end
          end
        end

        E_HT_WAIT: begin
          if (ht_rsp_valid) begin
            unique case (step)
              N_AFTER_INSERT: begin
                if (ht_rsp_full) begin
                  full_err <= 1'b1;
                  state    <= E_FINISH;
                end else begin
                  p_sym  <= c_slot.symbol_id;
                  p_side <= c_slot.side;
                  p_off  <= WINDOW_W'(add_diff);
                  p_inc  <= 1'b1;
                  p_qty  <= {8'd0, c_slot.qty};
                  p_cnt  <= 1'b1;
                  replace_ins <= 1'b0;
                  state  <= E_PA_WAIT;
                end
              end
              N_AFTER_LOOKUP: begin
                if (!ht_rsp_found) begin
                  miss  <= 1'b1;
                  state <= E_FINISH;
                end else begin
                  c_idx  <= ht_rsp_idx;
                  c_slot <= ht_rsp_slot;
                  p_sym  <= ht_rsp_slot.symbol_id;
                  p_side <= ht_rsp_slot.side;
                  p_off  <= st_off;
                  p_inc  <= 1'b0;
                  step   <= N_AFTER_MODIFY;
                  state  <= E_HT_CMD;
                  unique case (m.kind)
                    MSG_EXEC, MSG_EXEC_PX, MSG_CANCEL: begin
                      p_qty <= dec;
                      if (dec == {8'd0, ht_rsp_slot.qty}) begin
                        c_op  <= HT_DELETE;
                        p_cnt <= 1'b1;
                      end else begin
                        c_op       <= HT_WRITE;
                        c_slot.qty <= ht_rsp_slot.qty - dec[23:0];
                        p_cnt      <= 1'b0;
                      end
                    end
                    default: begin            // Delete, Replace
                      c_op  <= HT_DELETE;
                      p_qty <= {8'd0, ht_rsp_slot.qty};
                      p_cnt <= 1'b1;
                      replace_ins <= (m.kind == MSG_REPLACE);
                    end
                  endcase
                end
              end
              default: begin                 // N_AFTER_MODIFY
                state <= E_PA_WAIT;
              end
            endcase
          end
        end

        // ------------------------------------------------ price-level RMW
        E_PA_WAIT: if (ev_ready) state <= E_PA_RD0;
        E_PA_RD0:  state <= E_PA_RD1;
        E_PA_RD1:  state <= E_PA_RD2;
        E_PA_RD2:  state <= E_PA_WR;
        E_PA_WR: begin
          if (replace_ins) begin
            // second half of a Replace: insert the new reference
            replace_ins      <= 1'b0;
            c_op             <= HT_INSERT;
            step             <= N_AFTER_INSERT;
            c_slot.valid     <= 1'b1;
            c_slot.order_ref <= m.new_ref;
            c_slot.price     <= m.price[23:0];
            c_slot.qty       <= (m.shares > 32'h00FF_FFFF) ? 24'hFF_FFFF : m.shares[23:0];
            c_slot.reserved  <= '0;
            state            <= E_HT_CMD;
          end else begin
            state <= E_FINISH;
          end
        end

        E_FINISH: begin
          done    <= 1'b1;
          latency <= now - m.t_first;
          state   <= E_IDLE;
        end

        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
