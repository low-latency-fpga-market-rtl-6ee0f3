// itch_parser -- byte-serial decoder for the NASDAQ TotalView-ITCH 5.0
// order messages the book acts on: 'A' Add Order (no MPID) and 'F' Add
// Order with MPID attribution (the same fields plus a 4-byte attribution,
// which is skipped), 'D' Order Delete, 'U' Order Replace, 'E' Order
// Executed, 'C' Order Executed With Price and 'X' Order Cancel.
//
// The parser takes one message byte per clock from the frame delimiter. The
// first byte (sof) selects the message kind; every later byte is steered by
// its offset in the message into the field it belongs to (big-endian, as on
// the wire): stock locate, order reference, buy/sell indicator, shares,
// stock name, price and, for Replace, the new order reference. Bytes of
// other fields (tracking number, timestamp, match number, ...) are skipped.
// The stock name of an Add is compared with the four STOCK_FILTER entries as
// it arrives; a filter byte of 0x00 also matches the space padding ITCH
// uses.
//
// One clock after the last byte (eom) a complete message of a supported type whose
// framed length equals its ITCH length is pushed, as one itch_msg_t, into
// the parser -> book FIFO (msg_valid for one cycle). A length mismatch
// raises parse_err instead. Messages of other types are skipped silently.
// t_first carries the value of the free-running cycle counter `now` at the
// message's first byte, so the book can report end-to-end latency.
//
// Interface: in_ready is low while the message FIFO is full; then the
// delimiter, and behind it the receive FIFO, hold their bytes. state_dbg is
// the FSM state for the STATUS register (0 idle, 1 fields, 2 skip).
//
// The field list and the message set follow the design description; field
// offsets come from the ITCH 5.0 specification; the filter match on the
// stock name, the length check and the handshake are this design's own.
module itch_parser
  import itch_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_sof,
  input  logic        in_eom,
  input  logic [15:0] in_len,
  input  logic        in_abort,
  output logic        in_ready,
  input  logic [63:0] stock_filter [N_SYMBOLS],  // byte 0 = first character
  input  logic [31:0] now,
  input  logic        msg_full,     // message FIFO full
  output logic        msg_valid,    // push into the message FIFO
  output itch_msg_t   msg,
  output logic        parse_err,    // one cycle: malformed message dropped
  output logic [2:0]  state_dbg
);

  typedef enum logic [2:0] {P_IDLE = 3'd0, P_FIELDS = 3'd1, P_SKIP = 3'd2} pstate_e;

  pstate_e     state;
  itch_msg_t   cur;
  logic [7:0]  idx;           // offset of the byte now arriving
  logic [3:0]  name_ok;       // per filter: all name bytes so far matched
  logic        take;
  logic        known;
  msg_kind_e   kind_of_byte;
  logic [15:0] exp_len;
  logic        attr;          // current message is an 'F' (Add with MPID)

  assign in_ready  = !msg_full;
  assign take      = in_valid && in_ready;
  assign state_dbg = state;

  // Decode of a type byte.
  always_comb begin
    known        = 1'b1;
    kind_of_byte = MSG_ADD;
    unique case (in_data)
      8'h41:   kind_of_byte = MSG_ADD;      // 'A'
      8'h46:   kind_of_byte = MSG_ADD;      // 'F', attribution skipped
      8'h44:   kind_of_byte = MSG_DELETE;   // 'D'
      8'h55:   kind_of_byte = MSG_REPLACE;  // 'U'
      8'h45:   kind_of_byte = MSG_EXEC;     // 'E'
      8'h43:   kind_of_byte = MSG_EXEC_PX;  // 'C'
      8'h58:   kind_of_byte = MSG_CANCEL;   // 'X'
      default: known = 1'b0;
    endcase
  end

  always_comb begin
    unique case (cur.kind)
      MSG_ADD:     exp_len = attr ? 16'(LEN_ADD_MPID) : 16'(LEN_ADD);
      MSG_DELETE:  exp_len = 16'(LEN_DELETE);
      MSG_REPLACE: exp_len = 16'(LEN_REPLACE);
      MSG_EXEC:    exp_len = 16'(LEN_EXEC);
      MSG_EXEC_PX: exp_len = 16'(LEN_EXEC_PX);
      MSG_CANCEL:  exp_len = 16'(LEN_CANCEL);
      default:     exp_len = 16'hFFFF;
    endcase
  end

  // Completed message with its filter result.
  always_comb begin
    msg           = cur;
    msg.sym_match = 1'b0;
    msg.symbol_id = 2'd0;
    for (int s = N_SYMBOLS - 1; s >= 0; s--) begin
      if (name_ok[s]) begin
        msg.sym_match = 1'b1;
        msg.symbol_id = 2'(s);
      end
    end
  end

  // The last byte is stored on the eom cycle; the message is pushed on the
  // cycle after, so it includes that byte.
  logic ending;
  assign ending = take && in_eom && !in_abort && !in_sof && (state == P_FIELDS);

  always_ff @(posedge clk) begin
    if (rst) begin
      msg_valid <= 1'b0;
      parse_err <= 1'b0;
    end else begin
      msg_valid <= ending && (in_len == exp_len);
      parse_err <= ending && (in_len != exp_len);
    end
  end

  // Steer one byte into the field that covers offset idx.
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= P_IDLE;
      cur     <= '0;
      attr    <= 1'b0;
      idx     <= '0;
      name_ok <= '0;
    end else if (take) begin
      if (in_abort) begin
        state <= P_IDLE;
      end else if (in_sof) begin
        cur         <= '0;
        cur.kind    <= kind_of_byte;
        attr        <= (in_data == 8'h46);
        cur.t_first <= now;
        name_ok     <= '1;
        idx         <= 8'd1;
        state       <= in_eom ? P_IDLE : (known ? P_FIELDS : P_SKIP);
      end else begin
        if (idx != 8'hFF) idx <= idx + 8'd1;
        if (in_eom) state <= P_IDLE;
        if (state == P_FIELDS) begin
          // fields common to all six types
          if (idx >= 8'd1 && idx <= 8'd2)
            cur.locate <= {cur.locate[7:0], in_data};
          if (idx >= 8'd11 && idx <= 8'd18)
            cur.order_ref <= {cur.order_ref[55:0], in_data};
          unique case (cur.kind)
            MSG_ADD: begin
              if (idx == 8'd19) cur.side <= (in_data == 8'h53);  // 'S'
              if (idx >= 8'd20 && idx <= 8'd23) cur.shares <= {cur.shares[23:0], in_data};
              if (idx >= 8'd24 && idx <= 8'd31) begin
                for (int s = 0; s < N_SYMBOLS; s++) begin
                  logic [7:0] fb;
                  fb = stock_filter[s][8*(idx-8'd24) +: 8];
                  if (!(fb == in_data || (fb == 8'h00 && in_data == 8'h20)))
                    name_ok[s] <= 1'b0;
                end
              end
              if (idx >= 8'd32 && idx <= 8'd35) cur.price <= {cur.price[23:0], in_data};
            end
            MSG_REPLACE: begin
              if (idx >= 8'd19 && idx <= 8'd26) cur.new_ref <= {cur.new_ref[55:0], in_data};
              if (idx >= 8'd27 && idx <= 8'd30) cur.shares  <= {cur.shares[23:0], in_data};
              if (idx >= 8'd31 && idx <= 8'd34) cur.price   <= {cur.price[23:0], in_data};
            end
            MSG_EXEC, MSG_EXEC_PX, MSG_CANCEL: begin
              if (idx >= 8'd19 && idx <= 8'd22) cur.shares <= {cur.shares[23:0], in_data};
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
