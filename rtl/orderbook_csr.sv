// orderbook_csr -- Avalon-MM slave register file of the order-book core.
//
// The only path from the host processor into the core: control, the stock
// filter, diagnostics and the VGA caption buffer. Market data never passes
// through it. Registers are 32 bits, at byte offsets (word address =
// offset / 4) within a 0x400-byte window:
//   0x00 CONTROL      R/W [0] RUN, [3:2] ACTIVE_STOCK, [4] reset statistics
//                         (write 1: one-clock clear pulse, reads 0),
//                         [7:5] BAUD_SEL
//   0x04 STATUS       R   [2:0] parser state, [3] receive FIFO full,
//                         [4] receive FIFO empty, [8] parse error (sticky)
//   0x08 MSG_COUNT    0x0C LATENCY   0x10 BEST_BID   0x14 BEST_ASK
//   0x18 BID_QTY      0x1C ASK_QTY   0x20 BID_DEPTH  0x24 ASK_DEPTH
//   0x28 ERR_COUNT    0x2C MSG_RATE                          (all R)
//   0x30-0x5F STOCK_FILTER[0..3] R/W, two words per symbol; the first word
//                         holds characters 0-3 with character 0 in bits
//                         [7:0], the second characters 4-7
//   0x60 HT_LOAD      0x64 MAX_PROBE                         (R)
//   0x68 CHAR_MEM_ADDR R/W   0x6C CHAR_MEM_DATA W: writes one character at
//                         CHAR_MEM_ADDR into the caption buffer
// Unlisted offsets read 0 and ignore writes.
//
// Timing: writes take effect on the clock edge that sees write; readdata is
// registered, so a read has a fixed latency of one clock.
//
// The offsets, fields and their meaning follow the design's register map.
// The one-clock latency, the pulse form of the statistics reset, the
// character order within STOCK_FILTER words and the reset value of CONTROL
// (RUN = 1, 115200 baud, stock 0) are this design's own choices.
//
// The filter word index fidx is computed over the full word offset; only its
// low three bits select one of the eight filter words, the rest are unused.
module orderbook_csr
  import itch_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // Avalon-MM slave
  input  logic [7:0]  address,     // word address
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // control outputs
  output logic        run,
  output logic [1:0]  active_stock,
  output logic        stats_clear,
  output logic [2:0]  baud_sel,
  output logic [63:0] stock_filter [N_SYMBOLS],
  output logic        char_we,
  output logic [12:0] char_addr,
  output logic [7:0]  char_data,
  // status inputs
  input  logic [2:0]  parser_state,
  input  logic        fifo_full,
  input  logic        fifo_empty,
  input  logic        parse_error,
  input  logic [31:0] msg_count,
  input  logic [31:0] latency,
  input  logic [31:0] best_bid,
  input  logic [31:0] best_ask,
  input  logic [31:0] bid_qty,
  input  logic [31:0] ask_qty,
  input  logic [31:0] bid_depth,
  input  logic [31:0] ask_depth,
  input  logic [31:0] err_count,
  input  logic [31:0] msg_rate,
  input  logic [31:0] ht_load,
  input  logic [31:0] max_probe
);

  localparam logic [7:0] A_CONTROL   = 8'h00;
  localparam logic [7:0] A_STATUS    = 8'h01;
  localparam logic [7:0] A_MSG_COUNT = 8'h02;
  localparam logic [7:0] A_LATENCY   = 8'h03;
  localparam logic [7:0] A_BEST_BID  = 8'h04;
  localparam logic [7:0] A_BEST_ASK  = 8'h05;
  localparam logic [7:0] A_BID_QTY   = 8'h06;
  localparam logic [7:0] A_ASK_QTY   = 8'h07;
  localparam logic [7:0] A_BID_DEPTH = 8'h08;
  localparam logic [7:0] A_ASK_DEPTH = 8'h09;
  localparam logic [7:0] A_ERR_COUNT = 8'h0A;
  localparam logic [7:0] A_MSG_RATE  = 8'h0B;
  localparam logic [7:0] A_FILTER0   = 8'h0C;   // .. 8'h17
  localparam logic [7:0] A_HT_LOAD   = 8'h18;
  localparam logic [7:0] A_MAX_PROBE = 8'h19;
  localparam logic [7:0] A_CHAR_ADDR = 8'h1A;
  localparam logic [7:0] A_CHAR_DATA = 8'h1B;

  logic wr, rd;
  logic [7:0] fidx;
  assign wr   = chipselect && write;
  assign rd   = chipselect && read;
  assign fidx = address - A_FILTER0;

  always_ff @(posedge clk) begin
    if (rst) begin
      run          <= 1'b1;
      active_stock <= '0;
      stats_clear  <= 1'b0;
      baud_sel     <= '0;
      char_we      <= 1'b0;
      char_addr    <= '0;
      char_data    <= '0;
      readdata     <= '0;
      for (int s = 0; s < N_SYMBOLS; s++) stock_filter[s] <= '0;
    end else begin
      stats_clear <= 1'b0;
      char_we     <= 1'b0;
      if (wr) begin
        if (address == A_CONTROL) begin
          run          <= writedata[0];
          active_stock <= writedata[3:2];
          stats_clear  <= writedata[4];
          baud_sel     <= writedata[7:5];
        end
        if (address >= A_FILTER0 && address < A_HT_LOAD) begin
          if (fidx[0]) stock_filter[fidx[2:1]][63:32] <= writedata;
          else         stock_filter[fidx[2:1]][31:0]  <= writedata;
        end
        if (address == A_CHAR_ADDR) char_addr <= writedata[12:0];
        if (address == A_CHAR_DATA) begin
          char_we   <= 1'b1;
          char_data <= writedata[7:0];
        end
      end
      if (rd) begin
        readdata <= '0;
        unique case (address)
          A_CONTROL:   readdata <= {24'd0, baud_sel, 1'b0, active_stock, 1'b0, run};
          A_STATUS:    readdata <= {23'd0, parse_error, 3'd0, fifo_empty, fifo_full, parser_state};
          A_MSG_COUNT: readdata <= msg_count;
          A_LATENCY:   readdata <= latency;
          A_BEST_BID:  readdata <= best_bid;
          A_BEST_ASK:  readdata <= best_ask;
          A_BID_QTY:   readdata <= bid_qty;
          A_ASK_QTY:   readdata <= ask_qty;
          A_BID_DEPTH: readdata <= bid_depth;
          A_ASK_DEPTH: readdata <= ask_depth;
          A_ERR_COUNT: readdata <= err_count;
          A_MSG_RATE:  readdata <= msg_rate;
          A_HT_LOAD:   readdata <= ht_load;
          A_MAX_PROBE: readdata <= max_probe;
          A_CHAR_ADDR: readdata <= {19'd0, char_addr};
          default: begin
            if (address >= A_FILTER0 && address < A_HT_LOAD)
              readdata <= fidx[0] ? stock_filter[fidx[2:1]][63:32]
                                  : stock_filter[fidx[2:1]][31:0];
          end
        endcase
      end
    end
  end

endmodule
