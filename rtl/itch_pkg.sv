// itch_pkg -- types and constants shared by the market-data parser and the
// hardware order book.
//
// Holds the record layouts of the two on-chip memories (the 128-bit
// order-reference hash-table slot and the 64-bit price-level entry), the
// decoded-message record that the ITCH parser hands to the book engine, the
// ITCH 5.0 message-type codes and lengths, the hash fold used to index the
// order table and the baud-rate table selected by CONTROL.BAUD_SEL.
//
// Slot and entry layouts, the hash fold, the table sizes and the register
// offsets follow the design description. The baud table beyond its first
// entry (434 clocks per bit at 50 MHz, i.e. 115200 baud), the message-type
// encoding and the layout of the decoded-message record are this design's
// own choices. ITCH message lengths and field offsets are those of the
// public Nasdaq TotalView-ITCH 5.0 specification.
//
// The hash folds the low 42 bits of the reference; bits 63:42 are unused
// (ITCH references are sequence numbers far below 2^42). Some constants here
// (message lengths, widths) document the format and are not used by every
// block.
package itch_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned CLK_HZ_DEFAULT   = 50_000_000;
  localparam int unsigned HT_SLOTS_DEFAULT = 16384;   // 2^14 slots
  localparam int unsigned N_SYMBOLS        = 4;
  localparam int unsigned SYM_W            = 2;
  localparam int unsigned WINDOW_W         = 11;      // 2,048 pennies per symbol
  localparam int unsigned PA_ENTRIES       = N_SYMBOLS << WINDOW_W;  // 8,192
  localparam int unsigned PA_ADDR_W        = SYM_W + WINDOW_W;       // 13

  // ---------------------------------------------------------------- records
  // Hash-table slot: 128 bits in total.
  typedef struct packed {
    logic        valid;       // slot occupied
    logic [63:0] order_ref;   // full key, compared on every probe
    logic [23:0] price;       // raw ITCH price, four implied decimals
    logic [23:0] qty;         // shares remaining
    logic        side;        // 0 = buy, 1 = sell
    logic [1:0]  symbol_id;   // index into STOCK_FILTER[0..3]
    logic [11:0] reserved;
  } ht_slot_t;

  // Price-level entry: 64 bits in total.
  typedef struct packed {
    logic [31:0] agg_qty;      // shares resting at this penny
    logic [15:0] order_count;  // live orders at this penny
    logic        valid;        // at least one live order
    logic [14:0] reserved;
  } pa_entry_t;

  // Message kinds the book acts on.
  typedef enum logic [2:0] {
    MSG_ADD     = 3'd0,   // 'A'
    MSG_DELETE  = 3'd1,   // 'D'
    MSG_REPLACE = 3'd2,   // 'U'
    MSG_EXEC    = 3'd3,   // 'E'
    MSG_EXEC_PX = 3'd4,   // 'C'
    MSG_CANCEL  = 3'd5    // 'X'
  } msg_kind_e;

  // Decoded message, as written into the parser -> book FIFO.
  typedef struct packed {
    msg_kind_e   kind;
    logic        sym_match;   // Add only: stock name matched a filter entry
    logic [1:0]  symbol_id;   // Add only: which filter entry matched
    logic [15:0] locate;      // stock locate code
    logic [63:0] order_ref;   // order ref (original ref for Replace)
    logic [63:0] new_ref;     // Replace only
    logic        side;        // Add only
    logic [31:0] shares;      // shares / executed / cancelled shares
    logic [31:0] price;       // Add and Replace
    logic [31:0] t_first;     // cycle stamp of the message's first byte
  } itch_msg_t;

  localparam int unsigned MSG_W = $bits(itch_msg_t);

  // ITCH 5.0 message lengths, type byte included.
  localparam int unsigned LEN_ADD     = 36;
  localparam int unsigned LEN_ADD_MPID = 40;  // 'F': Add plus attribution
  localparam int unsigned LEN_DELETE  = 19;
  localparam int unsigned LEN_REPLACE = 35;
  localparam int unsigned LEN_EXEC    = 31;
  localparam int unsigned LEN_EXEC_PX = 36;
  localparam int unsigned LEN_CANCEL  = 23;

  // ---------------------------------------------------------------- hash
  // Three-way XOR fold of the order reference down to a 14-bit index.
  function automatic logic [13:0] hash_fold(input logic [63:0] ref_no);
    return ref_no[13:0] ^ ref_no[27:14] ^ ref_no[41:28];
  endfunction

  // ---------------------------------------------------------------- baud
  // Clocks per bit at 50 MHz for each BAUD_SEL code.
  // 0: 115200, 1: 230400, 2: 460800, 3: 921600,
  // 4: 1 M,    5: 2 M,    6: 3 M,    7: 3.5 M
  function automatic logic [15:0] baud_cycles(input logic [2:0] sel);
    case (sel)
      3'd0:    return 16'd434;
      3'd1:    return 16'd217;
      3'd2:    return 16'd109;
      3'd3:    return 16'd54;
      3'd4:    return 16'd50;
      3'd5:    return 16'd25;
      3'd6:    return 16'd17;
      default: return 16'd14;
    endcase
  endfunction

endpackage
