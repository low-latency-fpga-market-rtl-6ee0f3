// sync_fifo -- single-clock first-in first-out buffer with show-ahead output.
//
// Used twice in the market-data path: as the 256-entry receive FIFO behind
// the serial receiver, and as the 64-entry FIFO that carries decoded
// messages from the ITCH parser to the order-book engine. The storage is an
// array of DEPTH words indexed by read and write pointers one bit wider than
// the address, so full and empty are told apart by the extra bit.
//
// Interface: push writes din when the FIFO is not full; a push while full is
// dropped and flagged by a one-cycle overflow strobe. dout always shows the
// oldest word while empty is low (show-ahead), and pop removes it. Push and
// pop in the same cycle are allowed. count gives the current occupancy.
// DEPTH must be a power of two.
//
// The depths come from the design's memory budget; the show-ahead read, the
// overflow strobe and the drop-on-full policy are this design's own choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty    = (wr_ptr == rd_ptr);
  assign full     = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign count    = wr_ptr - rd_ptr;
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign overflow = push && full;
  assign dout     = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // A pop on an empty FIFO is a caller error.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
