// text_buffer -- caption memory for the VGA display: 80 x 60 = 4,800
// character cells of 8 bits (ASCII or font index), row-major, cell
// address = row * 80 + column.
//
// The host writes one cell at a time through the register file
// (CHAR_MEM_ADDR, then CHAR_MEM_DATA); the display reads one cell per
// character position. Write port: we, waddr, wdata, in the array from the
// next clock. Read port: raddr registered, rdata valid one clock later.
// Addresses of 4,800 and up are ignored on write and read 0.
//
// Size and purpose follow the design description; the port arrangement and
// the one-clock read are this design's own. Contents after power-up are
// whatever the host writes; the display treats every cell as a character.
module text_buffer #(
  parameter int unsigned COLS = 80,
  parameter int unsigned ROWS = 60
) (
  input  logic        clk,
  input  logic        we,
  input  logic [12:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [12:0] raddr,
  output logic [7:0]  rdata
);

  localparam int unsigned CELLS = COLS * ROWS;

  logic [7:0] mem [CELLS];

  always_ff @(posedge clk) begin
    if (we && waddr < 13'(CELLS)) mem[waddr] <= wdata;
    rdata <= (raddr < 13'(CELLS)) ? mem[raddr] : 8'd0;
  end

endmodule
