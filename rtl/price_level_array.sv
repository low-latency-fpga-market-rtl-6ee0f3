// price_level_array -- the per-penny aggregate memory of the order book.
//
// 8,192 entries of 64 bits (pa_entry_t: aggregate shares, live-order count,
// valid), one per (symbol, penny) pair, indexed by
// (symbol_id << 11) | penny_offset, so each of the four symbols owns a
// 2,048-penny window. Two ports: port A reads and writes (the book engine's
// read-modify-write), port B only reads (the top-of-book tracker's scan), so
// the two never contend.
//
// Timing: both read ports have a two-clock latency, as a block RAM with a
// registered address and a registered output: an address presented in
// cycle t returns its word in cycle t+2, as it stands after the port-A
// write of cycle t (the array is read on the clock edge that ends cycle
// t+1, before that edge's write).
//
// After reset the array is swept clear one entry per clock (init_busy high
// for ENTRIES cycles); the ports must stay idle until init_busy falls.
//
// Size, entry layout and the dual-port arrangement follow the design
// description; the clearing sweep is this design's own, since on-chip RAM
// contents are not reset.
module price_level_array
  import itch_pkg::*;
#(
  parameter int unsigned ENTRIES = PA_ENTRIES
) (
  input  logic                        clk,
  input  logic                        rst,
  output logic                        init_busy,
  // port A: read / write
  input  logic [$clog2(ENTRIES)-1:0]  a_addr,
  input  logic                        a_we,
  input  pa_entry_t                   a_wdata,
  output pa_entry_t                   a_rdata,
  // port B: read only
  input  logic [$clog2(ENTRIES)-1:0]  b_addr,
  output pa_entry_t                   b_rdata
);

  localparam int unsigned AW = $clog2(ENTRIES);

  pa_entry_t        mem [ENTRIES];
  logic [AW-1:0]    a_addr_r, b_addr_r;
  logic [AW-1:0]    clr_addr;
  logic             clr_done;

  assign init_busy = !clr_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      clr_addr <= '0;
      clr_done <= 1'b0;
    end else if (!clr_done) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(ENTRIES - 1)) clr_done <= 1'b1;
    end
  end

  // memory: one write port, two registered read ports
  always_ff @(posedge clk) begin
    if (!clr_done)  mem[clr_addr] <= '0;
    else if (a_we)  mem[a_addr]   <= a_wdata;
    a_addr_r <= a_addr;
    b_addr_r <= b_addr;
    a_rdata  <= mem[a_addr_r];
    b_rdata  <= mem[b_addr_r];
  end

endmodule
