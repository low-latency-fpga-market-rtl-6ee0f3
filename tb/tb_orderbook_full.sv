// tb_orderbook_full -- end-to-end test of the core at its full size: no
// parameter is overridden, so the hash table has 16,384 slots, the FIFOs
// their 256 / 64 entries and MSG_RATE its one-second window (which this run
// is too short to complete, so the rate register is not checked here; it is
// in tb_orderbook_top). The test itself is in orderbook_tb_body.svh: 150
// random messages through the serial pin with register-bus checks against
// a software order book, the statistics reset and a receive-FIFO overflow,
// with every mechanism counted.
module tb_orderbook_full;
  import itch_pkg::*;
  import itch_tb_pkg::*;

  localparam bit FULL  = 1;
  localparam int N_MSG = 150;

  logic        uart_rx_pin, rx_to_host;
  logic [7:0]  avs_address;
  logic        avs_chipselect, avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic [11:0] font_addr;
  logic [7:0]  font_row = 0;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs, vga_blank_n;

  orderbook_top dut (.*);

`include "orderbook_tb_body.svh"
endmodule
