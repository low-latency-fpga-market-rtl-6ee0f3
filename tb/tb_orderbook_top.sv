// tb_orderbook_top -- end-to-end test of the whole core with a 1,024-slot
// hash table (so that probe chains form quickly) and a 200,000-clock
// MSG_RATE window (so that the rate register updates during the run); the
// full-size variant is tb_orderbook_full. The test itself is in
// orderbook_tb_body.svh: 300 random messages through the serial pin,
// register-bus checks against a software order book after each, then the
// statistics reset and a receive-FIFO overflow, with every mechanism
// counted.
module tb_orderbook_top;
  import itch_pkg::*;
  import itch_tb_pkg::*;

  localparam bit FULL  = 0;
  localparam int N_MSG = 300;

  logic        uart_rx_pin, rx_to_host;
  logic [7:0]  avs_address;
  logic        avs_chipselect, avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic [11:0] font_addr;
  logic [7:0]  font_row = 0;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs, vga_blank_n;

  orderbook_top #(.HT_SLOTS(1024), .RATE_WINDOW(200_000)) dut (.*);

`include "orderbook_tb_body.svh"
endmodule
