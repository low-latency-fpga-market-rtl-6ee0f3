// uart_rx -- serial receiver for the market-data link (8 data bits, no
// parity, one stop bit, LSB first).
//
// A four-state FSM (IDLE, START, DATA, STOP). In IDLE it compares each
// synchronised sample of rx with the previous one; a 1 -> 0 transition is a
// possible start bit. START waits half a bit time and re-samples: still 0
// means a real start bit (go to DATA), 1 means a glitch (back to IDLE). DATA
// waits one full bit time before each of the eight samples, which therefore
// land in the middle of each data bit, and shifts them into the data
// register. STOP samples the middle of the stop bit: 1 gives valid, 0 gives
// frame_error; both return to IDLE.
//
// The byte strobes are Mealy outputs: valid / frame_error are asserted for
// exactly one clock, in STOP, on the cycle the stop bit is sampled, and
// depend on that sample. data holds the received byte from then until the
// next frame's first data bit. bit_cycles is the bit time in clocks
// (CLK / BAUD), normally itch_pkg::baud_cycles(BAUD_SEL); it is sampled
// live, so change it only while the line is idle.
//
// The four states, the edge test in IDLE and the mid-bit sampling follow the
// design description; the three-flop input synchroniser and the reset values
// are this design's own.
module uart_rx (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic        rx,           // serial line, idles high
  input  logic [15:0] bit_cycles,   // clocks per bit, >= 4
  output logic [7:0]  data,
  output logic        valid,        // one-cycle strobe, stop bit good
  output logic        frame_error,  // one-cycle strobe, stop bit was 0
  output logic [1:0]  state_dbg     // current FSM state, for STATUS
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e      state;
  logic [2:0]  sync;        // sync[2] is the synchronised input
  logic        prev;        // previous synchronised sample
  logic [15:0] cnt;
  logic [2:0]  bit_idx;
  logic        rx_s;
  logic [15:0] half_cycles;
  logic        at_half, at_full;

  assign rx_s        = sync[2];
  assign half_cycles = bit_cycles >> 1;
  assign at_half     = (cnt == half_cycles - 16'd1);
  assign at_full     = (cnt == bit_cycles - 16'd1);
  assign state_dbg   = state;

  // Mealy outputs: valid only in STOP, at the mid-bit sample, depending on rx.
  assign valid       = (state == STOP) && at_full &&  rx_s;
  assign frame_error = (state == STOP) && at_full && !rx_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= '1;
      prev    <= 1'b1;
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      data    <= '0;
    end else begin
      sync <= {sync[1:0], rx};
      prev <= rx_s;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (prev && !rx_s) state <= START;
        end
        START: begin
          if (at_half) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s ? IDLE : DATA;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        DATA: begin
          if (at_full) begin
            cnt     <= '0;
            data    <= {rx_s, data[7:1]};
            bit_idx <= bit_idx + 3'd1;
            if (bit_idx == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        STOP: begin
          if (at_full) begin
            cnt   <= '0;
            state <= IDLE;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
      endcase
    end
  end

endmodule
