// stats_counters -- the benchmark counters read over the register bus.
//
//   msg_count   messages the book engine has finished (one per done);
//   latency     clocks from first byte to book update of the last message;
//   err_count   framing errors, malformed messages, out-of-window prices,
//               full-table inserts and FIFO overflows, all in one counter
//               (several in one clock all count);
//   msg_rate    messages finished in the last complete window of WINDOW
//               clocks (one second at 50 MHz);
//   parse_error sticky flag, set by a malformed message or an out-of-window
//               price, cleared only by clear.
// clear (CONTROL bit 4) zeroes all of them and restarts the rate window.
// Every counter updates on the clock after its strobe.
//
// The set of counters follows the design's register map; combining all
// error kinds in one counter, and what sets the sticky bit, are this
// design's own choices.
module stats_counters #(
  parameter int unsigned WINDOW = 50_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        done,
  input  logic [31:0] done_latency,
  input  logic        err_frame,
  input  logic        err_parse,
  input  logic        err_window,
  input  logic        err_full,
  input  logic        err_overflow,
  output logic [31:0] msg_count,
  output logic [31:0] latency,
  output logic [31:0] err_count,
  output logic [31:0] msg_rate,
  output logic        parse_error
);

  logic [31:0] win_cnt;      // clocks into the current window
  logic [31:0] win_msgs;     // messages in the current window
  logic [2:0]  n_err;

  assign n_err = 3'(err_frame) + 3'(err_parse) + 3'(err_window) + 3'(err_full) + 3'(err_overflow);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      msg_count   <= '0;
      latency     <= '0;
      err_count   <= '0;
      msg_rate    <= '0;
      parse_error <= 1'b0;
      win_cnt     <= '0;
      win_msgs    <= '0;
    end else begin
      if (done) begin
        msg_count <= msg_count + 1;
        latency   <= done_latency;
      end
      err_count <= err_count + 32'(n_err);
      if (err_parse || err_window) parse_error <= 1'b1;
      if (win_cnt == WINDOW - 1) begin
        win_cnt  <= '0;
        msg_rate <= win_msgs + 32'(done);
        win_msgs <= '0;
      end else begin
        win_cnt  <= win_cnt + 1;
        win_msgs <= win_msgs + 32'(done);
      end
    end
  end

endmodule
