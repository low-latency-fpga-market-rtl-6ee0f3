// tb_stats_counters -- self-checking test of the benchmark counters.
//
// Drives random done strobes with random latencies and random error strobes
// (several at once at times) into a counter block with a 1,000-clock rate
// window, and compares every output each clock with a model: message count,
// last latency, error sum, sticky parse-error flag, and the rate register,
// which must change exactly once per 1,000 clocks and then hold the number
// of messages of the window just ended. Also checks that clear zeroes
// everything and restarts the window.
module tb_stats_counters;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int WINDOW = 1000;

  logic        clear = 0, done = 0, err_frame = 0, err_parse = 0, err_window = 0;
  logic        err_full = 0, err_overflow = 0, parse_error;
  logic [31:0] done_latency = 0, msg_count, latency, err_count, msg_rate;

  stats_counters #(.WINDOW(WINDOW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_count = 0, m_lat = 0, m_err = 0, m_rate = 0, m_win = 0, m_wmsgs = 0;
    int rate_changes = 0, last_change = -1, multi_err = 0;
    bit m_perr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60000; n++) begin
      int ne;
      // compare the state left by the previous edge
      check(msg_count == 32'(m_count), $sformatf("msg_count %0d vs %0d", msg_count, m_count));
      check(latency == 32'(m_lat), "latency");
      check(err_count == 32'(m_err), $sformatf("err_count %0d vs %0d", err_count, m_err));
      check(msg_rate == 32'(m_rate), $sformatf("msg_rate %0d vs %0d at %0d", msg_rate, m_rate, n));
      check(parse_error == m_perr, "parse_error");
      // new inputs
      clear        = (n == 30000) || (n == 45123);
      done         = ($urandom % 3) == 0;
      done_latency = $urandom % 5000;
      err_frame    = ($urandom % 50) == 0;
      err_parse    = ($urandom % 400) == 0;
      err_window   = ($urandom % 400) == 0;
      err_full     = ($urandom % 60) == 0;
      err_overflow = ($urandom % 60) == 0;
      ne = err_frame + err_parse + err_window + err_full + err_overflow;
      if (ne > 1) multi_err++;
      // model of the coming edge
      if (clear) begin
        m_count = 0; m_lat = 0; m_err = 0; m_rate = 0; m_win = 0; m_wmsgs = 0; m_perr = 0;
      end else begin
        if (done) begin m_count++; m_lat = done_latency; end
        m_err += ne;
        if (err_parse || err_window) m_perr = 1;
        if (m_win == WINDOW - 1) begin
          if (m_rate != m_wmsgs + done) rate_changes++;
          m_rate = m_wmsgs + done; m_win = 0; m_wmsgs = 0;
        end else begin
          m_win++; m_wmsgs += done;
        end
      end
      @(negedge clk);
    end
    check(rate_changes > 40, $sformatf("rate window rolled over (%0d)", rate_changes));
    check(multi_err > 0, "simultaneous errors happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
