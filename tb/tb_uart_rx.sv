// tb_uart_rx -- self-checking test of the serial receiver.
//
// Drives 8N1 frames onto rx at several bit times (434 clocks = 115200 baud
// at 50 MHz, and shorter ones), and checks: every byte arrives intact with
// one valid strobe and no frame_error; a frame whose stop bit is 0 gives
// frame_error and no valid; a low glitch shorter than half a bit is ignored;
// valid comes 9.5 bit times (+ the input synchroniser) after the start edge.
module tb_uart_rx;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        rx  = 1'b1;
  logic [15:0] bit_cycles = 16'd16;
  logic [7:0]  data;
  logic        valid, frame_error;
  logic [1:0]  state_dbg;

  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] last_byte;
  longint cyc = 0, t_start = 0, t_valid = 0;

  uart_rx dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin
      n_valid   <= n_valid + 1;
      last_byte <= data;
      t_valid   <= cyc;
    end
    if (frame_error) n_ferr <= n_ferr + 1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic stop_bit);
    @(negedge clk);
    t_start = cyc;
    rx = 1'b0;
    repeat (bit_cycles) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (bit_cycles) @(negedge clk);
    end
    rx = stop_bit;
    repeat (bit_cycles) @(negedge clk);
    rx = 1'b1;
    repeat (bit_cycles) @(negedge clk);
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nv, nf;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);

    for (int k = 0; k < 3; k++) begin
      bit_cycles = (k == 0) ? 16'd434 : (k == 1) ? 16'd16 : 16'd9;
      for (int n = 0; n < 12; n++) begin
        logic [7:0] b;
        b  = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'hA5 : 8'($urandom);
        nv = n_valid;
        nf = n_ferr;
        send(b, 1'b1);
        check(n_valid == nv + 1, $sformatf("one valid for byte %02h at T=%0d", b, bit_cycles));
        check(n_ferr == nf, "no frame error on a good frame");
        check(last_byte == b, $sformatf("byte %02h received as %02h", b, last_byte));
        // stop-bit sample point: 9.5 bit times after the edge, plus the
        // 3-flop synchroniser and edge detector
        check(t_valid - t_start >= longint'(bit_cycles) * 9 + longint'(bit_cycles / 2) &&
              t_valid - t_start <= longint'(bit_cycles) * 9 + longint'(bit_cycles / 2) + 5,
              $sformatf("valid timing %0d at T=%0d", t_valid - t_start, bit_cycles));
      end
    end

    // bad stop bit
    bit_cycles = 16'd16;
    nv = n_valid; nf = n_ferr;
    send(8'h3C, 1'b0);
    repeat (40) @(negedge clk);
    check(n_ferr == nf + 1, "frame error on a 0 stop bit");
    check(n_valid == nv, "no valid on a 0 stop bit");

    // glitch shorter than half a bit: no frame at all
    nv = n_valid; nf = n_ferr;
    @(negedge clk); rx = 1'b0;
    repeat (3) @(negedge clk); rx = 1'b1;
    repeat (300) @(negedge clk);
    check(n_valid == nv && n_ferr == nf, "glitch rejected");
    // and the receiver still works afterwards
    send(8'h5A, 1'b1);
    check(n_valid == nv + 1 && last_byte == 8'h5A, "byte after glitch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
