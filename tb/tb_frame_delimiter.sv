// tb_frame_delimiter -- self-checking test of the message framer.
//
// Sends leading junk, then framed ITCH messages of random lengths with
// random input gaps and output stalls, a zero-length frame, and a message
// broken by a byte with a framing error. Checks every forwarded byte, sof on
// the first and eom on the last byte of each message, the length, that the
// broken message ends with abort, and that framing restarts after it.
module tb_frame_delimiter;
  import itch_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, in_ferr, in_ready, out_valid, out_sof, out_eom, out_ready, out_abort, ferr;
  logic [7:0]  in_data, out_data;
  logic [15:0] out_len;

  frame_delimiter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // input stream: {ferr, byte}
  logic [8:0] stream[$];
  // expected output: {abort, sof, eom, byte, len}
  typedef struct {bit abort; bit sof; bit eom; byte unsigned b; int len;} exp_t;
  exp_t expq[$];
  int n_abort = 0, n_ferr = 0, n_msgs = 0;

  task automatic add_frame(input int len);
    bytes_t m, f;
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
    f = frame(m);
    foreach (f[i]) stream.push_back({1'b0, f[i]});
    foreach (m[i]) expq.push_back('{0, i == 0, i == len - 1, m[i], len});
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      if (expq.size() == 0) check(0, "unexpected output byte");
      else begin
        exp_t e;
        e = expq.pop_front();
        if (e.abort) begin
          check(out_abort, "abort expected");
          n_abort++;
        end else begin
          check(!out_abort, "no abort");
          check(out_data == e.b, $sformatf("byte %02h vs %02h", out_data, e.b));
          check(out_sof == e.sof, "sof");
          check(out_eom == e.eom, "eom");
          check(out_len == 16'(e.len), "len");
          if (e.eom) n_msgs++;
        end
      end
    end
    if (!rst && ferr) n_ferr++;
  end

  initial begin
    int total;
    in_valid = 0; in_ferr = 0; in_data = 0; out_ready = 1;
    // junk before the first start byte
    stream.push_back(9'h011); stream.push_back(9'h0FF); stream.push_back(9'h07E);
    add_frame(36);
    add_frame(19);
    // zero-length frame: nothing forwarded
    stream.push_back(9'h000); stream.push_back(9'h000); stream.push_back(9'h000);
    add_frame(1);
    // broken message: 5 bytes, then a framing error
    stream.push_back(9'h000); stream.push_back(9'h000); stream.push_back(9'h00A);
    for (int i = 0; i < 5; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      stream.push_back({1'b0, b});
      expq.push_back('{0, i == 0, 0, b, 10});
    end
    stream.push_back(9'h155);
    expq.push_back('{1, 0, 0, 0, 10});
    for (int k = 0; k < 30; k++) add_frame(1 + $urandom % 60);
    add_frame(300);
    total = expq.size();

    repeat (3) @(posedge clk);
    rst = 1'b0;
    while (stream.size() != 0) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      in_valid  = ($urandom % 3) != 0;
      in_ferr   = stream[0][8];
      in_data   = stream[0][7:0];
      @(posedge clk);
      if (in_valid && in_ready) void'(stream.pop_front());
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d expected bytes never came", expq.size()));
    check(n_abort == 1, "one abort");
    check(n_ferr == 1, "one framing error reported");
    check(n_msgs == 34, $sformatf("34 whole messages, got %0d", n_msgs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
