// tb_text_buffer -- self-checking test of the 80 x 60 caption memory.
//
// Random writes and reads over the whole address range (including the
// unused addresses 4,800-8,191) against an array model; checks the
// one-clock read latency, that a read in the same clock as a write to the
// same cell returns the old value, and that out-of-range cells read 0.
module tb_text_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [7:0]  wdata = 0, rdata;

  text_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [7:0] model [8192];

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_d;
    logic       exp_v = 0;
    int n_oob = 0, n_same = 0;
    // fill every cell first, so that nothing unwritten is read
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk);
      we = 1; waddr = 13'(a); wdata = 8'($urandom);
      model[a] = (a < 4800) ? wdata : 8'd0;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 50000; n++) begin
      @(negedge clk);
      if (exp_v) check(rdata == exp_d, $sformatf("read at step %0d", n));
      we    = ($urandom % 2);
      waddr = ($urandom % 8) == 0 ? 13'(4800 + $urandom % 3392) : 13'($urandom % 64);
      wdata = 8'($urandom);
      raddr = ($urandom % 2) ? waddr : 13'($urandom % 64);
      if (($urandom % 10) == 0) raddr = 13'(4800 + $urandom % 3392);
      exp_d = model[raddr];
      exp_v = 1;
      if (raddr >= 4800) n_oob++;
      if (we && raddr == waddr && waddr < 4800) n_same++;
      if (we && waddr < 4800) model[waddr] = wdata;
    end
    check(n_oob > 0 && n_same > 0, "out-of-range and same-cell cases happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
