// tb_price_level_array -- self-checking test of the per-penny memory at its
// full size (8,192 x 64 bits).
//
// Waits for the clearing sweep (8,192 clocks), checks that entries read as
// zero, then does random writes on port A and reads on both ports against
// an array model, checking the two-clock read latency on each port and
// which write a read sees: those of the cycle it was presented in and
// earlier, not those of the cycle after.
module tb_price_level_array;
  import itch_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        init_busy;
  logic [12:0] a_addr = 0, b_addr = 0;
  logic        a_we = 0;
  pa_entry_t   a_wdata = '0, a_rdata, b_rdata;

  price_level_array dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  pa_entry_t model [8192];
  // expected read data, two clocks after the address
  pa_entry_t ea [2], eb [2];
  logic      va [2], vb [2];

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles = 0;
    foreach (model[i]) model[i] = '0;
    va = '{0, 0}; vb = '{0, 0};
    repeat (3) @(posedge clk);
    rst = 0;
    while (init_busy) begin @(posedge clk); busy_cycles++; end
    check(busy_cycles >= 8192 && busy_cycles <= 8194, $sformatf("clear sweep %0d clocks", busy_cycles));

    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      // data presented two clocks ago is on the outputs now
      if (va[1]) check(a_rdata == ea[1], $sformatf("port A read at cycle %0d", n));
      if (vb[1]) check(b_rdata == eb[1], $sformatf("port B read at cycle %0d", n));
      va[1] = va[0]; ea[1] = ea[0];
      vb[1] = vb[0]; eb[1] = eb[0];
      // new access; a small address range so reads hit recent writes
      a_addr  = 13'($urandom % 64) | (n < 20000 ? 13'h0 : 13'($urandom));
      b_addr  = ($urandom % 2) ? a_addr : 13'($urandom % 64);
      a_we    = ($urandom % 3) == 0;
      a_wdata = {$urandom, $urandom};
      // a read returns the word as it stands after this cycle's write,
      // and before the next cycle's write
      if (a_we) model[a_addr] = a_wdata;
      va[0] = 1; ea[0] = model[a_addr];
      vb[0] = 1; eb[0] = model[b_addr];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
