// tb_sync_fifo -- self-checking test of the FIFO at both sizes it is used
// at: 256 x 9 (receive FIFO) and 64 x 8 (depth of the message FIFO).
// Random pushes and pops are compared with a queue model: output word,
// empty, full, count and the overflow strobe on a push while full.
module tb_sync_fifo;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- 256 x 9
  logic       a_push, a_pop, a_empty, a_full, a_ovf;
  logic [8:0] a_din, a_dout;
  logic [8:0] a_count;
  sync_fifo #(.WIDTH(9), .DEPTH(256)) dut_a (
    .clk, .rst, .push(a_push), .din(a_din), .pop(a_pop), .dout(a_dout),
    .empty(a_empty), .full(a_full), .overflow(a_ovf), .count(a_count));

  // ---------------- 64 x 8
  logic       b_push, b_pop, b_empty, b_full, b_ovf;
  logic [7:0] b_din, b_dout;
  logic [6:0] b_count;
  sync_fifo #(.WIDTH(8), .DEPTH(64)) dut_b (
    .clk, .rst, .push(b_push), .din(b_din), .pop(b_pop), .dout(b_dout),
    .empty(b_empty), .full(b_full), .overflow(b_ovf), .count(b_count));

  logic [8:0] qa[$];
  logic [7:0] qb[$];
  int n_ovf_a = 0, n_ovf_b = 0, n_full_a = 0;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_push = 0; a_pop = 0; a_din = 0;
    b_push = 0; b_pop = 0; b_din = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int bias;
      // phases: fill-heavy, drain-heavy, balanced
      bias = ((cyc / 1500) % 3 == 0) ? 80 : ((cyc / 1500) % 3 == 1) ? 20 : 50;
      @(negedge clk);
      // model checks against the current state
      check(a_empty == (qa.size() == 0), "A empty");
      check(a_full  == (qa.size() == 256), "A full");
      check(a_count == 9'(qa.size()), "A count");
      if (qa.size() != 0) check(a_dout == qa[0], $sformatf("A dout %0h vs %0h", a_dout, qa[0]));
      check(b_empty == (qb.size() == 0), "B empty");
      check(b_full  == (qb.size() == 64), "B full");
      check(b_count == 7'(qb.size()), "B count");
      if (qb.size() != 0) check(b_dout == qb[0], "B dout");
      if (a_full) n_full_a++;
      // stimulus
      a_push = ($urandom % 100) < bias;
      a_pop  = !a_empty && (($urandom % 100) >= bias);
      a_din  = 9'($urandom);
      b_push = ($urandom % 100) < bias;
      b_pop  = !b_empty && (($urandom % 100) >= bias);
      b_din  = 8'($urandom);
      #1;
      check(a_ovf == (a_push && qa.size() == 256), "A overflow strobe");
      check(b_ovf == (b_push && qb.size() == 64), "B overflow strobe");
      if (a_ovf) n_ovf_a++;
      if (b_ovf) n_ovf_b++;
      @(posedge clk);
      // a push while full is dropped even when a pop happens with it
      if (a_push && qa.size() < 256) qa.push_back(a_din);
      if (a_pop) void'(qa.pop_front());
      if (b_push && qb.size() < 64) qb.push_back(b_din);
      if (b_pop) void'(qb.pop_front());
    end
    check(n_ovf_a > 0 && n_ovf_b > 0 && n_full_a > 0, "full and overflow were reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
