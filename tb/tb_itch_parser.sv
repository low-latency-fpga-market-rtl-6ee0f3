// tb_itch_parser -- self-checking test of the ITCH message decoder.
//
// Feeds random Add (plain and attributed), Delete, Replace, Executed, Executed-with-price and
// Cancel messages (random field values, random input gaps), plus messages
// of an unsupported type, a message with a wrong length and an aborted one.
// Checks every decoded record against the values the message was built
// from, the stock-filter match, the first-byte timestamp, the parse_err
// strobe, and that in_ready falls while the message FIFO is full.
module tb_itch_parser;
  import itch_pkg::*;
  import itch_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, in_sof, in_eom, in_abort, in_ready;
  logic [7:0]  in_data;
  logic [15:0] in_len;
  logic [63:0] stock_filter [N_SYMBOLS];
  logic [31:0] now;
  logic        msg_full, msg_valid, parse_err;
  itch_msg_t   msg;
  logic [2:0]  state_dbg;

  itch_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  string names[5] = '{"AAPL", "MSFT", "NVDA", "TSLA", "GOOG"};
  itch_msg_t expq[$];
  int n_err = 0, n_msgs = 0, n_kind[6], n_f = 0;

  always_ff @(posedge clk) begin
    if (rst) now <= 0;
    else     now <= now + 1;
  end

  always @(posedge clk) begin
    if (!rst && msg_valid) begin
      itch_msg_t e;
      n_msgs++;
      if (expq.size() == 0) check(0, "unexpected message");
      else begin
        e = expq.pop_front();
        check(msg.kind == e.kind, $sformatf("kind %0d vs %0d", msg.kind, e.kind));
        check(msg.order_ref == e.order_ref, "order_ref");
        check(msg.locate == e.locate, "locate");
        check(msg.t_first == e.t_first, $sformatf("t_first %0d vs %0d", msg.t_first, e.t_first));
        if (e.kind == MSG_ADD) begin
          check(msg.side == e.side, "side");
          check(msg.shares == e.shares, "shares");
          check(msg.price == e.price, "price");
          check(msg.sym_match == e.sym_match, "filter match");
          if (e.sym_match) check(msg.symbol_id == e.symbol_id, "symbol id");
        end else if (e.kind == MSG_REPLACE) begin
          check(msg.new_ref == e.new_ref, "new_ref");
          check(msg.shares == e.shares, "shares");
          check(msg.price == e.price, "price");
        end else if (e.kind != MSG_DELETE) begin
          check(msg.shares == e.shares, "shares");
        end
        n_kind[e.kind]++;
      end
    end
    if (!rst && parse_err) n_err++;
  end

  // send one message; record t_first at its first byte
  task automatic send(input bytes_t m, input int len, input int abort_at = -1,
                      output logic [31:0] t_first);
    int i = 0;
    t_first = 0;
    while (i < m.size()) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_data  = m[i];
      in_sof   = (i == 0);
      in_eom   = (i == m.size() - 1);
      in_len   = 16'(len);
      in_abort = (i == abort_at);
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (i == 0) t_first = now;
        i++;
        if (i - 1 == abort_at) break;
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] t;
    bytes_t m;
    itch_msg_t e;
    int ready_low = 0;
    in_valid = 0; in_sof = 0; in_eom = 0; in_abort = 0; in_data = 0; in_len = 0;
    msg_full = 0;
    for (int s = 0; s < 4; s++) stock_filter[s] = filter_word(names[s]);
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int n = 0; n < 120; n++) begin
      int k;
      k = $urandom % 6;
      e = '0;
      e.order_ref = {32'($urandom), 32'($urandom)};
      e.new_ref   = {32'($urandom), 32'($urandom)};
      e.shares    = $urandom;
      e.price     = $urandom;
      e.side      = $urandom;
      e.locate    = 16'd7;
      unique case (k)
        0: begin
          int s;
          s = $urandom % 5;
          e.kind = MSG_ADD;
          // 'A' or its attributed form 'F'
          m = msg_add(e.order_ref, e.side, e.shares, names[s], e.price, 7, n % 2);
          if (n % 2) n_f++;
          e.sym_match = (s < 4);
          e.symbol_id = 2'(s);
        end
        1: begin e.kind = MSG_DELETE;  m = msg_delete(e.order_ref); end
        2: begin e.kind = MSG_REPLACE; m = msg_replace(e.order_ref, e.new_ref, e.shares, e.price); end
        3: begin e.kind = MSG_EXEC;    m = msg_exec(e.order_ref, e.shares); end
        4: begin e.kind = MSG_EXEC_PX; m = msg_exec_px(e.order_ref, e.shares, e.price); end
        default: begin e.kind = MSG_CANCEL; m = msg_cancel(e.order_ref, e.shares); end
      endcase
      // every tenth message: an unsupported type ('S', system event) first
      if (n % 10 == 5) begin
        bytes_t sm;
        sm = blank(8'h53, 12, 0);
        send(sm, 12, -1, t);
      end
      fork
        send(m, m.size(), -1, t);
        begin
          // hold the FIFO full for a while on some messages
          if (n % 7 == 3) begin
            msg_full = 1'b1;
            repeat (20) begin
              @(posedge clk);
              if (!in_ready) ready_low++;
            end
            msg_full = 1'b0;
          end
        end
      join
      e.t_first = t;
      expq.push_back(e);
      repeat (3) @(posedge clk);
    end
    // wrong length: an Add framed as 30 bytes
    m = msg_add(64'd1, 0, 100, "AAPL", 1000000);
    m = m[0:29];
    send(m, 30, -1, t);
    repeat (3) @(posedge clk);
    check(n_err == 1, "parse error on a short Add");
    // aborted message, then a good one
    m = msg_delete(64'd99);
    send(m, 19, 7, t);
    m = msg_delete(64'd100);
    send(m, 19, -1, t);
    e = '0; e.kind = MSG_DELETE; e.order_ref = 64'd100; e.locate = 16'd7; e.t_first = t;
    expq.push_back(e);
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "all messages decoded");
    check(n_msgs == 121, $sformatf("121 messages, got %0d", n_msgs));
    check(ready_low > 0, "in_ready fell while the FIFO was full");
    for (int k = 0; k < 6; k++) check(n_kind[k] > 0, $sformatf("kind %0d seen", k));
    check(n_f > 0, "attributed Add ('F') seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
