// tb_order_hash_table -- self-checking test of the order-reference table.
//
// A 64-slot table (so that probe runs and wrap-around happen often) is
// driven with random inserts, lookups of present and absent references,
// quantity writes and deletes, and compared with an associative-array
// model: every lookup must find exactly the keys the model holds, with
// their current record, after any sequence of backward-shift deletions.
// Also checked: HT_LOAD, MAX_PROBE (above 1 under collisions, cleared by
// stats_clear), the full-table answer, and the latency of a lookup that
// hits its home slot (rsp_valid 4 clocks after acceptance). A second,
// full-size instance (16,384 slots) runs a short insert/lookup/delete pass.
module tb_order_hash_table;
  import itch_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int SLOTS = 64;
  localparam int IW = 6;

  logic           stats_clear = 0, init_busy, cmd_valid = 0, cmd_ready;
  logic [1:0]     cmd_op = 0;
  logic [63:0]    cmd_ref = 0;
  ht_slot_t       cmd_slot = '0, rsp_slot;
  logic [IW-1:0]  cmd_idx = 0, rsp_idx;
  logic           rsp_valid, rsp_found, rsp_full;
  logic [31:0]    ht_load, max_probe;

  order_hash_table #(.SLOTS(SLOTS)) dut (.*);

  // full-size instance
  logic           f_busy, f_cmd_valid = 0, f_cmd_ready, f_rsp_valid, f_rsp_found, f_rsp_full;
  logic [1:0]     f_cmd_op = 0;
  logic [63:0]    f_cmd_ref = 0;
  ht_slot_t       f_cmd_slot = '0, f_rsp_slot;
  logic [13:0]    f_cmd_idx = 0, f_rsp_idx;
  logic [31:0]    f_load, f_maxp;
  order_hash_table dut_full (
    .clk, .rst, .stats_clear(1'b0), .init_busy(f_busy),
    .cmd_valid(f_cmd_valid), .cmd_ready(f_cmd_ready), .cmd_op(f_cmd_op), .cmd_ref(f_cmd_ref),
    .cmd_slot(f_cmd_slot), .cmd_idx(f_cmd_idx), .rsp_valid(f_rsp_valid), .rsp_found(f_rsp_found),
    .rsp_full(f_rsp_full), .rsp_idx(f_rsp_idx), .rsp_slot(f_rsp_slot),
    .ht_load(f_load), .max_probe(f_maxp));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam logic [1:0] LOOKUP = 0, INSERT = 1, WRITE = 2, DELETE = 3;

  // issue a command, wait for the answer; lat = clock edges from the edge
  // that accepts the command to the one that raises rsp_valid
  task automatic cmd(input logic [1:0] op, input logic [63:0] r, input ht_slot_t s,
                     input logic [IW-1:0] i, output int lat);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_ref = r; cmd_slot = s; cmd_idx = i;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    lat = 0;
    while (!rsp_valid) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
  endtask

  ht_slot_t model[longint unsigned];

  function automatic ht_slot_t mk(longint unsigned r);
    ht_slot_t s = '0;
    s.valid = 1; s.order_ref = r; s.price = 24'($urandom); s.qty = 24'($urandom);
    s.side = 1'($urandom); s.symbol_id = 2'($urandom);
    return s;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, n_full = 0, n_shift_checks = 0;
    longint unsigned keys[$];
    repeat (3) @(posedge clk);
    rst = 0;
    while (init_busy) @(posedge clk);

    // home-slot hit latency
    begin
      ht_slot_t s = mk(64'h1234);
      cmd(INSERT, 0, s, 0, lat);
      model[64'h1234] = s;
      cmd(LOOKUP, 64'h1234, '0, 0, lat);
      check(rsp_found && rsp_slot == s, "first lookup");
      check(lat == 4, $sformatf("home-slot lookup latency %0d, expected 4", lat));
    end

    for (int n = 0; n < 3000; n++) begin
      int op;
      op = $urandom % 10;
      if ((op < 4 && model.num() < 44) || model.num() < 8) begin
        // insert a new key from a small space: many collisions
        longint unsigned r;
        ht_slot_t s;
        do r = $urandom % 4096; while (model.exists(r));
        s = mk(r);
        cmd(INSERT, 0, s, 0, lat);
        check(!rsp_full, "insert found room");
        model[r] = s;
      end else if (op < 6) begin
        // lookup of a random key, present or not
        longint unsigned r;
        r = $urandom % 4096;
        cmd(LOOKUP, r, '0, 0, lat);
        check(rsp_found == model.exists(r), $sformatf("lookup %0d found=%0d", r, rsp_found));
        if (model.exists(r)) check(rsp_slot == model[r], "lookup record");
      end else begin
        // pick a present key; write or delete it
        longint unsigned r;
        int k;
        keys.delete();
        foreach (model[x]) keys.push_back(x);
        k = $urandom % keys.size();
        r = keys[k];
        cmd(LOOKUP, r, '0, 0, lat);
        check(rsp_found && rsp_slot == model[r], "lookup before modify");
        if (op < 8) begin
          ht_slot_t s;
          s = model[r];
          s.qty = 24'($urandom);
          cmd(WRITE, 0, s, rsp_idx, lat);
          model[r] = s;
        end else begin
          cmd(DELETE, 0, '0, rsp_idx, lat);
          model.delete(r);
          // every remaining key must still be reachable after the shift
          foreach (model[x]) begin
            cmd(LOOKUP, x, '0, 0, lat);
            check(rsp_found && rsp_slot == model[x], $sformatf("key %0d lost after delete", x));
          end
          n_shift_checks++;
        end
      end
      check(ht_load == 32'(model.num()), $sformatf("HT_LOAD %0d vs %0d", ht_load, model.num()));
    end
    check(max_probe > 1, $sformatf("MAX_PROBE %0d shows collisions", max_probe));
    @(negedge clk); stats_clear = 1; @(negedge clk); stats_clear = 0;
    check(max_probe == 0, "MAX_PROBE cleared");

    // fill the table completely, then one more
    while (model.num() < SLOTS) begin
      longint unsigned r;
      ht_slot_t s;
      do r = $urandom % 4096; while (model.exists(r));
      s = mk(r);
      cmd(INSERT, 0, s, 0, lat);
      check(!rsp_full, "room before full");
      model[r] = s;
    end
    begin
      ht_slot_t s = mk(64'd5000);
      cmd(INSERT, 0, s, 0, lat);
      check(rsp_full, "full table refuses an insert");
      check(ht_load == SLOTS, "HT_LOAD at full");
    end
    check(n_shift_checks > 100, "deletes exercised");

    // full-size instance: a short pass
    while (f_busy) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      ht_slot_t s;
      s = mk(64'h1_0000_0000 + n * 16384);
      @(negedge clk);
      f_cmd_valid = 1; f_cmd_op = INSERT; f_cmd_slot = s;
      @(negedge clk); f_cmd_valid = 0;
      while (!f_rsp_valid) @(negedge clk);
      check(!f_rsp_full, "full-size insert");
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      f_cmd_valid = 1; f_cmd_op = LOOKUP; f_cmd_ref = 64'h1_0000_0000 + n * 16384;
      @(negedge clk); f_cmd_valid = 0;
      while (!f_rsp_valid) @(negedge clk);
      check(f_rsp_found && f_rsp_slot.order_ref == f_cmd_ref, "full-size lookup");
    end
    check(f_load == 200, "full-size HT_LOAD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
