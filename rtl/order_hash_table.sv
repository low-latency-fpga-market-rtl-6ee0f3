// order_hash_table -- open-addressing table of live orders, keyed by the
// 64-bit ITCH order reference number.
//
// Each of the SLOTS 128-bit slots (ht_slot_t) holds one resting order: the
// full reference (so a probe compares keys, never just hashes), its raw
// price, remaining shares, side and symbol. The home slot of a reference is
// the XOR fold ref[13:0] ^ ref[27:14] ^ ref[41:28]; collisions are resolved
// by linear probing. Deletion uses backward shift instead of tombstones:
// the freed slot is refilled from the following entries of the probe run
// whose home slot does not lie cyclically in (freed, entry], until an empty
// slot ends the run. The table thus never holds tombstones and probe runs
// do not grow over a long replay.
//
// Commands (one at a time; cmd_ready is high in the idle state):
//   HT_LOOKUP  find cmd_ref; answers found, the slot index and the record.
//   HT_INSERT  store cmd_slot in the first free slot from its home slot;
//              answers the index, or full when no slot was free.
//   HT_WRITE   overwrite slot cmd_idx with cmd_slot (a quantity update).
//   HT_DELETE  free slot cmd_idx and run the backward shift.
// rsp_valid pulses for one clock when a command is finished; LOOKUP and
// INSERT answer on rsp_*. The memory is a single-port RAM with a two-clock
// read latency, so each probe takes three clocks (address, RAM address
// register, RAM output register, compare); a one-probe lookup answers four
// clocks after it is accepted.
//
// ht_load counts occupied slots. max_probe holds the longest probe run
// (slots read by one LOOKUP or INSERT) since the last stats_clear. After
// reset the RAM is swept clear (init_busy, SLOTS clocks).
//
// Slot layout, hash, linear probing, backward-shift deletion and the two
// diagnostics follow the design description. The command interface, the
// lack of a duplicate-key check on insert (ITCH references are unique within
// a day) and the clearing sweep are this design's own. A lookup ends at the
// first empty slot; SLOTS probes bound every loop.
module order_hash_table
  import itch_pkg::*;
#(
  parameter int unsigned SLOTS = HT_SLOTS_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      stats_clear,
  output logic                      init_busy,
  // command
  input  logic                      cmd_valid,
  output logic                      cmd_ready,
  input  logic [1:0]                cmd_op,      // ht_op_e
  input  logic [63:0]               cmd_ref,
  input  ht_slot_t                  cmd_slot,
  input  logic [$clog2(SLOTS)-1:0]  cmd_idx,
  // response
  output logic                      rsp_valid,
  output logic                      rsp_found,   // LOOKUP: key present
  output logic                      rsp_full,    // INSERT: no free slot
  output logic [$clog2(SLOTS)-1:0]  rsp_idx,
  output ht_slot_t                  rsp_slot,
  // diagnostics
  output logic [31:0]               ht_load,
  output logic [31:0]               max_probe
);

  localparam int unsigned IW = $clog2(SLOTS);

  localparam logic [1:0] HT_LOOKUP = 2'd0;
  localparam logic [1:0] HT_INSERT = 2'd1;
  localparam logic [1:0] HT_WRITE  = 2'd2;
  localparam logic [1:0] HT_DELETE = 2'd3;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_RD0, S_RD1, S_CMP, S_DONE} state_e;

  state_e        state;
  logic [1:0]    op;
  logic [63:0]   key;
  ht_slot_t      wslot;
  logic [IW-1:0] idx;       // slot being probed (j during a shift)
  logic [IW-1:0] hole;      // freed slot i during a shift
  logic [IW:0]   probes;

  // ---------------------------------------------------------------- RAM
  ht_slot_t      mem [SLOTS];
  logic [IW-1:0] addr_r;
  ht_slot_t      q;
  logic          we;
  logic [IW-1:0] waddr;
  ht_slot_t      wdata;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    addr_r <= idx;
    q      <= mem[addr_r];
  end

  // ---------------------------------------------------------------- helpers
  function automatic logic [IW-1:0] home(input logic [63:0] r);
    logic [13:0] h;
    h = hash_fold(r);
    return h[IW-1:0];
  endfunction

  // Does home slot k lie cyclically in (i, j]?
  function automatic logic in_run(input logic [IW-1:0] i, j, k);
    if (i <= j) return (k > i) && (k <= j);
    else        return (k > i) || (k <= j);
  endfunction

  assign cmd_ready = (state == S_IDLE);
  assign init_busy = (state == S_INIT);

  // write port, driven by the FSM
  always_comb begin
    we    = 1'b0;
    waddr = idx;
    wdata = wslot;
    unique case (state)
      S_INIT: begin
        we    = 1'b1;
        wdata = '0;
      end
      S_IDLE: begin
        if (cmd_valid && cmd_op == HT_WRITE) begin
          we    = 1'b1;
          waddr = cmd_idx;
          wdata = cmd_slot;
        end
      end
      S_CMP: begin
        if (op == HT_INSERT && !q.valid) begin
          we = 1'b1;                         // claim the free slot
        end else if (op == HT_DELETE) begin
          if (!q.valid || probes == (IW+1)'(SLOTS)) begin
            we = 1'b1; waddr = hole; wdata = '0;   // run ended: clear the hole
          end else if (!in_run(hole, idx, home(q.order_ref))) begin
            we = 1'b1; waddr = hole; wdata = q;    // shift entry back
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT;
      idx       <= '0;
      hole      <= '0;
      op        <= HT_LOOKUP;
      key       <= '0;
      wslot     <= '0;
      probes    <= '0;
      rsp_valid <= 1'b0;
      rsp_found <= 1'b0;
      rsp_full  <= 1'b0;
      rsp_idx   <= '0;
      rsp_slot  <= '0;
      ht_load   <= '0;
      max_probe <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (stats_clear) max_probe <= '0;
      unique case (state)
        S_INIT: begin
          idx <= idx + 1'b1;
          if (idx == IW'(SLOTS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (cmd_valid) begin
            op     <= cmd_op;
            key    <= cmd_ref;
            wslot  <= cmd_slot;
            probes <= '0;
            unique case (cmd_op)
              HT_LOOKUP: begin idx <= home(cmd_ref);            state <= S_RD0; end
              HT_INSERT: begin idx <= home(cmd_slot.order_ref); state <= S_RD0; end
              HT_WRITE:  begin rsp_valid <= 1'b1; rsp_idx <= cmd_idx; end
              HT_DELETE: begin hole <= cmd_idx; idx <= cmd_idx + 1'b1; state <= S_RD0; end
            endcase
          end
        end
        S_RD0: state <= S_RD1;
        S_RD1: begin
          state  <= S_CMP;
          probes <= probes + 1'b1;
        end
        S_CMP: begin
          state <= S_RD0;               // default: probe the next slot
          idx   <= idx + 1'b1;
          unique case (op)
            HT_LOOKUP: begin
              if (q.valid && q.order_ref == key) begin
                rsp_found <= 1'b1; rsp_idx <= idx; rsp_slot <= q; state <= S_DONE;
              end else if (!q.valid || probes == (IW+1)'(SLOTS)) begin
                rsp_found <= 1'b0; rsp_idx <= idx; rsp_slot <= q; state <= S_DONE;
              end
            end
            HT_INSERT: begin
              if (!q.valid) begin
                rsp_full <= 1'b0; rsp_idx <= idx; rsp_slot <= wslot; state <= S_DONE;
                ht_load  <= ht_load + 1;
              end else if (probes == (IW+1)'(SLOTS)) begin
                rsp_full <= 1'b1; rsp_idx <= idx; rsp_slot <= wslot; state <= S_DONE;
              end
            end
            default: begin              // HT_DELETE: backward shift
              if (!q.valid || probes == (IW+1)'(SLOTS)) begin
                ht_load <= ht_load - 1;
                state   <= S_DONE;
              end else if (!in_run(hole, idx, home(q.order_ref))) begin
                hole <= idx;
              end
            end
          endcase
        end
        S_DONE: begin
          rsp_valid <= 1'b1;
          state     <= S_IDLE;
          if (op != HT_DELETE && 32'(probes) > max_probe) max_probe <= 32'(probes);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
