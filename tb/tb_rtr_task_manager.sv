// tb_rtr_task_manager: self-checking test of the reconfiguration resource
// control.
//
// Three managers are driven with random task references:
//   u_fifo  5 tasks sharing 3 slots, FIFO replacement (a task struct);
//   u_lfu   5 tasks sharing 3 slots, LFU replacement;
//   u_def   default parameters: 2 tasks in 1 slot (a task union).
// A reference model (rc_model) predicts for each reference whether it hits
// a resident task and which slot it gets. The test acts as the
// configuration port: on every cfg_req it checks the slot and task against
// the model and answers with cfg_done after a random delay (never when
// no request is pending). It checks that
// hits cause no reconfiguration and are granted one clock after the
// request, that misses are granted one clock after cfg_done, that the
// default task is resident after reset, and that the residency table
// matches the model after every reference.
module tb_rtr_task_manager;
  import rtr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  class rc_model;
    int n_slots;
    bit lfu;
    int task_of [8];
    bit used [8];
    int cnt [8];
    int ptr;

    function new(int ns, bit l);
      n_slots = ns;
      lfu = l;
      ptr = 0;
      for (int s = 0; s < 8; s++) begin
        task_of[s] = 0; used[s] = (s == 0); cnt[s] = 0;
      end
    endfunction

    function void access(int t, output bit hit, output int slot, output bit evict);
      hit = 0; evict = 0; slot = -1;
      for (int s = 0; s < n_slots; s++)
        if (used[s] && task_of[s] == t) begin
          hit = 1; slot = s;
          if (cnt[s] < 255) cnt[s]++;
          return;
        end
      for (int s = 0; s < n_slots; s++)
        if (!used[s] && slot < 0) slot = s;
      if (slot < 0) begin
        evict = 1;
        if (lfu) begin
          slot = 0;
          for (int s = 1; s < n_slots; s++) if (cnt[s] < cnt[slot]) slot = s;
        end else begin
          slot = ptr;
          ptr = (ptr + 1) % n_slots;
        end
      end
      task_of[slot] = t; used[slot] = 1; cnt[slot] = 1;
    endfunction
  endclass

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // One manager instance with its signals and a driver process.
`define RC_INST(P, NT, NS, POL, PARAMS) \
  localparam int P``_TW = (NT > 1) ? $clog2(NT) : 1; \
  localparam int P``_SW = (NS > 1) ? $clog2(NS) : 1; \
  logic       P``_req_valid = 1'b0, P``_req_ready, P``_grant_valid, P``_grant_hit; \
  logic [P``_TW-1:0] P``_req_task = '0; \
  logic       P``_cfg_req, P``_cfg_done = 1'b0; \
  logic [P``_SW-1:0] P``_grant_slot, P``_cfg_slot; \
  logic [P``_TW-1:0] P``_cfg_task; \
  logic [P``_TW-1:0] P``_slot_task [NS]; \
  logic       P``_slot_used [NS]; \
  bit         P``_done = 1'b0; \
  initial begin \
    rc_model mdl; \
    bit hit, evict; \
    int slot, t, wait_c; \
    mdl = new(NS, POL == REPL_LFU); \
    @(posedge rst_n); \
    @(negedge clk); \
    chk(int'(P``_slot_used[0]), 1, `"P default task resident`"); \
    chk(int'(P``_slot_task[0]), 0, `"P default task in slot 0`"); \
    for (int n = 0; n < 400; n++) begin \
      t = (n == 0) ? 0 : $urandom_range(0, NT - 1); \
      if (n % 50 < 10) t = n % 2; \
      mdl.access(t, hit, slot, evict); \
      P``_req_valid = 1'b1; P``_req_task = P``_TW'(t); \
      #1; chk(int'(P``_req_ready), 1, `"P ready when idle`"); \
      @(negedge clk); \
      P``_req_valid = 1'b0; \
      if (hit) begin \
        n_hit++; \
        chk(int'(P``_cfg_req), 0, `"P no reconfiguration on hit`"); \
        chk(int'(P``_grant_valid), 1, `"P hit granted next clock`"); \
        chk(int'(P``_grant_hit), 1, `"P grant_hit`"); \
        chk(int'(P``_grant_slot), slot, `"P hit slot`"); \
      end else begin \
        n_miss++; \
        if (evict) n_evict++; \
        chk(int'(P``_cfg_req), 1, `"P reconfiguration on miss`"); \
        chk(int'(P``_cfg_slot), slot, `"P victim slot`"); \
        chk(int'(P``_cfg_task), t, `"P task to load`"); \
        if (P``_cfg_req) begin \
          wait_c = $urandom_range(0, 4); \
          repeat (wait_c) begin \
            chk(int'(P``_req_ready), 0, `"P busy during reconfiguration`"); \
            chk(int'(P``_grant_valid), 0, `"P no grant before cfg_done`"); \
            @(negedge clk); \
          end \
          P``_cfg_done = 1'b1; \
          @(negedge clk); \
          P``_cfg_done = 1'b0; \
          chk(int'(P``_grant_valid), 1, `"P miss granted after cfg_done`"); \
          chk(int'(P``_grant_hit), 0, `"P grant_hit low on miss`"); \
          chk(int'(P``_grant_slot), slot, `"P loaded slot`"); \
        end \
      end \
      for (int s = 0; s < NS; s++) begin \
        chk(int'(P``_slot_used[s]), int'(mdl.used[s]), `"P slot_used`"); \
        if (mdl.used[s]) chk(int'(P``_slot_task[s]), mdl.task_of[s], `"P slot_task`"); \
      end \
      if ($urandom_range(0, 3) == 0) @(negedge clk); \
    end \
    P``_done = 1'b1; \
  end \
  rtr_task_manager PARAMS u_``P ( \
    .clk, .rst_n, .req_valid(P``_req_valid), .req_ready(P``_req_ready), \
    .req_task(P``_req_task), .grant_valid(P``_grant_valid), \
    .grant_slot(P``_grant_slot), .grant_hit(P``_grant_hit), \
    .cfg_req(P``_cfg_req), .cfg_slot(P``_cfg_slot), \
    .cfg_task(P``_cfg_task), .cfg_done(P``_cfg_done), \
    .slot_task(P``_slot_task), .slot_used(P``_slot_used));

  `RC_INST(fifo, 5, 3, REPL_FIFO, #(.N_TASKS(5), .N_SLOTS(3), .POLICY(REPL_FIFO)))
  `RC_INST(lfu, 5, 3, REPL_LFU, #(.N_TASKS(5), .N_SLOTS(3), .POLICY(REPL_LFU)))
  `RC_INST(def, 2, 1, REPL_FIFO, )

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fifo_done && lfu_done && def_done);
    chk(int'(n_hit > 0), 1, "hits seen");
    chk(int'(n_evict > 0), 1, "evictions seen");
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
