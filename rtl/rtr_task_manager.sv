// rtr_task_manager: resource control for one reconfigurable task construct.
//
// A construct holds N_TASKS tasks that share N_SLOTS reconfigurable
// regions. N_SLOTS = 1 is a task union: the tasks are mutually exclusive
// and every change of task is a physical reconfiguration. N_SLOTS > 1 is a
// task struct: up to N_SLOTS tasks are resident at once, a reference to a
// resident task only switches the output multiplexers to its slot, and a
// reference to any other task displaces a resident one, as in memory
// paging. Task 0, the first element of the construct, is the default task:
// it is part of the initial configuration and sits in slot 0 after reset.
//
// For each task reference (req_valid/req_ready, req_task) the manager
// looks the task up in its residency table.
//   hit:  grant_valid pulses the next clock with the task's slot.
//   miss: a slot is chosen (the lowest free slot, else by POLICY: FIFO
//         takes the slot loaded longest ago, LFU the slot whose task has
//         been used least since it was loaded, lowest index on ties);
//         cfg_req asks for that slot's resources to be released and the
//         task's configuration to be loaded into it (cfg_slot, cfg_task)
//         and stays high until cfg_done. The table is then updated and
//         grant_valid pulses with the new slot. No reference is taken
//         while a reconfiguration is in progress.
// slot_task/slot_used show the table, e.g. to drive multiplexer selects.
// Tasks are loaded when first used; pre-loading is not done.
//
// Timing: a hit is granted one clock after it is accepted; a miss one
// clock after cfg_done. Use counts saturate at 2**CNT_W - 1.
// The residency bookkeeping, default task, struct/union behaviour and the
// FIFO and LFU policies follow the description of reconfigurable task
// constructs; the handshakes, the tie-breaks and the counter width are
// this design's own.
module rtr_task_manager #(
  parameter int unsigned           N_TASKS = 2,
  parameter int unsigned           N_SLOTS = 1,
  parameter rtr_pkg::repl_policy_e POLICY  = rtr_pkg::REPL_FIFO,
  parameter int unsigned           CNT_W   = 8,
  localparam int unsigned          TW      = satm_pkg::idx_w(N_TASKS),
  localparam int unsigned          SW      = satm_pkg::idx_w(N_SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // task references
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [TW-1:0] req_task,
  output logic          grant_valid,
  output logic [SW-1:0] grant_slot,
  output logic          grant_hit,
  // reconfiguration requests
  output logic          cfg_req,
  output logic [SW-1:0] cfg_slot,
  output logic [TW-1:0] cfg_task,
  input  logic          cfg_done,
  // residency table
  output logic [TW-1:0] slot_task [N_SLOTS],
  output logic          slot_used [N_SLOTS]
);

  import rtr_pkg::*;

  rc_state_e        state;
  logic [CNT_W-1:0] use_cnt [N_SLOTS];
  logic [SW-1:0]    fifo_ptr;

  // ----------------------------------------------------------- lookup
  logic          hit;
  logic [SW-1:0] hit_slot;
  logic          have_free;
  logic [SW-1:0] free_slot;
  logic [SW-1:0] lfu_slot;
  logic [SW-1:0] victim;

  always_comb begin
    hit       = 1'b0;
    hit_slot  = '0;
    have_free = 1'b0;
    free_slot = '0;
    lfu_slot  = '0;
    for (int unsigned s = 0; s < N_SLOTS; s++) begin
      if (slot_used[s] && slot_task[s] == req_task && !hit) begin
        hit      = 1'b1;
        hit_slot = SW'(s);
      end
      if (!slot_used[s] && !have_free) begin
        have_free = 1'b1;
        free_slot = SW'(s);
      end
      if (use_cnt[s] < use_cnt[lfu_slot]) lfu_slot = SW'(s);
    end
    if (have_free)               victim = free_slot;
    else if (POLICY == REPL_LFU) victim = lfu_slot;
    else                         victim = fifo_ptr;
  end

  assign req_ready = (state == RC_IDLE) && !cfg_req;

  // ---------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= RC_IDLE;
      fifo_ptr    <= '0;
      grant_valid <= 1'b0;
      grant_slot  <= '0;
      grant_hit   <= 1'b0;
      cfg_req     <= 1'b0;
      cfg_slot    <= '0;
      cfg_task    <= '0;
      for (int unsigned s = 0; s < N_SLOTS; s++) begin
        slot_task[s] <= '0;
        slot_used[s] <= (s == 0);    // default task from the initial configuration
        use_cnt[s]   <= '0;
      end
    end else begin
      grant_valid <= 1'b0;
      unique case (state)
        RC_IDLE: begin
          if (req_valid && req_ready) begin
            if (hit) begin
              grant_valid <= 1'b1;
              grant_slot  <= hit_slot;
              grant_hit   <= 1'b1;
              if (use_cnt[hit_slot] != '1) use_cnt[hit_slot] <= use_cnt[hit_slot] + 1'b1;
            end else begin
              cfg_req  <= 1'b1;
              cfg_slot <= victim;
              cfg_task <= req_task;
              state    <= RC_CFG;
              if (!have_free && POLICY == REPL_FIFO)
                fifo_ptr <= (32'(fifo_ptr) == N_SLOTS - 1) ? '0 : fifo_ptr + 1'b1;
            end
          end
        end
        RC_CFG: begin
          if (cfg_done) begin
            cfg_req             <= 1'b0;
            slot_task[cfg_slot] <= cfg_task;
            slot_used[cfg_slot] <= 1'b1;
            use_cnt[cfg_slot]   <= CNT_W'(1);
            grant_valid         <= 1'b1;
            grant_slot          <= cfg_slot;
            grant_hit           <= 1'b0;
            state               <= RC_IDLE;
          end
        end
        default: state <= RC_IDLE;
      endcase
    end
  end

  // A reconfiguration can only finish while one was requested.
  a_done_with_req: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_done |-> cfg_req)
    else $error("cfg_done without cfg_req");

  // References name a task of the construct.
  a_task_range: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> 32'(req_task) < N_TASKS)
    else $error("task index out of range");

endmodule
