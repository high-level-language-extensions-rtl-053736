// task_sync: blocking start/finish handshake of a hardware task declared
// with the "sync" qualifier.
//
// Before each run the task waits for a synchronisation signal from the
// software host; after it has finished it raises a synchronisation signal
// to the blocked host. The task is also held back until it is ready
// (for the SA-TM core: its run-time parameters have been set).
//
//   IDLE --(host_go && ready)--> RUN   (task_start pulses on entry)
//   RUN  --(task_done)---------> DONE  (host_done goes high)
//   DONE --(host_ack)----------> IDLE  (host_done goes low)
//
// With SYNC = 0 the task is not synchronised: it starts as soon as it is
// ready, and DONE returns to IDLE at once with a one-clock host_done pulse.
//
// Interface: busy is high in RUN. host_go is sampled in IDLE only; a go
// held high starts the next run once the host has acknowledged the last.
// Timing: task_start is a registered one-clock pulse in the first RUN
// clock. The handshake follows the sync qualifier; its signal names,
// level-versus-pulse choices and encoding are this design's own.
module task_sync #(
  parameter bit SYNC = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic host_go,
  input  logic ready,
  output logic task_start,
  input  logic task_done,
  output logic busy,
  output logic host_done,
  input  logic host_ack
);

  import satm_pkg::*;

  task_state_e state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      TS_IDLE: if (ready && (host_go || !SYNC)) state_d = TS_RUN;
      TS_RUN:  if (task_done)                   state_d = TS_DONE;
      TS_DONE: if (host_ack || !SYNC)           state_d = TS_IDLE;
      default:                                  state_d = TS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= TS_IDLE;
      task_start <= 1'b0;
    end else begin
      state      <= state_d;
      task_start <= (state == TS_IDLE) && (state_d == TS_RUN);
    end
  end

  assign busy      = (state == TS_RUN);
  assign host_done = (state == TS_DONE);

  // The task may only report completion while it runs.
  a_done_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    task_done |-> state == TS_RUN)
    else $error("task_done outside RUN");

endmodule
