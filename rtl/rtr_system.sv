// rtr_system: the run-time reconfigurable system, top level.
//
// Two independent parts stand side by side, each with its own ports:
//
//   u_satm  the run-time parametrisable template matching core
//           (satm_top). Its run-time parameters, template and mask, are
//           reconfigured through the cfg_* ports; host_go/host_done/host_ack
//           are its sync handshake with the host; pixels stream in and
//           match results stream out.
//   u_rc    the resource control of one reconfigurable task construct
//           (rtr_task_manager). It keeps track of which of the
//           construct's tasks occupy its reconfigurable slots, answers task
//           references with the slot to switch to, and requests a
//           reconfiguration (release a slot, load a task) when a task is
//           not on the hardware. The slots themselves and the
//           configuration port are outside this design: rc_cfg_req /
//           rc_cfg_done connect to whatever loads the configuration, and
//           rc_slot_task / rc_slot_used can drive output multiplexers.
//
// The two parts share only the clock and reset. See satm_top and
// rtr_task_manager for the behaviour and timing of each; this module adds
// no logic. Grouping them in one top follows the framework's split into
// reconfigurable tasks and their run-time resource control; the port
// naming is this design's own.
module rtr_system #(
  parameter int unsigned IMG_W    = satm_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H    = satm_pkg::DEF_IMG_H,
  parameter int unsigned TMPL_W   = satm_pkg::DEF_TMPL_W,
  parameter int unsigned TMPL_H   = satm_pkg::DEF_TMPL_H,
  parameter int unsigned PIX_W    = satm_pkg::DEF_PIX_W,
  parameter int unsigned IMG_PIPE = 1,
  parameter bit          SYNC     = 1'b1,
  parameter int unsigned N_TASKS  = 2,
  parameter int unsigned N_SLOTS  = 1,
  parameter rtr_pkg::repl_policy_e POLICY = rtr_pkg::REPL_FIFO,
  localparam int unsigned SUM_W   = PIX_W + $clog2(TMPL_W * TMPL_H),
  localparam int unsigned XW      = satm_pkg::idx_w(IMG_W),
  localparam int unsigned YW      = satm_pkg::idx_w(IMG_H),
  localparam int unsigned RW      = satm_pkg::idx_w(TMPL_H),
  localparam int unsigned CW      = satm_pkg::idx_w(TMPL_W),
  localparam int unsigned CNT_W   = $clog2(IMG_W * IMG_H + 1),
  localparam int unsigned TKW     = satm_pkg::idx_w(N_TASKS),
  localparam int unsigned SLW     = satm_pkg::idx_w(N_SLOTS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host synchronisation
  input  logic             host_go,
  output logic             host_done,
  input  logic             host_ack,
  output logic             busy,
  // run-time parameters
  input  logic             cfg_we,
  input  logic [RW-1:0]    cfg_row,
  input  logic [CW-1:0]    cfg_col,
  input  logic [PIX_W-1:0] cfg_tmpl,
  input  logic             cfg_mask,
  input  logic             cfg_commit,
  output logic             cfg_pending,
  output logic             cfg_applied,
  output logic             configured,
  input  logic [SUM_W-1:0] threshold,
  // image stream
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic [PIX_W-1:0] pix_data,
  // match stream
  output logic             match_valid,
  output logic [SUM_W-1:0] match_sad,
  output logic [XW-1:0]    match_x,
  output logic [YW-1:0]    match_y,
  output logic             match_hit,
  // frame results
  output logic             frame_done,
  output logic [SUM_W-1:0] best_sad,
  output logic [XW-1:0]    best_x,
  output logic [YW-1:0]    best_y,
  output logic [CNT_W-1:0] hit_count,
  // resource control of a reconfigurable task construct
  input  logic             rc_req_valid,
  output logic             rc_req_ready,
  input  logic [TKW-1:0]   rc_req_task,
  output logic             rc_grant_valid,
  output logic [SLW-1:0]   rc_grant_slot,
  output logic             rc_grant_hit,
  output logic             rc_cfg_req,
  output logic [SLW-1:0]   rc_cfg_slot,
  output logic [TKW-1:0]   rc_cfg_task,
  input  logic             rc_cfg_done,
  output logic [TKW-1:0]   rc_slot_task [N_SLOTS],
  output logic             rc_slot_used [N_SLOTS]
);

  satm_top #(
    .IMG_W   (IMG_W),
    .IMG_H   (IMG_H),
    .TMPL_W  (TMPL_W),
    .TMPL_H  (TMPL_H),
    .PIX_W   (PIX_W),
    .IMG_PIPE(IMG_PIPE),
    .SYNC    (SYNC)
  ) u_satm (.*);

  rtr_task_manager #(
    .N_TASKS(N_TASKS),
    .N_SLOTS(N_SLOTS),
    .POLICY (POLICY)
  ) u_rc (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (rc_req_valid),
    .req_ready   (rc_req_ready),
    .req_task    (rc_req_task),
    .grant_valid (rc_grant_valid),
    .grant_slot  (rc_grant_slot),
    .grant_hit   (rc_grant_hit),
    .cfg_req     (rc_cfg_req),
    .cfg_slot    (rc_cfg_slot),
    .cfg_task    (rc_cfg_task),
    .cfg_done    (rc_cfg_done),
    .slot_task   (rc_slot_task),
    .slot_used   (rc_slot_used)
  );

endmodule
