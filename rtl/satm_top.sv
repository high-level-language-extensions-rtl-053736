// satm_top: run-time parametrisable shape-adaptive template matching core.
//
// The core searches every frame of a video stream for an arbitrarily
// shaped object. The object is given as a rectangular template and a mask
// that selects the template pixels belonging to it; for each position of
// the template over the image the core computes the sum of absolute
// differences (SAD) over the masked pixels, and reports positions whose
// SAD is below a threshold as well as the position of the minimum SAD.
//
// Parts:
//   satm_rtp_params   template and mask, written by the host and applied
//                     together on commit (the run-time reconfiguration);
//   task_sync         blocking start/finish handshake with the host;
//   satm_array        TMPL_H x TMPL_W elements with scan-line shift
//                     registers, one SAD per input pixel;
//   satm_scan_ctrl    raster counters, window validity, end of frame;
//   satm_match_detect threshold hits, minimum SAD and its position.
//
// Operation: write the template and mask (cfg_we), commit (cfg_commit),
// raise host_go. One frame of IMG_W x IMG_H pixels is then taken in raster
// order through pix_valid/pix_ready. The SAD of every valid window comes
// out on the match_* stream; after the last one frame_done pulses with the
// frame results, host_done rises and waits for host_ack. A commit while a
// frame is running is held until the frame has finished.
//
// Timing: one pixel per clock at full rate; a window's result appears
// IMG_PIPE + 2 clocks after the pixel that completes it. A frame takes
// IMG_W*IMG_H input clocks plus this latency and the handshake.
//
// The array structure, the template/mask run-time parameters, the commit
// semantics of a parameter block and the sync handshake follow the
// design being documented; the stream handshakes, the post-processing in
// hardware and all widths are this design's own choices.
module satm_top #(
  parameter int unsigned IMG_W    = satm_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H    = satm_pkg::DEF_IMG_H,
  parameter int unsigned TMPL_W   = satm_pkg::DEF_TMPL_W,
  parameter int unsigned TMPL_H   = satm_pkg::DEF_TMPL_H,
  parameter int unsigned PIX_W    = satm_pkg::DEF_PIX_W,
  parameter int unsigned IMG_PIPE = 1,
  parameter bit          SYNC     = 1'b1,
  localparam int unsigned SUM_W   = PIX_W + $clog2(TMPL_W * TMPL_H),
  localparam int unsigned XW      = satm_pkg::idx_w(IMG_W),
  localparam int unsigned YW      = satm_pkg::idx_w(IMG_H),
  localparam int unsigned RW      = satm_pkg::idx_w(TMPL_H),
  localparam int unsigned CW      = satm_pkg::idx_w(TMPL_W),
  localparam int unsigned CNT_W   = $clog2(IMG_W * IMG_H + 1)
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
  output logic [CNT_W-1:0] hit_count
);

  logic [PIX_W-1:0] tmpl [TMPL_H][TMPL_W];
  logic             mask [TMPL_H][TMPL_W];
  logic             task_start;
  logic             in_room;
  logic             pix_acc;
  logic             arr_valid;
  logic [SUM_W-1:0] arr_sad;
  logic [XW-1:0]    wx;
  logic [YW-1:0]    wy;
  logic             win_valid;
  logic             res_last;

  satm_rtp_params #(.TMPL_W(TMPL_W), .TMPL_H(TMPL_H), .PIX_W(PIX_W)) u_params (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (cfg_we),
    .wr_row     (cfg_row),
    .wr_col     (cfg_col),
    .wr_tmpl    (cfg_tmpl),
    .wr_mask    (cfg_mask),
    .commit     (cfg_commit),
    .apply_ok   (!busy),
    .tmpl       (tmpl),
    .mask       (mask),
    .pending    (cfg_pending),
    .applied    (cfg_applied),
    .configured (configured)
  );

  task_sync #(.SYNC(SYNC)) u_sync (
    .clk        (clk),
    .rst_n      (rst_n),
    .host_go    (host_go),
    .ready      (configured && !cfg_pending),
    .task_start (task_start),
    .task_done  (frame_done),
    .busy       (busy),
    .host_done  (host_done),
    .host_ack   (host_ack)
  );

  // Pixels are taken only while the task runs, after its start clock, and
  // until the frame is complete.
  assign pix_ready = busy && !task_start && in_room;
  assign pix_acc   = pix_valid && pix_ready;

  satm_array #(
    .IMG_W   (IMG_W),
    .TMPL_W  (TMPL_W),
    .TMPL_H  (TMPL_H),
    .PIX_W   (PIX_W),
    .SUM_W   (SUM_W),
    .IMG_PIPE(IMG_PIPE)
  ) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pix_acc),
    .in_pix    (pix_data),
    .tmpl      (tmpl),
    .mask      (mask),
    .out_valid (arr_valid),
    .out_sad   (arr_sad)
  );

  satm_scan_ctrl #(
    .IMG_W (IMG_W),
    .IMG_H (IMG_H),
    .TMPL_W(TMPL_W),
    .TMPL_H(TMPL_H)
  ) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (task_start),
    .in_acc    (pix_acc),
    .in_room   (in_room),
    .res_valid (arr_valid),
    .win_x     (wx),
    .win_y     (wy),
    .win_valid (win_valid),
    .last      (res_last)
  );

  satm_match_detect #(.SUM_W(SUM_W), .XW(XW), .YW(YW), .CNT_W(CNT_W)) u_detect (
    .clk         (clk),
    .rst_n       (rst_n),
    .frame_start (task_start),
    .threshold   (threshold),
    .in_valid    (win_valid),
    .in_sad      (arr_sad),
    .in_x        (wx),
    .in_y        (wy),
    .in_last     (res_last),
    .m_valid     (match_valid),
    .m_sad       (match_sad),
    .m_x         (match_x),
    .m_y         (match_y),
    .m_hit       (match_hit),
    .best_sad    (best_sad),
    .best_x      (best_x),
    .best_y      (best_y),
    .hit_count   (hit_count),
    .frame_done  (frame_done)
  );

endmodule
