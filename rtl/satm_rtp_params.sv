// satm_rtp_params: run-time parameter store for the SA-TM core.
//
// The template and mask are the core's run-time parameters: the array is
// specialised for one template and one mask at a time. The host writes
// individual template pixels and mask bits into a shadow copy; none of
// them reaches the array until the host commits, which marks the end of an
// RTPCONF block. A commit copies the whole shadow set into the active set
// in one clock, so several parameters change together with a single
// reconfiguration. A commit that arrives while the core is processing a
// frame (apply_ok low) is held pending and applied as soon as the core is
// idle, so a frame is never matched against a mix of old and new values.
// Until the first commit the core is not configured and must not start:
// a task with run-time parameters is only instantiated once they are set.
//
// Interface: wr_en writes wr_tmpl/wr_mask at (wr_row, wr_col) of the shadow
// set; commit requests a reconfiguration; applied pulses on the clock edge
// after the active set changed; pending is high while a commit waits.
// A write in the same clock as a commit is included in that commit.
// Timing: active values change on the clock edge where commit (or a
// pending commit) meets apply_ok. Reset clears both sets (mask all zero).
//
// Shadow-then-commit follows the RTPCONF semantics; the register-file form
// stands in for the bitstream specialisation of look-up tables, and the
// deferral while busy is this design's choice.
module satm_rtp_params #(
  parameter int unsigned TMPL_W = 12,
  parameter int unsigned TMPL_H = 12,
  parameter int unsigned PIX_W  = 8,
  localparam int unsigned RW    = satm_pkg::idx_w(TMPL_H),
  localparam int unsigned CW    = satm_pkg::idx_w(TMPL_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [RW-1:0]    wr_row,
  input  logic [CW-1:0]    wr_col,
  input  logic [PIX_W-1:0] wr_tmpl,
  input  logic             wr_mask,
  input  logic             commit,
  input  logic             apply_ok,
  output logic [PIX_W-1:0] tmpl [TMPL_H][TMPL_W],
  output logic             mask [TMPL_H][TMPL_W],
  output logic             pending,
  output logic             applied,
  output logic             configured
);

  logic [PIX_W-1:0] sh_tmpl   [TMPL_H][TMPL_W];
  logic             sh_mask   [TMPL_H][TMPL_W];
  logic [PIX_W-1:0] sh_tmpl_d [TMPL_H][TMPL_W];
  logic             sh_mask_d [TMPL_H][TMPL_W];
  logic             do_apply;

  always_comb begin
    sh_tmpl_d = sh_tmpl;
    sh_mask_d = sh_mask;
    if (wr_en && (32'(wr_row) < TMPL_H) && (32'(wr_col) < TMPL_W)) begin
      sh_tmpl_d[wr_row][wr_col] = wr_tmpl;
      sh_mask_d[wr_row][wr_col] = wr_mask;
    end
  end

  assign do_apply = (commit || pending) && apply_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < TMPL_H; i++)
        for (int unsigned j = 0; j < TMPL_W; j++) begin
          sh_tmpl[i][j] <= '0;
          sh_mask[i][j] <= 1'b0;
          tmpl[i][j]    <= '0;
          mask[i][j]    <= 1'b0;
        end
      pending    <= 1'b0;
      applied    <= 1'b0;
      configured <= 1'b0;
    end else begin
      sh_tmpl <= sh_tmpl_d;
      sh_mask <= sh_mask_d;
      applied <= do_apply;
      if (do_apply) begin
        tmpl       <= sh_tmpl_d;
        mask       <= sh_mask_d;
        pending    <= 1'b0;
        configured <= 1'b1;
      end else if (commit) begin
        pending <= 1'b1;
      end
    end
  end

endmodule
