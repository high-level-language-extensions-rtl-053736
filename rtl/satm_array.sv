// satm_array: the processing-element grid of the run-time parametrisable
// SA-TM core.
//
// Image pixels arrive one per enabled clock in raster order and are
// broadcast to all TMPL_H x TMPL_W elements. Element (i,j) holds template
// pixel tmpl[i][j] and mask bit mask[i][j]. Partial sums enter row 0 as
// zero at element 0, move right through the row, then through a scan-line
// shift register of IMG_W - TMPL_W stages into element 0 of row i+1. The
// sum leaving the last element of the last row is therefore
//
//   sad(n) = sum_{i,j} mask[i][j] * |p[n - (TMPL_H-1-i)*IMG_W - (TMPL_W-1-j)] - tmpl[i][j]|
//
// where p[n] is the n-th pixel of the stream: the masked SAD of the
// window whose bottom-right pixel is p[n]. Sums of windows that wrap
// around a line edge or reach into the previous frame are produced too and
// must be discarded by the caller (satm_scan_ctrl marks them).
//
// IMG_PIPE selects the two run-time parametrisable variants that were
// evaluated: 0 broadcasts the input pixel straight to every element (the
// "shift register" design), 1 or more adds register stages on the image
// signal to cut the broadcast fan-out (the "pipelined" design). The last
// stage is replicated per row so each row drives its own copy. The pipeline
// and its valid flag advance every clock; the grid and line buffers advance
// only when a pixel reaches them, so gaps in the input stream are allowed.
//
// Interface: in_valid/in_pix is the pixel stream (no back-pressure);
// out_valid/out_sad gives one SAD per input pixel. Latency IMG_PIPE + 1
// clocks from in_valid to out_valid. tmpl and mask must stay stable while
// pixels are in flight (satm_rtp_params guarantees this between frames).
//
// Follows the floorplan of the run-time parametrisable design (broadcast
// pixel, partial sums along rows, line-buffer shift registers between
// rows, zero entering the first row, match leaving the last). The raster
// orientation, reset of the valid pipeline and the per-row replication of
// the last image register are this design's choices.
module satm_array #(
  parameter int unsigned IMG_W    = 100,
  parameter int unsigned TMPL_W   = 12,
  parameter int unsigned TMPL_H   = 12,
  parameter int unsigned PIX_W    = 8,
  parameter int unsigned SUM_W    = PIX_W + $clog2(TMPL_W * TMPL_H),
  parameter int unsigned IMG_PIPE = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  input  logic [PIX_W-1:0] tmpl [TMPL_H][TMPL_W],
  input  logic             mask [TMPL_H][TMPL_W],
  output logic             out_valid,
  output logic [SUM_W-1:0] out_sad
);

  localparam int unsigned LB_DEPTH = IMG_W - TMPL_W;

  // ---------------------------------------------------------------- image
  logic             en;                  // a pixel reaches the grid
  logic [PIX_W-1:0] row_pix [TMPL_H];    // pixel seen by each row

  if (IMG_PIPE == 0) begin : g_direct
    assign en = in_valid;
    for (genvar i = 0; i < TMPL_H; i++) begin : g_row
      assign row_pix[i] = in_pix;
    end
  end else begin : g_piped
    // Shared stages 0..IMG_PIPE-2, then one register per row.
    logic [PIX_W-1:0] pix_q [IMG_PIPE];
    logic             vld_q [IMG_PIPE];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned s = 0; s < IMG_PIPE; s++) vld_q[s] <= 1'b0;
      end else begin
        vld_q[0] <= in_valid;
        for (int unsigned s = 1; s < IMG_PIPE; s++) vld_q[s] <= vld_q[s-1];
      end
    end

    always_ff @(posedge clk) begin
      pix_q[0] <= in_pix;
      for (int unsigned s = 1; s < IMG_PIPE; s++) pix_q[s] <= pix_q[s-1];
    end

    logic [PIX_W-1:0] last_in;
    if (IMG_PIPE == 1) begin : g_one
      assign last_in = in_pix;
    end else begin : g_more
      assign last_in = pix_q[IMG_PIPE-2];
    end

    for (genvar i = 0; i < TMPL_H; i++) begin : g_row
      logic [PIX_W-1:0] pix_r;
      always_ff @(posedge clk) pix_r <= last_in;
      assign row_pix[i] = pix_r;
    end

    assign en = vld_q[IMG_PIPE-1];
  end

  // ------------------------------------------------------------- PE grid
  logic [SUM_W-1:0] pe_sum  [TMPL_H][TMPL_W];  // registered output of (i,j)
  logic [SUM_W-1:0] row_in  [TMPL_H];          // sum entering element (i,0)

  assign row_in[0] = '0;

  for (genvar i = 0; i < TMPL_H; i++) begin : g_pe_row
    for (genvar j = 0; j < TMPL_W; j++) begin : g_pe
      logic [SUM_W-1:0] s_in;
      if (j == 0) begin : g_first
        assign s_in = row_in[i];
      end else begin : g_next
        assign s_in = pe_sum[i][j-1];
      end

      satm_pe #(.PIX_W(PIX_W), .SUM_W(SUM_W)) u_pe (
        .clk     (clk),
        .en      (en),
        .pix     (row_pix[i]),
        .tmpl    (tmpl[i][j]),
        .mask    (mask[i][j]),
        .sum_in  (s_in),
        .sum_out (pe_sum[i][j])
      );
    end

    if (i + 1 < TMPL_H) begin : g_lb
      satm_line_buffer #(.WIDTH(SUM_W), .DEPTH(LB_DEPTH)) u_lb (
        .clk  (clk),
        .en   (en),
        .din  (pe_sum[i][TMPL_W-1]),
        .dout (row_in[i+1])
      );
    end
  end

  // -------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= en;
  end

  assign out_sad = pe_sum[TMPL_H-1][TMPL_W-1];

endmodule
