// tb_satm_array: self-checking test of the SA-TM processing-element grid.
//
// Three grids receive the same random pixel stream, with random gaps:
//   u_def  default sizes (100-pixel lines, 12x12 template), one image
//          pipeline stage (the pipelined variant);
//   u_sm   9-pixel lines, 4-wide by 3-high template, no image pipeline
//          (the plain broadcast variant);
//   u_p2   as u_sm with two image pipeline stages.
// For every result whose window lies fully inside the stream's raster
// (column >= TMPL_W-1, line >= TMPL_H-1) the masked SAD is recomputed
// here from the stream history and compared. The latency from a pixel's
// in_valid to its result's out_valid must be IMG_PIPE + 1 clocks.
module tb_satm_array;
  localparam int PIX_W = 8;
  localparam int SUM_W = 16;
  localparam int NPIX  = 14000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid;
  logic [PIX_W-1:0] in_pix;

  logic [PIX_W-1:0] tm [12][12];   // master template
  logic             mk [12][12];   // master mask

  logic [PIX_W-1:0] tmpl_d [12][12];
  logic             mask_d [12][12];
  logic [PIX_W-1:0] tmpl_s [3][4];
  logic             mask_s [3][4];

  logic             ov_d, ov_s, ov_p;
  logic [SUM_W-1:0] sad_d;
  logic [11:0]      sad_s, sad_p;      // 8 + clog2(4*3) = 12 bits
  int checks = 0, failures = 0;

  satm_array u_def (.clk, .rst_n, .in_valid, .in_pix, .tmpl(tmpl_d), .mask(mask_d),
                    .out_valid(ov_d), .out_sad(sad_d));

  satm_array #(.IMG_W(9), .TMPL_W(4), .TMPL_H(3), .IMG_PIPE(0)) u_sm (
    .clk, .rst_n, .in_valid, .in_pix, .tmpl(tmpl_s), .mask(mask_s),
    .out_valid(ov_s), .out_sad(sad_s));
  satm_array #(.IMG_W(9), .TMPL_W(4), .TMPL_H(3), .IMG_PIPE(2)) u_p2 (
    .clk, .rst_n, .in_valid, .in_pix, .tmpl(tmpl_s), .mask(mask_s),
    .out_valid(ov_p), .out_sad(sad_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PIX_W-1:0] hist [NPIX];
  int               t_in [NPIX];
  int               n_in = 0;
  int               k_out [3] = '{0, 0, 0};
  int               n_win [3] = '{0, 0, 0};

  function automatic int ref_sad(int w, int tw, int th, int k);
    int s = 0, d;
    for (int i = 0; i < th; i++)
      for (int j = 0; j < tw; j++) begin
        d = int'(hist[k - (th - 1 - i) * w - (tw - 1 - j)]) - int'(tm[i][j]);
        if (d < 0) d = -d;
        if (mk[i][j]) s += d;
      end
    return s;
  endfunction

  task automatic check_out(int id, int w, int tw, int th, int pipe, int t, int got);
    int k = k_out[id];
    checks++;
    if (t - t_in[k] != pipe + 1) begin
      failures++;
      if (failures < 10) $display("grid %0d: latency %0d for pixel %0d", id, t - t_in[k], k);
    end
    if ((k % w) >= tw - 1 && (k / w) >= th - 1) begin
      int e = ref_sad(w, tw, th, k);
      n_win[id]++;
      checks++;
      if (got != e) begin
        failures++;
        if (failures < 10) $display("grid %0d: pixel %0d sad %0d exp %0d", id, k, got, e);
      end
    end
    k_out[id]++;
  endtask

  initial begin
    int t = 0;
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 12; j++) begin
        tm[i][j] = PIX_W'($urandom);
        mk[i][j] = ($urandom_range(0, 3) != 0);
      end
    mk[0][0] = 1'b1;
    mk[2][3] = 1'b1;
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 12; j++) begin
        tmpl_d[i][j] = tm[i][j];
        mask_d[i][j] = mk[i][j];
      end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 4; j++) begin
        tmpl_s[i][j] = tm[i][j];
        mask_s[i][j] = mk[i][j];
      end
    in_valid = 1'b0; in_pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_in < NPIX || k_out[0] < NPIX || k_out[1] < NPIX || k_out[2] < NPIX) begin
      @(negedge clk);
      t++;
      if (ov_d) check_out(0, 100, 12, 12, 1, t, int'(sad_d));
      if (ov_s) check_out(1, 9, 4, 3, 0, t, int'(sad_s));
      if (ov_p) check_out(2, 9, 4, 3, 2, t, int'(sad_p));
      in_valid = (n_in < NPIX) && ($urandom_range(0, 9) != 0);
      in_pix   = PIX_W'($urandom);
      if (in_valid) begin
        hist[n_in] = in_pix;
        t_in[n_in] = t;
        n_in++;
      end
    end
    for (int id = 0; id < 3; id++) begin
      checks++;
      if (n_win[id] == 0) begin
        failures++;
        $display("grid %0d produced no valid window", id);
      end
    end
    $display("windows checked: %0d %0d %0d", n_win[0], n_win[1], n_win[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
