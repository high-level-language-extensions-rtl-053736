// tb_rtr_system: end-to-end test of the SA-TM core and the resource
// control beside it, at reduced sizes (16x12 image, 4-wide by 3-high template;
// 4 tasks sharing 2 slots).
//
// The test plays the host. It raises host_go before any template is set
// (the core must not start), writes a template and mask and commits them,
// then runs 3 frame(s) of random images into which the template has been
// planted at a random place. Every valid window's SAD on the match stream
// is compared with a SAD computed here from the same image and template,
// as are the hit flags (SAD below threshold), the hit count, the minimum
// SAD and its position. During the first frame a new template is written
// and committed: the commit must wait until the frame is done and apply to
// the next frame. Frames are fed with and without gaps in the pixel stream,
// pixels are offered before the core is ready (back-pressure), and the host
// takes its time to acknowledge the end of a frame. On a gap-free frame the
// clocks from first pixel to frame_done must be IMG_W*IMG_H - 1 + IMG_PIPE + 2.
// Each of these events is counted and must occur at least once.
module tb_rtr_system;
  localparam int IW = 16, IH = 12, TW = 4, TH = 3, PIPE = 1, PIX_W = 8;
  localparam int SUM_W = PIX_W + $clog2(TW * TH);
  localparam int XW = (IW > 1) ? $clog2(IW) : 1, YW = (IH > 1) ? $clog2(IH) : 1;
  localparam int RW = (TH > 1) ? $clog2(TH) : 1, CW = (TW > 1) ? $clog2(TW) : 1;
  localparam int CNT_W = $clog2(IW * IH + 1);
  localparam int NFR = 3;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             host_go = 1'b0, host_ack = 1'b0, host_done, busy;
  logic             cfg_we = 1'b0, cfg_mask = 1'b0, cfg_commit = 1'b0;
  logic [RW-1:0]    cfg_row = '0;
  logic [CW-1:0]    cfg_col = '0;
  logic [PIX_W-1:0] cfg_tmpl = '0;
  logic             cfg_pending, cfg_applied, configured;
  logic [SUM_W-1:0] threshold = '0;
  logic             pix_valid = 1'b0, pix_ready;
  logic [PIX_W-1:0] pix_data = '0;
  logic             match_valid, match_hit, frame_done;
  logic [SUM_W-1:0] match_sad, best_sad;
  logic [XW-1:0]    match_x, best_x;
  logic [YW-1:0]    match_y, best_y;
  logic [CNT_W-1:0] hit_count;

  // ------------------------------------------- resource control signals
  localparam int NT = 4, NS = 2;
  localparam int TKW = (NT > 1) ? $clog2(NT) : 1, SLW = (NS > 1) ? $clog2(NS) : 1;
  logic           rc_req_valid = 1'b0, rc_req_ready, rc_grant_valid, rc_grant_hit;
  logic [TKW-1:0] rc_req_task = '0;
  logic           rc_cfg_req, rc_cfg_done = 1'b0;
  logic [SLW-1:0] rc_grant_slot, rc_cfg_slot;
  logic [TKW-1:0] rc_cfg_task;
  logic [TKW-1:0] rc_slot_task [NS];
  logic           rc_slot_used [NS];
  int n_rc_hit = 0, n_rc_miss = 0, n_rc_evict = 0;
  bit rc_finished = 1'b0;

  // Task references in the pattern of two tasks used in turn (task 0 is
  // the construct's default task), then random ones. A FIFO model of the
  // residency table predicts hit or miss and the slot; the test answers
  // each reconfiguration request after a few clocks.
  initial begin : rc_driver
    int tsk [NS], ptr, slot, t, nref;
    bit used [NS], hit, free_found;
    for (int s = 0; s < NS; s++) begin tsk[s] = 0; used[s] = (s == 0); end
    ptr = 0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    nref = 0;
    while (nref < 200) begin
      t = (nref < 20) ? nref % 2 : $urandom_range(0, NT - 1);
      hit = 0; slot = -1; free_found = 0;
      for (int s = 0; s < NS; s++) if (used[s] && tsk[s] == t && !hit) begin hit = 1; slot = s; end
      if (!hit) begin
        for (int s = 0; s < NS; s++) if (!used[s] && !free_found) begin free_found = 1; slot = s; end
        if (!free_found) begin slot = ptr; ptr = (ptr + 1) % NS; n_rc_evict++; end
        tsk[slot] = t; used[slot] = 1;
      end
      rc_req_valid = 1'b1; rc_req_task = TKW'(t);
      @(negedge clk);
      rc_req_valid = 1'b0;
      if (hit) begin
        n_rc_hit++;
        chk(int'(rc_grant_valid && rc_grant_hit && !rc_cfg_req), 1, "resource control hit");
        chk(int'(rc_grant_slot), slot, "resource control hit slot");
      end else begin
        n_rc_miss++;
        chk(int'(rc_cfg_req), 1, "resource control reconfiguration request");
        chk(int'(rc_cfg_slot), slot, "resource control slot to load");
        chk(int'(rc_cfg_task), t, "resource control task to load");
        if (rc_cfg_req) begin
          repeat ($urandom_range(1, 6)) @(negedge clk);
          rc_cfg_done = 1'b1;
          @(negedge clk);
          rc_cfg_done = 1'b0;
          chk(int'(rc_grant_valid && !rc_grant_hit), 1, "resource control grant after load");
          chk(int'(rc_grant_slot), slot, "resource control loaded slot");
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      nref++;
    end
    rc_finished = 1'b1;
  end

  rtr_system #(.IMG_W(IW), .IMG_H(IH), .TMPL_W(TW), .TMPL_H(TH), .IMG_PIPE(PIPE), .N_TASKS(NT), .N_SLOTS(NS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  logic [PIX_W-1:0] img  [IH][IW];
  logic [PIX_W-1:0] tset [2][TH][TW];     // two template sets
  logic             mset [2][TH][TW];
  int               cur_set;              // set the running frame uses
  int               exp_sad [IH-TH+1][IW-TW+1];
  int               exp_hits, exp_best, exp_bx, exp_by;
  int               win_idx;              // next expected window, raster order

  task automatic make_set(input int s);
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++) begin
        tset[s][i][j] = PIX_W'($urandom);
        mset[s][i][j] = ($urandom_range(0, 4) != 0);
      end
    mset[s][0][0] = 1'b1;
  endtask

  task automatic make_frame(input int s, input int thr);
    int py, px, d, sum;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) img[y][x] = PIX_W'($urandom);
    py = $urandom_range(0, IH - TH);
    px = $urandom_range(0, IW - TW);
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++)
        if (mset[s][i][j]) img[py + i][px + j] = tset[s][i][j];
    exp_hits = 0; exp_best = 1 << 30; exp_bx = 0; exp_by = 0;
    for (int y = 0; y <= IH - TH; y++)
      for (int x = 0; x <= IW - TW; x++) begin
        sum = 0;
        for (int i = 0; i < TH; i++)
          for (int j = 0; j < TW; j++)
            if (mset[s][i][j]) begin
              d = int'(img[y + i][x + j]) - int'(tset[s][i][j]);
              sum += (d < 0) ? -d : d;
            end
        exp_sad[y][x] = sum;
        if (sum < thr) exp_hits++;
        if (sum < exp_best) begin exp_best = sum; exp_bx = x; exp_by = y; end
      end
    win_idx = 0;
  endtask

  // -------------------------------------------------------------- counters
  int n_blocked = 0, n_deferred = 0, n_applied = 0, n_stall = 0, n_backpressure = 0;
  int n_hits = 0, n_misses = 0, n_wait_ack = 0, n_frames = 0, n_timed = 0;

  always @(negedge clk) if (rst_n) begin
    if (host_go && !configured && !busy) n_blocked++;
    if (cfg_pending && busy) n_deferred++;
    if (cfg_applied) n_applied++;
    if (busy && pix_ready && !pix_valid) n_stall++;
    if (pix_valid && !pix_ready) n_backpressure++;
    if (host_done && !host_ack) n_wait_ack++;
  end

  // Parameters must never change while a frame runs.
  always @(negedge clk) if (rst_n && busy && cfg_applied) begin
    failures++;
    $display("template changed during a frame");
  end

  // --------------------------------------------------------- match monitor
  always @(negedge clk) if (rst_n && match_valid) begin
    int ex, ey;
    ex = win_idx % (IW - TW + 1);
    ey = win_idx / (IW - TW + 1);
    checks++;
    if (win_idx >= (IW - TW + 1) * (IH - TH + 1) || int'(match_x) != ex || int'(match_y) != ey
        || int'(match_sad) != exp_sad[ey][ex] || match_hit != (exp_sad[ey][ex] < int'(threshold))) begin
      failures++;
      if (failures < 10)
        $display("window %0d: got (%0d,%0d) sad %0d hit %0b, exp (%0d,%0d) sad %0d",
                 win_idx, match_x, match_y, match_sad, match_hit, ex, ey, exp_sad[ey][ex]);
    end
    if (match_hit) n_hits++; else n_misses++;
    win_idx++;
  end

  // ------------------------------------------------------------ host tasks
  task automatic load_set(input int s, input bit do_commit);
    for (int i = 0; i < TH; i++)
      for (int j = 0; j < TW; j++) begin
        cfg_we = 1'b1; cfg_row = RW'(i); cfg_col = CW'(j);
        cfg_tmpl = tset[s][i][j]; cfg_mask = mset[s][i][j];
        cfg_commit = do_commit && (i == TH - 1) && (j == TW - 1);
        @(negedge clk);
      end
    cfg_we = 1'b0; cfg_commit = 1'b0;
  endtask

  longint t_first, t_last, t_done;

  // Feeds one frame; gap_pct is the chance of an idle clock.
  task automatic feed(input int gap_pct);
    int idx = 0;
    t_first = -1;
    while (idx < IW * IH) begin
      pix_valid = ($urandom_range(0, 99) >= gap_pct);
      pix_data  = img[idx / IW][idx % IW];
      #1;
      if (pix_valid && pix_ready) begin
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
        idx++;
      end
      @(negedge clk);
    end
    pix_valid = 1'b0;
  endtask

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_frame(input int gap_pct, input int thr, input bit reconf_mid,
                           input bit timed);
    threshold = SUM_W'(thr);
    make_frame(cur_set, thr);
    // offer the first pixel before the start: back-pressure
    pix_valid = 1'b1;
    pix_data  = img[0][0];
    host_go   = 1'b1;
    @(negedge clk);
    host_go = 1'b0;
    fork
      feed(gap_pct);
      if (reconf_mid) begin
        repeat (IW) @(negedge clk);
        make_set(1 - cur_set);
        load_set(1 - cur_set, 1'b1);
      end
    join
    while (!frame_done) @(negedge clk);
    t_done = cyc;
    #1;  // let the match monitor take the last window of this clock
    n_frames++;
    chk(win_idx, (IW - TW + 1) * (IH - TH + 1), "windows in frame");
    chk(int'(best_sad), exp_best, "best_sad");
    chk(int'(best_x), exp_bx, "best_x");
    chk(int'(best_y), exp_by, "best_y");
    chk(int'(hit_count), exp_hits, "hit_count");
    if (timed) begin
      chk(int'(t_last - t_first), IW * IH - 1, "clocks to take a frame");
      chk(int'(t_done - t_last), PIPE + 2, "last pixel to frame_done");
      n_timed++;
    end
    // slow host
    repeat (3) @(negedge clk);
    chk(int'(host_done), 1, "host_done held");
    host_ack = 1'b1;
    @(negedge clk);
    host_ack = 1'b0;
    if (reconf_mid) cur_set = 1 - cur_set;
  endtask

  initial begin
    int masked;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // go before configuration: must not start
    host_go = 1'b1;
    repeat (5) @(negedge clk);
    host_go = 1'b0;
    chk(int'(busy), 0, "started unconfigured");
    cur_set = 0;
    make_set(0);
    load_set(0, 1'b1);
    @(negedge clk);
    chk(int'(configured), 1, "configured");
    for (int f = 0; f < NFR; f++) begin
      masked = 0;
      for (int i = 0; i < TH; i++)
        for (int j = 0; j < TW; j++) masked += int'(mset[cur_set][i][j]);
      run_frame((f % 2 == 0) ? 20 : 0, (f == 0) ? 1 : masked * 60, f == 0, f % 2 == 1 || NFR == 1);
    end
    chk(int'(n_blocked > 0), 1, "start blocked before configuration");
    chk(int'(n_applied >= 2), 1, "reconfigurations");
    chk(int'(n_deferred > 0), 1, "commit deferred during a frame");
    chk(int'(n_stall > 0), 1, "gaps in the pixel stream");
    chk(int'(n_backpressure > 0), 1, "back-pressure");
    chk(int'(n_hits > 0), 1, "threshold hits");
    chk(int'(n_misses > 0), 1, "threshold misses");
    chk(int'(n_wait_ack > 0), 1, "host slow to acknowledge");
    chk(int'(n_timed > 0), 1, "timed frame");
    wait (rc_finished);
    chk(int'(n_rc_hit > 0), 1, "task already on hardware");
    chk(int'(n_rc_miss > 0), 1, "task loaded by reconfiguration");
    chk(int'(n_rc_evict > 0), 1, "resident task displaced");
    $display("resource control: hits=%0d loads=%0d displaced=%0d", n_rc_hit, n_rc_miss, n_rc_evict);

    $display("events: blocked=%0d applied=%0d deferred=%0d stall=%0d backpressure=%0d hits=%0d misses=%0d wait_ack=%0d frames=%0d",
             n_blocked, n_applied, n_deferred, n_stall, n_backpressure, n_hits, n_misses,
             n_wait_ack, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
