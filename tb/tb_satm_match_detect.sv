// tb_satm_match_detect: self-checking test of the SAD post-processing.
// Sends three frames of random window results (with planted equal minima
// to check that the first one wins, and values at the threshold to check
// that "below" is strict) and compares the output stream, its hit flags,
// the hit count, the minimum and its position against a model, and that
// frame_done comes exactly one clock after the last result.
module tb_satm_match_detect;
  localparam int SUM_W = 16, XW = 7, YW = 7, CNT_W = 14;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             frame_start = 1'b0;
  logic [SUM_W-1:0] threshold;
  logic             in_valid = 1'b0, in_last = 1'b0;
  logic [SUM_W-1:0] in_sad = '0;
  logic [XW-1:0]    in_x = '0;
  logic [YW-1:0]    in_y = '0;
  logic             m_valid, m_hit, frame_done;
  logic [SUM_W-1:0] m_sad, best_sad;
  logic [XW-1:0]    m_x, best_x;
  logic [YW-1:0]    m_y, best_y;
  logic [CNT_W-1:0] hit_count;
  int checks = 0, failures = 0;

  satm_match_detect #(.SUM_W(SUM_W), .XW(XW), .YW(YW), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    threshold = 16'd1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      int bs, bx, by, hits, n, total;
      bs = 65536; bx = 0; by = 0; hits = 0; n = 0;
      total = 40 + 20 * f;
      threshold = 16'(600 + 300 * f);
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      while (n < total) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_last  = in_valid && (n == total - 1);
        in_sad   = 16'($urandom_range(200, 5000));
        if (n == 10 || n == 25) in_sad = 16'(150 - f);   // equal minima
        if (n == 5) in_sad = threshold;                    // not below
        in_x = 7'($urandom_range(0, 88));
        in_y = 7'($urandom_range(0, 88));
        @(negedge clk);
        chk(int'(frame_done), int'(in_last), "frame_done one clock after last");
        chk(int'(m_valid), int'(in_valid), "m_valid");
        if (in_valid) begin
          chk(int'(m_sad), int'(in_sad), "m_sad");
          chk(int'(m_x), int'(in_x), "m_x");
          chk(int'(m_y), int'(in_y), "m_y");
          chk(int'(m_hit), int'(in_sad < threshold), "m_hit");
          if (in_sad < threshold) hits++;
          if (int'(in_sad) < bs) begin bs = in_sad; bx = in_x; by = in_y; end
          n++;
        end
        in_valid = 1'b0; in_last = 1'b0;
      end
      // frame_done was registered on the edge that took the last result
      @(negedge clk);
      chk(int'(frame_done), 0, "frame_done is one clock");
      chk(int'(best_sad), bs, "best_sad");
      chk(int'(best_x), bx, "best_x");
      chk(int'(best_y), by, "best_y");
      chk(int'(hit_count), hits, "hit_count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame_done must follow each in_last by exactly one clock
  int last_seen = 0, done_seen = 0;
  always @(posedge clk) begin
    if (rst_n && frame_done) begin
      done_seen++;
      checks++;
      if (done_seen != last_seen) begin
        failures++;
        $display("frame_done without preceding last");
      end
    end
    if (rst_n && in_last) last_seen++;
  end
endmodule
