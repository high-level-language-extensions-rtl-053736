// tb_satm_scan_ctrl: self-checking test of the raster bookkeeping.
// Uses 7-pixel lines, 5 lines and a 3-wide by 2-high template. Feeds a
// frame of accepted pixels with random gaps and checks in_room, then feeds
// results with random gaps and checks win_valid, win_x, win_y and last for
// every one against a raster model. Repeats for a second frame after start
// to check that start clears both counters.
module tb_satm_scan_ctrl;
  localparam int W = 7, H = 5, TW = 3, TH = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, in_acc = 1'b0, res_valid = 1'b0;
  logic       in_room;
  logic [2:0] win_x, win_y;
  logic       win_valid, last;
  int checks = 0, failures = 0;
  int n_valid = 0, n_last = 0;

  satm_scan_ctrl #(.IMG_W(W), .IMG_H(H), .TMPL_W(TW), .TMPL_H(TH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // input side
      for (int n = 0; n < W * H; ) begin
        chk(int'(in_room), 1, "in_room during frame");
        in_acc = ($urandom_range(0, 2) != 0);
        @(negedge clk);
        if (in_acc) n++;
        in_acc = 1'b0;
      end
      chk(int'(in_room), 0, "in_room after frame");
      // result side
      for (int n = 0; n < W * H; ) begin
        res_valid = ($urandom_range(0, 2) != 0);
        #1;
        if (res_valid) begin
          int x, y;
          logic v;
          x = n % W;
          y = n / W;
          v = (x >= TW - 1) && (y >= TH - 1);
          chk(int'(win_valid), int'(v), "win_valid");
          chk(int'(last), int'(n == W * H - 1), "last");
          if (v) begin
            chk(int'(win_x), x - TW + 1, "win_x");
            chk(int'(win_y), y - TH + 1, "win_y");
            n_valid++;
          end
          if (last) n_last++;
          n++;
        end else begin
          chk(int'(win_valid), 0, "win_valid without result");
          chk(int'(last), 0, "last without result");
        end
        @(negedge clk);
        res_valid = 1'b0;
      end
    end
    chk(n_valid, 2 * (W - TW + 1) * (H - TH + 1), "valid windows");
    chk(n_last, 2, "frame ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
