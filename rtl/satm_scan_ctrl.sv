// satm_scan_ctrl: raster bookkeeping for one frame of the SA-TM core.
//
// The array produces one SAD per input pixel, for the window whose
// bottom-right corner is that pixel. This block keeps two raster counters.
// The input counter counts pixels accepted into the array and says when
// the frame has been fully delivered (in_room low). The output counter
// follows the array's results: for each out_valid it tracks the pixel
// position (x, y) and gives the top-left corner of the window (win_x, win_y), and
// win_valid when the window lies wholly inside the image, that is when
// x >= TMPL_W-1 and y >= TMPL_H-1. These are the (IMG_H-TMPL_H+1) x
// (IMG_W-TMPL_W+1) positions of the matching loop. last marks the result of
// the final pixel of the frame, which is always a valid window.
//
// Interface: start clears both counters at the beginning of a frame;
// in_acc counts an accepted pixel; res_valid counts an array result. All
// outputs are decoded combinationally from the counters, so they belong to
// the result presented in the same clock as res_valid.
// The counting scheme is this design's own; the window bounds follow the
// matching loop.
module satm_scan_ctrl #(
  parameter int unsigned IMG_W  = 100,
  parameter int unsigned IMG_H  = 100,
  parameter int unsigned TMPL_W = 12,
  parameter int unsigned TMPL_H = 12,
  localparam int unsigned XW    = satm_pkg::idx_w(IMG_W),
  localparam int unsigned YW    = satm_pkg::idx_w(IMG_H),
  localparam int unsigned NW    = $clog2(IMG_W * IMG_H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_acc,
  output logic          in_room,
  input  logic          res_valid,
  output logic [XW-1:0] win_x,
  output logic [YW-1:0] win_y,
  output logic          win_valid,
  output logic          last
);

  logic [NW-1:0] in_cnt;
  logic [XW-1:0] x;       // position of the next array result
  logic [YW-1:0] y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      in_cnt <= '0;
    else if (start)  in_cnt <= '0;
    else if (in_acc) in_cnt <= in_cnt + 1'b1;
  end

  assign in_room = (32'(in_cnt) < IMG_W * IMG_H);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (start) begin
      x <= '0;
      y <= '0;
    end else if (res_valid) begin
      if (32'(x) == IMG_W - 1) begin
        x <= '0;
        y <= (32'(y) == IMG_H - 1) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  assign win_valid = res_valid && (32'(x) >= TMPL_W - 1) && (32'(y) >= TMPL_H - 1);
  assign win_x     = x - XW'(TMPL_W - 1);
  assign win_y     = y - YW'(TMPL_H - 1);
  assign last      = res_valid && (32'(x) == IMG_W - 1) && (32'(y) == IMG_H - 1);

endmodule
