// satm_match_detect: post-processing of the SAD results of one frame.
//
// A position is a possible match when its SAD is the minimum of the frame
// or when it is below a threshold. For every valid window this block
// registers the result onto an output stream with a hit flag
// (sad < threshold), counts the hits, and keeps the smallest SAD seen and
// the window position where it first occurred. When the last result of the
// frame has been taken it pulses frame_done; best_sad, best_x, best_y and
// hit_count are then final and stay until the next frame_start.
//
// Interface: frame_start clears the frame state; in_valid/in_sad/in_x/in_y
// is one valid window; in_last marks the frame's final result (it may
// coincide with in_valid). Timing: the output stream and frame_done lag
// the input by one clock. Ties keep the earliest position in raster order;
// "below" is strict. These choices, and doing the post-processing in
// hardware rather than in the host program, are this design's own.
module satm_match_detect #(
  parameter int unsigned SUM_W = 16,
  parameter int unsigned XW    = 7,
  parameter int unsigned YW    = 7,
  parameter int unsigned CNT_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic [SUM_W-1:0] threshold,
  input  logic             in_valid,
  input  logic [SUM_W-1:0] in_sad,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  input  logic             in_last,
  output logic             m_valid,
  output logic [SUM_W-1:0] m_sad,
  output logic [XW-1:0]    m_x,
  output logic [YW-1:0]    m_y,
  output logic             m_hit,
  output logic [SUM_W-1:0] best_sad,
  output logic [XW-1:0]    best_x,
  output logic [YW-1:0]    best_y,
  output logic [CNT_W-1:0] hit_count,
  output logic             frame_done
);

  logic found;
  logic hit;

  assign hit = in_sad < threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid    <= 1'b0;
      m_sad      <= '0;
      m_x        <= '0;
      m_y        <= '0;
      m_hit      <= 1'b0;
      best_sad   <= '1;
      best_x     <= '0;
      best_y     <= '0;
      hit_count  <= '0;
      found      <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      m_valid    <= in_valid;
      frame_done <= in_last && !frame_start;
      if (in_valid) begin
        m_sad <= in_sad;
        m_x   <= in_x;
        m_y   <= in_y;
        m_hit <= hit;
      end
      if (frame_start) begin
        best_sad  <= '1;
        best_x    <= '0;
        best_y    <= '0;
        hit_count <= '0;
        found     <= 1'b0;
      end else if (in_valid) begin
        if (!found || in_sad < best_sad) begin
          best_sad <= in_sad;
          best_x   <= in_x;
          best_y   <= in_y;
        end
        found <= 1'b1;
        if (hit) hit_count <= hit_count + 1'b1;
      end
    end
  end

endmodule
