// satm_pe: one processing element of the SA-TM array.
//
// Each element owns one template pixel and one mask bit, the run-time
// parameters it is specialised for. On every enabled clock it takes the
// broadcast image pixel, forms |pixel - template| when its mask bit is 1
// (and 0 otherwise), adds that to the partial sum arriving from the element
// on its left, and registers the result for the element on its right. This
// is the inner statement of the matching loop, unrolled in space.
//
// Interface: en advances the element (one pixel per enable); sum_out is the
// registered partial sum and changes only on an enabled clock edge.
// Timing: one register stage, no reset. The partial-sum register needs no
// reset because a value that is not a sum of the current frame only ever
// reaches windows that the scan controller marks invalid; this choice is
// this design's own, as is the absolute-difference width.
module satm_pe #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned SUM_W = 16
) (
  input  logic             clk,
  input  logic             en,
  input  logic [PIX_W-1:0] pix,
  input  logic [PIX_W-1:0] tmpl,
  input  logic             mask,
  input  logic [SUM_W-1:0] sum_in,
  output logic [SUM_W-1:0] sum_out
);

  logic [PIX_W-1:0] diff;

  always_comb begin
    if (!mask)          diff = '0;
    else if (pix >= tmpl) diff = pix - tmpl;
    else                diff = tmpl - pix;
  end

  always_ff @(posedge clk) begin
    if (en) sum_out <= sum_in + SUM_W'(diff);
  end

endmodule
