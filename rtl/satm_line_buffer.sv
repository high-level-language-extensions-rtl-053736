// satm_line_buffer: scan-line shift register between two PE rows.
//
// A row of TMPL_W elements spans only part of an image line. The partial
// sums leaving a row must wait for the rest of the line to stream past
// before they meet the pixels of the next line, so they pass through a
// shift register of DEPTH = IMG_W - TMPL_W stages. Together with the TMPL_W
// element registers this gives exactly one image line of delay per row.
//
// Interface: en shifts the register by one place (one pixel time); dout is
// din delayed by DEPTH enabled clocks. DEPTH = 0 makes it a wire.
// Timing: DEPTH register stages, no reset (see satm_pe), so the chain can
// map onto shift-register primitives. The shift-register form follows the
// floorplan of the run-time parametrisable design; the depth formula is
// derived from the raster order of the pixel stream.
module satm_line_buffer #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 88
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [WIDTH-1:0] sr [DEPTH];

    always_ff @(posedge clk) begin
      if (en) begin
        sr[0] <= din;
        for (int unsigned k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
      end
    end

    assign dout = sr[DEPTH-1];
  end

endmodule
