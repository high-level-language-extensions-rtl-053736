// satm_pkg: shared constants and types of the shape-adaptive template
// matching (SA-TM) core.
//
// The default sizes are those of the evaluated configuration: 12x12 pixel
// templates searched over 100x100 pixel images. Pixels are 8-bit luminance
// values (an assumption; the luminance width is not stated). A partial sum
// of absolute differences needs PIX_W + clog2(TMPL_W*TMPL_H) bits, which is
// 16 bits at the default sizes.
package satm_pkg;

  localparam int unsigned DEF_IMG_W  = 100;
  localparam int unsigned DEF_IMG_H  = 100;
  localparam int unsigned DEF_TMPL_W = 12;
  localparam int unsigned DEF_TMPL_H = 12;
  localparam int unsigned DEF_PIX_W  = 8;

  // States of the blocking start/finish handshake of a "sync" task.
  typedef enum logic [1:0] {
    TS_IDLE = 2'd0,  // waiting for the host's start sync
    TS_RUN  = 2'd1,  // task processing
    TS_DONE = 2'd2   // finished, finish sync raised until the host takes it
  } task_state_e;

  // Width needed to count 0..n-1 (at least one bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
