// Shared types and default sizes of the 2-way parallel histogram computation (PHC).
//
// The histogram memory holds two arrays of 2**BPP counters each: the array for pixels at
// even image addresses at [0, 2**BPP) and the array for pixels at odd image addresses at
// [2**BPP, 2*2**BPP). Every clock cycle each of its two ports carries one operation, chosen
// by hist_op_e. The defaults are those of the main evaluation (8 bits per pixel, 512 x 512
// images, 32-bit histogram elements).
package phc_pkg;

  // Default pixel width in bits.
  localparam int unsigned DEF_BPP = 8;
  // Default image side length (the image has IMG_N * IMG_N pixels).
  localparam int unsigned DEF_IMG_N = 512;
  // Default side length of a streamed frame.
  localparam int unsigned DEF_STREAM_N = 1024;
  // Default width of one histogram element.
  localparam int unsigned DEF_COUNT_W = 32;

  // Operation carried by the histogram memory ports during one clock cycle.
  //   HOP_NONE  : nothing is read or written
  //   HOP_CLEAR : both ports write zero at index idx of their own array
  //   HOP_INCR  : first step, each port increments the bin addressed by its pixel
  //   HOP_MERGE : second step, port A writes even[idx] + odd[idx] into even[idx]
  typedef enum logic [1:0] {
    HOP_NONE  = 2'd0,
    HOP_CLEAR = 2'd1,
    HOP_INCR  = 2'd2,
    HOP_MERGE = 2'd3
  } hist_op_e;

endpackage
