// hist_pkg: sizes shared by the memory-based parallel histogram generator.
//
// The generator computes the gray-level histogram of an image by holding a
// window of ROWS x BLOCKS pixels in registers, picking one not-yet-counted
// value P per clock and counting all of its occurrences in the window at once.
// The image size (256 x 256) and the pixel width (8 bits) follow the design
// description; ROWS = 3 and BLOCKS = 3 follow its FPGA prototype (three
// comparators per processing block, a 3-bit c_control bus). The count width is
// derived so that one bin can hold every pixel of the image.
package hist_pkg;

  localparam int unsigned PIX_W      = 8;                 // bits per pixel
  localparam int unsigned ROWS       = 3;                 // T: pixels per column
  localparam int unsigned BLOCKS     = 3;                 // N: processing blocks
  localparam int unsigned IMG_PIXELS = 256 * 256;         // image size

  // Bits needed to hold the value n (n >= 1).
  function automatic int unsigned bits_for(input int unsigned n);
    int unsigned b = 1;
    while (b < 32 && (64'd1 << b) <= 64'(n)) b++;
    return b;
  endfunction

  // State of the generator's sequencer.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,   // waiting for start; results readable
    ST_CLEAR = 2'd1,   // zeroing the histogram RAM
    ST_RUN   = 2'd2,   // counting
    ST_DRAIN = 2'd3    // last histogram write in flight
  } state_t;

endpackage
