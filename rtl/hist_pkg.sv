// hist_pkg: constants shared by the C-slow retimed histogram array.
//
// The array counts p-bit pixels into m = 2**p bins, two bins per cell, so an
// array has m/2 cells. The pixel width of 8 bits matches the 8-bit camera and
// microprocessor data buses the design targets; the counter width is this
// design's own choice (24 bits hold images of up to 16.7 million pixels).
package hist_pkg;
  localparam int unsigned PIX_W_DEF   = 8;   // p: pixel width in bits
  localparam int unsigned COUNT_W_DEF = 24;  // width of one bin counter
  localparam int unsigned BIN_STEP    = 2;   // bins handled by one cell
  localparam int unsigned INC_W       = 2;   // width of a per-cycle increment (0..2)
endpackage
