// c2_pkg: constants and types shared by the counterflow-clocked (C2) blocks.
//
// A C2 pipeline distributes its clock backwards, against the data flow,
// through a chain of inverting delays; every latch takes its clock from the
// chain node next to it.  This package holds the pixel format of the line
// memory section of the subband filtering chip (8-bit pixels, five taps of
// 0..4 line delays, both printed in the document) and the line length, which
// the document does not give (1920 pixels, one HDTV line, is this design's
// choice).
package c2_pkg;

  // Pixel width of the data buses into the line memory units (8-bit buses).
  localparam int unsigned PIXEL_W = 8;

  // Number of line memory blocks in one line memory unit, and the number of
  // taps it delivers (zero-delay plus one tap per block).
  localparam int unsigned LMU_BLOCKS = 4;
  localparam int unsigned LMU_TAPS   = LMU_BLOCKS + 1;

  // Pixels per image line (design choice: one HDTV line).
  localparam int unsigned LINE_PIXELS = 1920;

  typedef logic [PIXEL_W-1:0] pixel_t;

  // Depth of line memory block j (1-based) inside a line memory unit.  Blocks
  // on odd clock nodes are read one half-cycle hop earlier through an extra
  // forwarding latch (see line_memory_unit), so they hold one pixel less; this
  // makes the taps exactly 0,1,2,3,4 lines apart at the output latch.
  function automatic int unsigned lmb_depth(int unsigned line_len, int unsigned j);
    return (j % 2 == 1) ? line_len - 1 : line_len;
  endfunction

endpackage
