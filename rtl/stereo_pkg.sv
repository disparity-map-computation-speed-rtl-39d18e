// stereo_pkg: shared constants of the SAD block-matching disparity engine.
//
// The defaults describe the FPGA configuration of the design: 128x128
// images of 8-bit pixels, a 7x7 SAD window, 16 disparity levels (0..15) and
// 8 SAD blocks working on 8 image lines at once. Every module takes these as
// parameter defaults, so a different size is a parameter override.
//
// The valid region follows the usual block-matching limits: a reference
// pixel is processed only when its whole window, and the window of its
// farthest candidate in the right image, lie inside the image:
//   XMIN = MAX_DISP + WIN/2 - 1   XMAX = IMG_W - WIN/2 - 1
//   YMIN = WIN/2                  YMAX = IMG_H - WIN/2 - 1
// With disparities 0..MAX_DISP-1 the left edge of the farthest right window
// is then exactly column 0.
package stereo_pkg;
  parameter int unsigned IMG_W_DEF    = 128;
  parameter int unsigned IMG_H_DEF    = 128;
  parameter int unsigned PIX_W_DEF    = 8;
  parameter int unsigned WIN_DEF      = 7;
  parameter int unsigned MAX_DISP_DEF = 16;
  parameter int unsigned NUM_SAD_DEF  = 8;

  // Width of a SAD value for a WIN x WIN window of PIX_W-bit pixels.
  function automatic int unsigned sad_width(int unsigned pix_w, int unsigned win);
    return pix_w + $clog2(win * win);
  endfunction
endpackage
