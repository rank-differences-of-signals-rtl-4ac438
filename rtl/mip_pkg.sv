// mip_pkg: constants shared by the rank-processing blocks.
//
// Pixels are unsigned 8-bit samples (0..255, the upper level D of the signal
// range is 255). The sorting units take ten signals: the nine pixels of a
// 3x3 window plus one auxiliary boundary input. Weights of the
// weighing-selection sums are signed fixed-point numbers; the width and the
// number of fraction bits are this design's choice, picked so that every
// weight used in the worked examples (integers 0..9, -1, 0.5, 0.25, 0.125)
// is exact.
package mip_pkg;

  parameter int unsigned PIX_W   = 8;    // pixel width
  parameter int unsigned N_SIG   = 10;   // signals ranked by a sorting unit
  parameter int unsigned WIN     = 3;    // window side
  parameter int unsigned IMG_SIDE = 64;  // image side (64x64 image)
  parameter int unsigned WGT_W   = 8;    // weight width, signed
  parameter int unsigned WGT_F   = 3;    // weight fraction bits (Q4.3)

  // Width of a weighted sum: a 10-term sum of (PIX_W+1)-bit signed values
  // times WGT_W-bit weights.
  function automatic int unsigned acc_width(int unsigned pix_w, int unsigned wgt_w,
                                            int unsigned n);
    return pix_w + 1 + wgt_w + $clog2(n);
  endfunction

endpackage
