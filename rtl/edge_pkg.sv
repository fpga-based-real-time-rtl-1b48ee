// edge_pkg: types and constants shared by the stages of the Sobel-Canny
// edge-detection pipeline.
//
// Pixels are 8-bit grey values. The Sobel magnitude |Gx|+|Gy| of an 8-bit
// image fits in 11 bits (at most 4*255*2 = 2040). Thresholds are kept on an
// 8-bit scale, as in the hardware threshold pair [21 52] of the basic
// pipeline; a magnitude is compared with a threshold after dropping its three
// low bits (2040 >> 3 = 255). The gradient direction is reduced to the four
// principal orientations; the 8 direction masks of the improved Sobel model
// come in opposite pairs, which share an orientation.
package edge_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned MAG_W = 11;
  localparam int unsigned THR_W = 8;
  localparam int unsigned MAG_SHIFT = MAG_W - THR_W;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [MAG_W-1:0] mag_t;
  typedef logic [THR_W-1:0] thr_t;

  // Orientation of the gradient vector (x to the right, y downwards).
  typedef enum logic [1:0] {
    DIR_0   = 2'd0,  // horizontal gradient: compare left and right
    DIR_45  = 2'd1,  // Gx, Gy of the same sign: compare up-left and down-right
    DIR_90  = 2'd2,  // vertical gradient: compare up and down
    DIR_135 = 2'd3   // Gx, Gy of opposite signs: compare up-right and down-left
  } dir_t;

  // Magnitude travelling with its orientation through the smoothing and
  // suppression stages.
  typedef struct packed {
    dir_t dir;
    mag_t mag;
  } grad_t;

  // Double-threshold classes.
  typedef enum logic [1:0] {
    CLS_NONE   = 2'd0,
    CLS_WEAK   = 2'd1,
    CLS_STRONG = 2'd2
  } cls_t;

  // Magnitude on the 8-bit threshold scale.
  function automatic thr_t mag_to_thr(mag_t m);
    return thr_t'(m >> MAG_SHIFT);
  endfunction

endpackage
