// faber_pkg: types and constants shared by the image-registration accelerator.
//
// Pixels are unsigned B-bit intensities (8 bits by default: the images are
// reduced to 256 grey levels so that the joint histogram has 256 x 256 bins).
// Every similarity metric reports its value as a signed 64-bit fixed-point
// number with METRIC_FRAC fractional bits, so the host reads one format for
// MSE, CC, MI and NMI. The affine matrix coefficients are signed Q16.16.
//
// The 8-bit pixels and the four metrics follow the source, which evaluates
// MI and NMI in 32-bit floating point; the fixed-point formats here are this
// design's own choice.
package faber_pkg;

  // Fractional bits of the 64-bit metric result word.
  localparam int unsigned METRIC_FRAC = 32;
  typedef logic signed [63:0] metric_t;

  // Fractional bits of the affine coefficients (Q16.16).
  localparam int unsigned COEF_FRAC = 16;
  typedef logic signed [31:0] coef_t;

  // Which similarity metric a core is generated with.
  typedef enum logic [1:0] {
    METRIC_MSE = 2'd0,
    METRIC_CC  = 2'd1,
    METRIC_MI  = 2'd2,
    METRIC_NMI = 2'd3
  } metric_e;

  // Interpolation used by the transformation.
  typedef enum logic {
    INTERP_NEAREST  = 1'b0,
    INTERP_BILINEAR = 1'b1
  } interp_e;

  // 2 x 3 affine matrix: src = M * [x y 1]^T.
  typedef struct packed {
    coef_t m00, m01, m02;
    coef_t m10, m11, m12;
  } affine_t;

  // Number of bits needed to count 0..n.
  function automatic int unsigned cnt_w(input longint unsigned n);
    int unsigned w = 1;
    while ((64'd1 << w) <= n) w++;
    return w;
  endfunction

endpackage
