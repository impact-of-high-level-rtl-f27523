// Shared types and constants of the motion-detection datapath.
// Pixels of the grey-level input image and of the Sigma-Delta planes M
// (background) and V (variance) are 8 bits wide. The binary motion label
// and the morphological planes use one bit per pixel. The morphological
// operator works with min (erosion) or max (dilation); on binary pixels
// these reduce to AND and OR.
package sd_pkg;
  localparam int unsigned PIX_W = 8;
  typedef logic [PIX_W-1:0] pixel_t;

  typedef enum logic {
    MORPH_ERODE  = 1'b0,
    MORPH_DILATE = 1'b1
  } morph_op_e;

  // Operation codes of the custom-instruction unit (the "n" field).
  typedef enum logic [2:0] {
    CI_LT_INC    = 3'd0,
    CI_GT_DEC    = 3'd1,
    CI_INC_DEC   = 3'd2,
    CI_MIN       = 3'd3,
    CI_MAX       = 3'd4,
    CI_VEC_LEFT  = 3'd5,
    CI_VEC_RIGHT = 3'd6
  } ci_op_e;
endpackage
