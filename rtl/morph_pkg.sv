// morph_pkg: constants and types shared by the morphological filter.
// Pixels are 8-bit grey levels and the reference image is 128 x 128, the
// sizes used in the experiments the design was evaluated with. The
// neighbourhood is the 3 x 3 window formed by three stored image rows.
// The operation encoding and the UART timing default (50 MHz clock,
// 115200 baud) are this design's own choices.
package morph_pkg;
  localparam int unsigned PIX_W        = 8;    // bits per grey-scale pixel
  localparam int unsigned IMG_W        = 128;  // image width in pixels
  localparam int unsigned IMG_H        = 128;  // image height in pixels
  localparam int unsigned CLKS_PER_BIT = 434;  // 50 MHz / 115200 baud

  typedef enum logic {
    OP_DILATE = 1'b0,  // output = maximum of the 3 x 3 window
    OP_ERODE  = 1'b1   // output = minimum of the 3 x 3 window
  } morph_op_t;
endpackage
