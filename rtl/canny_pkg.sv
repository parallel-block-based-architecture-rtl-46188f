// canny_pkg: types, widths and constants shared by the block-based Canny
// edge detector.
//
// Pixels are 8-bit grey levels. The 3x3 Sobel gradients fit in 11 signed
// bits (|G| <= 4*255 = 1020) and the L1 magnitude |Gx|+|Gy| in 11 unsigned
// bits (<= 2040). Pixels are classified as uniform, texture or edge from
// their 3x3 local variance, and a block as one of five types (Table II
// classes: smooth, texture, hybrid, medium, strong). The percentage P1 of
// pixels expected to be strong edges in a block depends on block size and
// block type; the values of the published table are stored here as
// unsigned Q0.16 fractions, rounded to the nearest LSB.
package canny_pkg;

  localparam int PIX_W  = 8;
  localparam int GRAD_W = 11;
  localparam int MAG_W  = 11;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;

  // One gradient sample as stored between the gradient and the
  // non-maximum suppression passes.
  typedef struct packed {
    grad_t gx;
    grad_t gy;
    mag_t  mag;
  } grad_sample_t;

  typedef enum logic [1:0] {
    PIX_UNIFORM = 2'd0,
    PIX_TEXTURE = 2'd1,
    PIX_EDGE    = 2'd2
  } pix_class_e;

  typedef enum logic [2:0] {
    BLK_SMOOTH  = 3'd0,
    BLK_TEXTURE = 3'd1,
    BLK_HYBRID  = 3'd2,
    BLK_MEDIUM  = 3'd3,
    BLK_STRONG  = 3'd4
  } blk_class_e;

  // P1 (fraction of strong-edge pixels) as Q0.16, per block side length
  // and block class. Sizes not in the table use the 64x64 row.
  function automatic logic [15:0] p1_q16(input int blk_side, input blk_class_e cls);
    logic [15:0] row [4];
    case (blk_side)
      8:       row = '{16'd2045, 16'd6698, 16'd14307, 16'd31588};
      16:      row = '{16'd2012, 16'd6658, 16'd17144, 16'd31654};
      32:      row = '{16'd1999, 16'd7320, 16'd13625, 16'd31785};
      128:     row = '{16'd1979, 16'd6115, 16'd15565, 16'd31719};
      256:     row = '{16'd1960, 16'd5970, 16'd15099, 16'd32047};
      default: row = '{16'd2084, 16'd6947, 16'd14536, 16'd30605};
    endcase
    case (cls)
      BLK_SMOOTH:  return 16'd0;
      BLK_TEXTURE: return row[0];
      BLK_HYBRID:  return row[1];
      BLK_MEDIUM:  return row[2];
      default:     return row[3];
    endcase
  endfunction

endpackage
