// pixel_classifier: classifies a pixel as uniform, texture or edge from the
// variance of its 3x3 neighbourhood (first stage of block classification).
//
// The variance is taken as var = (1/8) * sum (x_i - mean)^2 over the nine
// pixels, and compared with the thresholds TU (100) and TE (900):
// var <= TU is uniform, TU < var <= TE texture, var > TE edge. With
// S = sum x_i and Q = sum x_i^2 this is var = (9Q - S^2) / 72, so the unit
// compares the integer 9Q - S^2 with 72*TU and 72*TE and needs no divider
// and no rounding. Purely combinational.
module pixel_classifier
  import canny_pkg::*;
#(
  parameter int unsigned TU = 100,
  parameter int unsigned TE = 900
) (
  input  pix_t       win [3][3],
  output pix_class_e cls
);
  logic [11:0] sum_x;    // <= 9*255
  logic [19:0] sum_x2;   // <= 9*255^2
  logic [23:0] disp;     // 9*Q - S^2, >= 0

  always_comb begin
    sum_x  = '0;
    sum_x2 = '0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        sum_x  = sum_x + 12'(win[i][j]);
        sum_x2 = sum_x2 + 20'(win[i][j]) * 20'(win[i][j]);
      end
    end
    disp = 24'(sum_x2) * 24'd9 - 24'(sum_x) * 24'(sum_x);
    if (disp <= 24'(72 * TU))      cls = PIX_UNIFORM;
    else if (disp <= 24'(72 * TE)) cls = PIX_TEXTURE;
    else                           cls = PIX_EDGE;
  end
endmodule
