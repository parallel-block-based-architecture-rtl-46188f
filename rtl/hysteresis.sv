// hysteresis: final edge decision from the suppressed magnitudes.
//
// The centre pixel of a 3x3 window of non-maximum-suppressed magnitudes is
// a strong edge (f1) if it is above the high threshold TH and a weak edge
// (f2) if it is above the low threshold TL but not above TH. A strong
// pixel is an edge; a weak pixel is an edge if any of its eight neighbours
// is strong; everything else is a non-edge. This is a single pass over
// the neighbourhood, as the design describes it, not an iterative edge
// tracing. "Above" is taken as strictly greater. Purely combinational.
module hysteresis
  import canny_pkg::*;
(
  input  mag_t win [3][3],
  input  mag_t th,
  input  mag_t tl,
  output logic edge_out,
  output logic f1_strong,
  output logic f2_weak
);
  logic nb_strong;
  always_comb begin
    f1_strong = win[1][1] > th;
    f2_weak   = (win[1][1] > tl) && !f1_strong;
    nb_strong = 1'b0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        if (!(i == 1 && j == 1) && win[i][j] > th) nb_strong = 1'b1;
    edge_out = f1_strong || (f2_weak && nb_strong);
  end
endmodule
