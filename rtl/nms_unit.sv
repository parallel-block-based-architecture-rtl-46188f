// nms_unit: directional non-maximum suppression with interpolation.
//
// Input: the 3x3 window of gradient magnitudes around a pixel and the
// pixel's own Gx, Gy. Two intermediate magnitudes are interpolated along
// the gradient direction, one on each side of the pixel, between the two
// neighbours that the direction passes between. The pixel keeps its
// magnitude if it is at least as large as both, and is set to 0 otherwise.
//
// The direction is Gy/Gx. Instead of dividing, the unit scales both sides
// of the comparison by the larger of |Gx|, |Gy|: for |Gx| >= |Gy| the
// forward value is M_e + (|Gy|/|Gx|)(M_d - M_e), with M_e the horizontal
// neighbour and M_d the diagonal one, and the test
//   M*|Gx| >= (|Gx|-|Gy|)*M_e + |Gy|*M_d
// is exact in integers (likewise with rows and columns swapped for
// |Gy| > |Gx|). A pixel with zero magnitude is always suppressed. The
// cross-multiplication and the tie rule are this design's own choices.
// Purely combinational.
module nms_unit
  import canny_pkg::*;
(
  input  mag_t  win [3][3],
  input  grad_t gx,
  input  grad_t gy,
  output mag_t  mag_out
);
  localparam int unsigned P_W = 2 * MAG_W + 1;

  mag_t ax, ay, amax, amin;
  logic sx, sy;         // 1: negative step along that axis
  mag_t f_near, f_diag; // forward side neighbours
  mag_t b_near, b_diag; // backward side neighbours
  logic [P_W-1:0] lhs, rhs_f, rhs_b;

  always_comb begin
    ax = gx[GRAD_W-1] ? mag_t'(-gx) : mag_t'(gx);
    ay = gy[GRAD_W-1] ? mag_t'(-gy) : mag_t'(gy);
    sx = gx[GRAD_W-1];
    sy = gy[GRAD_W-1];
    // window index 1+d: d = +1 for a positive step, -1 for a negative one
    if (ax >= ay) begin
      amax   = ax;
      amin   = ay;
      f_near = win[1][sx ? 0 : 2];
      f_diag = win[sy ? 0 : 2][sx ? 0 : 2];
      b_near = win[1][sx ? 2 : 0];
      b_diag = win[sy ? 2 : 0][sx ? 2 : 0];
    end else begin
      amax   = ay;
      amin   = ax;
      f_near = win[sy ? 0 : 2][1];
      f_diag = win[sy ? 0 : 2][sx ? 0 : 2];
      b_near = win[sy ? 2 : 0][1];
      b_diag = win[sy ? 2 : 0][sx ? 2 : 0];
    end
    lhs   = P_W'(win[1][1]) * P_W'(amax);
    rhs_f = P_W'(amax - amin) * P_W'(f_near) + P_W'(amin) * P_W'(f_diag);
    rhs_b = P_W'(amax - amin) * P_W'(b_near) + P_W'(amin) * P_W'(b_diag);
    if (win[1][1] != '0 && lhs >= rhs_f && lhs >= rhs_b) mag_out = win[1][1];
    else                                                  mag_out = '0;
  end
endmodule
