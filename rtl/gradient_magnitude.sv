// gradient_magnitude: horizontal and vertical gradients of a 3x3 window and
// their L1 magnitude.
//
// Gx and Gy come from the 3x3 Sobel masks (Gx: right column minus left
// column, Gy: lower row minus upper row, centre taps weighted 2). The
// magnitude is |Gx| + |Gy|, the sum of moduli the design uses instead of a
// square root. The choice of the Sobel masks is this design's own; the
// design only asks for a 3x3 gradient mask. Purely combinational.
module gradient_magnitude
  import canny_pkg::*;
(
  input  pix_t  win [3][3],
  output grad_t gx,
  output grad_t gy,
  output mag_t  mag
);
  function automatic grad_t ext(input pix_t p);
    return grad_t'({3'b000, p});
  endfunction

  mag_t ax, ay;
  always_comb begin
    gx = (ext(win[0][2]) + 2 * ext(win[1][2]) + ext(win[2][2]))
       - (ext(win[0][0]) + 2 * ext(win[1][0]) + ext(win[2][0]));
    gy = (ext(win[2][0]) + 2 * ext(win[2][1]) + ext(win[2][2]))
       - (ext(win[0][0]) + 2 * ext(win[0][1]) + ext(win[0][2]));
    ax  = gx[GRAD_W-1] ? mag_t'(-gx) : mag_t'(gx);
    ay  = gy[GRAD_W-1] ? mag_t'(-gy) : mag_t'(gy);
    mag = ax + ay;
  end
endmodule
