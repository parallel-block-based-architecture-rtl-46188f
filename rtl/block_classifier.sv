// block_classifier: classifies a whole block as smooth, texture, hybrid,
// medium or strong from the counts of its uniform and edge pixels.
//
// clear starts a new block. Every clock with pix_valid counts one pixel
// class from the pixel classification stage (pixel_classifier). The
// decision is combinational on the running counts and is meant to be read
// once all N = BLK*BLK pixels have been counted. With Nu uniform and Ne
// edge pixels:
//   Ne = 0:                 smooth if Nu >= 307N/1024, else texture
//   0 < Ne < 307N/1024:     medium if Nu >= 665(N-Ne)/1024, else hybrid
//   Ne >= 307N/1024:        strong
// The fractions are compared exactly by cross-multiplying with 1024. The
// strong row of the rule also asks Nu <= 716N/1024, which always holds once
// Ne >= 307N/1024 up to rounding, so the unit gives strong whenever the
// edge count is that high.
module block_classifier
  import canny_pkg::*;
#(
  parameter int unsigned BLK = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       pix_valid,
  input  pix_class_e pix_cls,
  output logic [$clog2(BLK*BLK+1)-1:0] n_uniform,
  output logic [$clog2(BLK*BLK+1)-1:0] n_edge,
  output blk_class_e blk_cls
);
  localparam int unsigned N   = BLK * BLK;
  localparam int unsigned C_W = $clog2(N + 1);
  localparam int unsigned W   = C_W + 11;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      n_uniform <= '0;
      n_edge    <= '0;
    end else if (pix_valid) begin
      if (pix_cls == PIX_UNIFORM) n_uniform <= n_uniform + 1'b1;
      if (pix_cls == PIX_EDGE)    n_edge    <= n_edge + 1'b1;
    end
  end

  logic [W-1:0] nu_s, ne_s, lim_307, lim_665;
  always_comb begin
    nu_s    = W'(n_uniform) << 10;
    ne_s    = W'(n_edge) << 10;
    lim_307 = W'(307) * W'(N);
    lim_665 = W'(665) * (W'(N) - W'(n_edge));
    if (n_edge == '0)         blk_cls = (nu_s >= lim_307) ? BLK_SMOOTH : BLK_TEXTURE;
    else if (ne_s < lim_307)  blk_cls = (nu_s >= lim_665) ? BLK_MEDIUM : BLK_HYBRID;
    else                      blk_cls = BLK_STRONG;
  end
endmodule
