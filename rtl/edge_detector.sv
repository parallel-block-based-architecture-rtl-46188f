// edge_detector: parallel block-based Canny edge detector with histogram
// equalization, from a grey-level image to a binary edge image.
//
// The image enters as a raster stream of 8-bit pixels. block_divider
// stores it and cuts it into overlapping BLK x BLK blocks; engine_array
// spreads the blocks over NUM_ENGINES computation engines that work in
// parallel, each one equalizing its block, classifying it, computing
// gradients, suppressing non-maxima, choosing its own thresholds from the
// block statistics and applying hysteresis; block_merger keeps the
// interior of every block's edge map and sends the edge image out as a
// raster stream of single-bit edge flags. Because every block is
// thresholded on its own statistics, the time from a block's pixels to its
// edge map depends on the block size, not on the frame size.
//
// Interface: in_valid/in_ready/in_pixel (one pixel per clock at most),
// out_valid/out_ready/edge_flag and frame_done on the last edge flag of a
// frame. A frame takes IMG_W*IMG_H clocks to load; the blocks then flow
// through the engines at up to one pixel per clock, and the edge image
// leaves after the last block. Defaults: 512 x 512 image, 64 x 64 blocks
// with a 2-pixel overlap border, four engines. The image size follows the
// test images used with this design; block size, overlap and engine count
// are this design's own choices.
module edge_detector
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W       = 512,
  parameter int unsigned IMG_H       = 512,
  parameter int unsigned BLK         = 64,
  parameter int unsigned OV          = 2,
  parameter int unsigned NUM_ENGINES = 4,
  parameter int unsigned NL          = 8,
  parameter int unsigned TU          = 100,
  parameter int unsigned TE          = 900
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pixel,
  output logic out_valid,
  input  logic out_ready,
  output logic edge_flag,
  output logic frame_done
);
  logic b_valid, b_ready, b_last, b_frame_last;
  pix_t b_pixel;
  block_divider #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) u_divider (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid(b_valid), .out_ready(b_ready), .out_pixel(b_pixel),
    .out_last(b_last), .frame_last(b_frame_last)
  );

  logic e_valid, e_ready, e_edge, e_last;
  blk_class_e e_cls;
  mag_t e_th, e_tl;
  logic [NUM_ENGINES-1:0] e_busy;
  engine_array #(.BLK(BLK), .NUM_ENGINES(NUM_ENGINES), .NL(NL), .TU(TU), .TE(TE)) u_array (
    .clk, .rst,
    .in_valid(b_valid), .in_ready(b_ready), .in_pixel(b_pixel),
    .out_valid(e_valid), .out_ready(e_ready), .out_edge(e_edge), .out_last(e_last),
    .out_blk_cls(e_cls), .out_th(e_th), .out_tl(e_tl), .engine_busy(e_busy)
  );

  block_merger #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) u_merger (
    .clk, .rst,
    .in_valid(e_valid), .in_ready(e_ready), .in_edge(e_edge),
    .out_valid, .out_ready, .edge_flag, .out_last(frame_done)
  );
endmodule
