// block_divider: cuts an image into overlapping m x m blocks.
//
// A frame of IMG_W x IMG_H 8-bit pixels arrives in raster order and is
// stored in a frame buffer. The frame is then sent out again as a sequence
// of BLK x BLK blocks, in raster order of the blocks and each block in
// raster order of its pixels. Block (ty, tx) has the interior
// rows ty*S .. ty*S+S-1 and columns tx*S .. tx*S+S-1, with the stride
// S = BLK - 2*OV, plus a border of OV pixels on every side taken from the
// neighbouring blocks, so neighbouring blocks overlap by 2*OV pixels.
// Rows and columns outside the image repeat the nearest image pixel.
// There are ceil(IMG_W/S) x ceil(IMG_H/S) blocks per frame.
//
// The unit takes a new frame only after the last block of the previous
// one has been sent (in_ready low while sending). out_first and out_last
// mark the first and last pixel of each block, frame_last the last pixel
// of the frame. The frame buffer, the block order and the size of the
// overlap (OV = 2) are this design's own choices; the design states only
// that the image is divided into overlapping blocks.
module block_divider
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned BLK   = 64,
  parameter int unsigned OV    = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pixel,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pixel,
  output logic out_last,
  output logic frame_last
);
  localparam int unsigned S    = BLK - 2 * OV;
  localparam int unsigned NTX  = (IMG_W + S - 1) / S;
  localparam int unsigned NTY  = (IMG_H + S - 1) / S;
  localparam int unsigned F_W  = $clog2(IMG_W * IMG_H);
  localparam int unsigned X_W  = $clog2(IMG_W);
  localparam int unsigned Y_W  = $clog2(IMG_H);
  localparam int unsigned B_W  = $clog2(BLK);
  localparam int unsigned TX_W = (NTX > 1) ? $clog2(NTX) : 1;
  localparam int unsigned TY_W = (NTY > 1) ? $clog2(NTY) : 1;
  localparam int unsigned K_W  = $clog2(IMG_W + IMG_H + BLK) + 2;  // signed coordinate

  pix_t frame [IMG_W * IMG_H];

  logic            loading;
  logic [F_W-1:0]  waddr;
  logic [TX_W-1:0] tx;
  logic [TY_W-1:0] ty;
  logic [B_W-1:0]  br, bc;

  // image coordinates of the current block pixel, clamped to the image
  logic signed [K_W-1:0] yr, xc;
  logic [Y_W-1:0] yy;
  logic [X_W-1:0] xx;
  always_comb begin
    yr = K_W'(ty) * K_W'(S) + K_W'(br) - K_W'(OV);
    xc = K_W'(tx) * K_W'(S) + K_W'(bc) - K_W'(OV);
    if (yr < 0)                  yy = '0;
    else if (yr >= K_W'(IMG_H))  yy = Y_W'(IMG_H - 1);
    else                         yy = Y_W'(yr);
    if (xc < 0)                  xx = '0;
    else if (xc >= K_W'(IMG_W))  xx = X_W'(IMG_W - 1);
    else                         xx = X_W'(xc);
  end

  logic blk_end, frm_end;
  assign blk_end = (br == B_W'(BLK - 1)) && (bc == B_W'(BLK - 1));
  assign frm_end = blk_end && (tx == TX_W'(NTX - 1)) && (ty == TY_W'(NTY - 1));

  assign in_ready   = loading;
  assign out_valid  = !loading;
  assign out_pixel  = frame[F_W'(yy) * F_W'(IMG_W) + F_W'(xx)];
  assign out_last   = !loading && blk_end;
  assign frame_last = !loading && frm_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      loading <= 1'b1;
      waddr   <= '0;
      tx      <= '0;
      ty      <= '0;
      br      <= '0;
      bc      <= '0;
    end else if (loading) begin
      if (in_valid) begin
        frame[waddr] <= in_pixel;
        waddr        <= waddr + 1'b1;
        if (waddr == F_W'(IMG_W * IMG_H - 1)) begin
          waddr   <= '0;
          loading <= 1'b0;
        end
      end
    end else if (out_ready) begin
      bc <= bc + 1'b1;
      if (bc == B_W'(BLK - 1)) begin
        bc <= '0;
        br <= br + 1'b1;
        if (br == B_W'(BLK - 1)) begin
          br <= '0;
          tx <= tx + 1'b1;
          if (tx == TX_W'(NTX - 1)) begin
            tx <= '0;
            ty <= ty + 1'b1;
            if (ty == TY_W'(NTY - 1)) begin
              ty      <= '0;
              loading <= 1'b1;
            end
          end
        end
      end
    end
  end

  initial begin
    assert (BLK > 2 * OV) else $error("block_divider: BLK must exceed 2*OV");
  end
endmodule
