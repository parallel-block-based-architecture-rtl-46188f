// tb_block_divider: cuts two 21x18 frames into 8x8 blocks with a 2-pixel
// overlap (stride 4) and checks every block pixel against the clamped
// image coordinates, the block and frame end flags, random output stalls
// and that input is held off while blocks are being sent.
`timescale 1ns/1ps
module tb_block_divider;
  import canny_pkg::*;

  localparam int IMG_W = 21, IMG_H = 18, BLK = 8, OV = 2;
  localparam int S = BLK - 2 * OV;
  localparam int NTX = (IMG_W + S - 1) / S, NTY = (IMG_H + S - 1) / S;
  localparam int NF = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, out_last, frame_last;
  pix_t in_pixel, out_pixel;
  block_divider #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid, .out_ready, .out_pixel, .out_last, .frame_last);

  int checks = 0, failures = 0, held = 0, stalls = 0;
  byte unsigned image [NF][IMG_H][IMG_W];

  function automatic int cl(int v, int n);
    return (v < 0) ? 0 : (v >= n) ? n - 1 : v;
  endfunction

  initial begin
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) image[f][y][x] = byte'($urandom);
  end

  initial begin
    int f, i;
    in_valid = 0;
    in_pixel = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    f = 0;
    i = 0;
    while (f < NF) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_pixel = pix_t'(image[f][i / IMG_W][i % IMG_W]);
      #1;
      if (in_valid && !in_ready) held++;
      if (in_valid && in_ready) begin
        i++;
        if (i == IMG_W * IMG_H) begin
          i = 0;
          f++;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  initial begin
    int f, t, p, e;
    f = 0;
    t = 0;
    p = 0;
    out_ready = 0;
    wait (!rst);
    while (f < NF) begin
      @(negedge clk);
      out_ready = ($urandom % 3 != 0);
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        e = image[f][cl((t / NTX) * S + p / BLK - OV, IMG_H)][cl((t % NTX) * S + p % BLK - OV, IMG_W)];
        checks += 3;
        if (int'(out_pixel) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: frame %0d block %0d pixel %0d: %0d expected %0d", f, t, p, out_pixel, e);
        end
        if (out_last != (p == BLK * BLK - 1)) failures++;
        if (frame_last != (p == BLK * BLK - 1 && t == NTX * NTY - 1)) failures++;
        p++;
        if (p == BLK * BLK) begin
          p = 0;
          t++;
          if (t == NTX * NTY) begin
            t = 0;
            f++;
          end
        end
      end
    end
    checks += 2;
    if (held == 0) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
