// tb_block_merger: sends the blocks of two 21x18 frames (8x8 blocks,
// 2-pixel overlap) whose interior bits follow a known pattern of the image
// coordinates and whose border bits are the opposite, and checks that the
// edge image comes out with exactly the interior bits, in raster order,
// with frame_done on the last pixel.
`timescale 1ns/1ps
module tb_block_merger;
  localparam int IMG_W = 21, IMG_H = 18, BLK = 8, OV = 2;
  localparam int S = BLK - 2 * OV;
  localparam int NTX = (IMG_W + S - 1) / S, NTY = (IMG_H + S - 1) / S;
  localparam int NF = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_edge, out_valid, out_ready, edge_flag, out_last;
  block_merger #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_edge, .out_valid, .out_ready, .edge_flag, .out_last);

  int checks = 0, failures = 0, held = 0;

  function automatic bit pat(int f, int y, int x);
    return ((y * 7 + x * 3 + f) % 5) < 2;
  endfunction

  initial begin
    int f, t, p, y, x;
    bit inner;
    in_valid = 0;
    in_edge = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    f = 0;
    t = 0;
    p = 0;
    while (f < NF) begin
      @(negedge clk);
      y = (t / NTX) * S + p / BLK - OV;
      x = (t % NTX) * S + p % BLK - OV;
      inner = (p / BLK >= OV) && (p / BLK < OV + S) && (p % BLK >= OV) && (p % BLK < OV + S);
      in_valid = ($urandom % 4 != 0);
      in_edge = inner ? pat(f, y, x) : !pat(f, y, x);
      #1;
      if (in_valid && !in_ready) held++;
      if (in_valid && in_ready) begin
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
    @(negedge clk);
    in_valid = 0;
  end

  initial begin
    int f, i;
    f = 0;
    i = 0;
    out_ready = 0;
    wait (!rst);
    while (f < NF) begin
      @(negedge clk);
      out_ready = ($urandom % 3 != 0);
      #1;
      if (out_valid && out_ready) begin
        checks += 2;
        if (edge_flag != pat(f, i / IMG_W, i % IMG_W)) begin
          failures++;
          if (failures < 10) $display("FAIL: frame %0d pixel %0d", f, i);
        end
        if (out_last != (i == IMG_W * IMG_H - 1)) failures++;
        i++;
        if (i == IMG_W * IMG_H) begin
          i = 0;
          f++;
        end
      end
    end
    checks++;
    if (held == 0) failures++;
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
