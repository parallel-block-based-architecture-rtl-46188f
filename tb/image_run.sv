// image_run: drives one edge_detector instance with NF synthetic frames of
// IMG_W x IMG_H pixels and checks the edge image bit by bit against the
// reference model, block by block with the same overlapping blocks.
// Used by tb_workload_sizes to run several image sizes side by side;
// raises done when all frames have been checked.
`timescale 1ns/1ps
module image_run
  import canny_pkg::*;
  import canny_ref_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int BLK   = 64,
  parameter int OV    = 2,
  parameter int NF    = 1,
  parameter int SEED  = 0
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   edges_seen
);
  localparam int S   = BLK - 2 * OV;
  localparam int NTX = (IMG_W + S - 1) / S;
  localparam int NTY = (IMG_H + S - 1) / S;

  logic in_valid, in_ready, out_valid, out_ready, edge_flag, frame_done;
  pix_t in_pixel;
  edge_detector #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid, .out_ready, .edge_flag, .frame_done
  );

  byte unsigned image [NF][IMG_H][IMG_W];
  bit exp_edge [NF][IMG_H][IMG_W];
  bit ready_ref = 0;

  function automatic int clampv(int v, int n);
    return (v < 0) ? 0 : (v >= n) ? n - 1 : v;
  endfunction

  // The reference model uses shared static arrays, so the instances take
  // turns: instance SEED waits SEED time units before using them.
  initial begin
    int k, y0, x0;
    #(SEED);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          k = ((y / S) * NTX + x / S + f + SEED) % 10;
          image[f][y][x] = byte'(pattern(k, y % S, x % S, S, f));
        end
      for (int ty = 0; ty < NTY; ty++)
        for (int tx = 0; tx < NTX; tx++) begin
          y0 = ty * S - OV;
          x0 = tx * S - OV;
          for (int r = 0; r < BLK; r++)
            for (int c = 0; c < BLK; c++)
              img[r][c] = int'(image[f][clampv(y0 + r, IMG_H)][clampv(x0 + c, IMG_W)]);
          run_all(BLK, 8, 100, 900);
          for (int r = OV; r < OV + S; r++)
            for (int c = OV; c < OV + S; c++)
              if (y0 + r < IMG_H && x0 + c < IMG_W) exp_edge[f][y0 + r][x0 + c] = edge_map[r][c] != 0;
        end
    end
    ready_ref = 1;
  end

  initial begin
    int f, y, x;
    in_valid = 0;
    in_pixel = '0;
    wait (ready_ref && !rst);
    f = 0;
    y = 0;
    x = 0;
    while (f < NF) begin
      @(negedge clk);
      in_valid = ($urandom % 32 != 0);
      in_pixel = pix_t'(image[f][y][x]);
      #1;
      if (in_valid && in_ready) begin
        x++;
        if (x == IMG_W) begin
          x = 0;
          y++;
          if (y == IMG_H) begin
            y = 0;
            f++;
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  initial begin
    int f, y, x;
    done = 0;
    checks = 0;
    failures = 0;
    edges_seen = 0;
    f = 0;
    y = 0;
    x = 0;
    out_ready = 0;
    wait (ready_ref && !rst);
    while (f < NF) begin
      @(negedge clk);
      out_ready = ($urandom % 5 != 0);
      #1;
      if (out_valid && out_ready) begin
        checks += 2;
        if (edge_flag != exp_edge[f][y][x]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %0dx%0d frame %0d pixel (%0d,%0d) edge %0d expected %0d",
                     IMG_W, IMG_H, f, y, x, edge_flag, exp_edge[f][y][x]);
        end
        if (frame_done != (y == IMG_H - 1 && x == IMG_W - 1)) failures++;
        edges_seen += int'(edge_flag);
        x++;
        if (x == IMG_W) begin
          x = 0;
          y++;
          if (y == IMG_H) begin
            y = 0;
            f++;
          end
        end
      end
    end
    done = 1;
  end
endmodule
