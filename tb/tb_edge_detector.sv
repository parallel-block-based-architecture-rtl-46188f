// tb_edge_detector: end-to-end test of the edge detector, image in, edge image out.
//
// Runs on two 40x84 frames with 16x16 blocks (28 blocks per frame) and
// four engines to keep the simulation short.
// The test image has a flat band two blocks high, a triangle-wave band
// three blocks high, and below them a mosaic in which every block
// interior holds one of ten test patterns (noise, ramps, a disc, stripes,
// flat areas, steps, triangle waves). The expected edge image is worked out with the
// reference model block by block, from the same overlapping blocks with
// the image border repeated, keeping each block's interior. Counted
// mechanisms (each must occur): several engines busy at once, the
// round-robin dispatcher wrapping to engine 0, blocks that reach past the
// image border, output stalls, and blocks of each of the five classes.
`timescale 1ns/1ps
module tb_edge_detector;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int IMG_W = 40;
  localparam int IMG_H = 84;
  localparam int BLK   = 16;
  localparam int OV    = 2;
  localparam int S     = BLK - 2 * OV;
  localparam int NTX   = (IMG_W + S - 1) / S;
  localparam int NTY   = (IMG_H + S - 1) / S;
  localparam int NF    = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, edge_flag, frame_done;
  pix_t in_pixel;
  edge_detector #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK(BLK), .OV(OV)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid, .out_ready, .edge_flag, .frame_done
  );

  int checks = 0, failures = 0;
  byte unsigned image [NF][IMG_H][IMG_W];
  bit exp_edge [NF][IMG_H][IMG_W];
  int cls_seen [5];
  int stalls = 0, backpressure = 0, max_parallel = 0, border_blocks = 0, edges_seen = 0;
  int wraps = 0;
  longint cycle = 0, t_first_in = -1, t_first_out = -1;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int clampv(int v, int n);
    return (v < 0) ? 0 : (v >= n) ? n - 1 : v;
  endfunction

  initial begin
    int k, y0, x0;
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          // block rows 0-1 flat, 2-4 a triangle wave, the rest a mosaic
          if (y / S < 2) image[f][y][x] = byte'(pattern(4, y, x, S, f));
          else if (y / S < 5) image[f][y][x] = byte'(pattern(8, y, x, S, f));
          else begin
            k = ((y / S) * NTX + x / S + f * 3) % 10;
            image[f][y][x] = byte'(pattern(k, y % S, x % S, S, f));
          end
        end
      for (int ty = 0; ty < NTY; ty++)
        for (int tx = 0; tx < NTX; tx++) begin
          y0 = ty * S - OV;
          x0 = tx * S - OV;
          if (y0 < 0 || x0 < 0 || y0 + BLK > IMG_H || x0 + BLK > IMG_W) border_blocks++;
          for (int r = 0; r < BLK; r++)
            for (int c = 0; c < BLK; c++)
              img[r][c] = int'(image[f][clampv(y0 + r, IMG_H)][clampv(x0 + c, IMG_W)]);
          run_all(BLK, 8, 100, 900);
          cls_seen[blk_cls]++;
          for (int r = OV; r < OV + S; r++)
            for (int c = OV; c < OV + S; c++)
              if (y0 + r < IMG_H && x0 + c < IMG_W) exp_edge[f][y0 + r][x0 + c] = edge_map[r][c] != 0;
        end
    end
  end

  always @(negedge clk) begin
    if (!rst && $countones(dut.u_array.engine_busy) > max_parallel)
      max_parallel = $countones(dut.u_array.engine_busy);
  end
  always @(posedge clk) begin
    if (!rst && dut.u_array.in_valid && dut.u_array.in_ready && dut.u_array.wr_cnt == '1
        && dut.u_array.wr_sel == '1) wraps++;
  end

  // pixel source
  initial begin
    int f, y, x;
    in_valid = 0;
    in_pixel = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    f = 0;
    y = 0;
    x = 0;
    while (f < NF) begin
      @(negedge clk);
      in_valid = ($urandom % 32 != 0);
      in_pixel = pix_t'(image[f][y][x]);
      #1;
      if (in_valid && !in_ready) backpressure++;
      if (in_valid && in_ready) begin
        if (t_first_in < 0) t_first_in = cycle;
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

  // edge image sink
  initial begin
    int f, y, x;
    f = 0;
    y = 0;
    x = 0;
    out_ready = 0;
    wait (!rst);
    while (f < NF) begin
      @(negedge clk);
      out_ready = ($urandom % 5 != 0);
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        if (t_first_out < 0) t_first_out = cycle;
        check(edge_flag == exp_edge[f][y][x],
              $sformatf("frame %0d pixel (%0d,%0d) edge %0d expected %0d", f, y, x, edge_flag, exp_edge[f][y][x]));
        check(frame_done == (y == IMG_H - 1 && x == IMG_W - 1), "frame_done flag");
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
    check(max_parallel >= 2, "engines never worked in parallel");
    check(wraps > 0, "dispatcher never wrapped to engine 0");
    check(border_blocks > 0, "no block reached past the image border");
    check(stalls > 0, "output stall never happened");
    check(edges_seen > 0, "no edge pixel seen");
    for (int k = 0; k < 5; k++) check(cls_seen[k] > 0, $sformatf("no block of class %0d", k));
    $display("blocks per frame %0d, engines busy at once %0d, wraps %0d, border blocks %0d",
             NTX * NTY, max_parallel, wraps, border_blocks);
    $display("input back-pressure clocks %0d, output stalls %0d, edge pixels %0d", backpressure, stalls, edges_seen);
    $display("blocks per class: %0d %0d %0d %0d %0d", cls_seen[0], cls_seen[1], cls_seen[2], cls_seen[3], cls_seen[4]);
    $display("clocks from first pixel in to first edge flag out: %0d, to end: %0d",
             t_first_out - t_first_in, cycle - t_first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
