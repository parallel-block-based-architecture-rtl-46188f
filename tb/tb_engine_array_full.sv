// tb_engine_array_full: test of the parallel engine array.
//
// Runs the design with every parameter at its default (64x64 blocks,
// four engines) on ten blocks.
// Blocks of different content are sent back to back through the single
// pixel input; the edge maps, block classes and thresholds that come out
// are compared, in order, with the reference model. The test counts how
// often each mechanism of the design happened and fails if one never did:
// several engines busy at once, the round-robin dispatcher wrapping back
// to engine 0, input back-pressure (all engines busy), an output stall,
// and each of the five block classes.
`timescale 1ns/1ps
module tb_engine_array_full;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int BLK = 64;
  localparam int N   = BLK * BLK;
  localparam int NB  = 10;
  localparam int NE  = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_edge, out_last;
  pix_t in_pixel;
  blk_class_e out_blk_cls;
  mag_t out_th, out_tl;
  logic [NE-1:0] engine_busy;

  engine_array dut (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid, .out_ready, .out_edge, .out_last,
    .out_blk_cls, .out_th, .out_tl, .engine_busy
  );

  int checks = 0, failures = 0;
  int blk_pix [NB][N];
  byte exp_edge [NB][N];
  int exp_cls [NB], exp_th [NB], exp_tl [NB];
  int kinds [NB] = '{0, 8, 9, 5, 4, 2, 1, 3, 7, 6};
  int cls_seen [5];
  int stalls = 0, backpressure = 0, max_parallel = 0, wraps = 0, edges_seen = 0;
  int blocks_in = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      make_image(BLK, kinds[b], b);
      run_all(BLK, 8, 100, 900);
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          blk_pix[b][r*BLK+c]  = img[r][c];
          exp_edge[b][r*BLK+c] = byte'(edge_map[r][c]);
        end
      exp_cls[b] = blk_cls;
      exp_th[b]  = th;
      exp_tl[b]  = tl;
    end
  end

  // parallelism monitor
  always @(negedge clk) begin
    if (!rst) begin
      if ($countones(engine_busy) > max_parallel) max_parallel = $countones(engine_busy);
    end
  end

  // input driver (changes on the falling edge)
  initial begin
    int b, i;
    in_valid = 0;
    in_pixel = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    b = 0;
    i = 0;
    while (b < NB) begin
      @(negedge clk);
      in_valid = ($urandom % 64 != 0);
      in_pixel = pix_t'(blk_pix[b][i]);
      #1;
      if (in_valid && !in_ready) backpressure++;
      if (in_valid && in_ready) begin
        i++;
        if (i == N) begin
          i = 0;
          b++;
          blocks_in = b;
          if (b % NE == 0) wraps++;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // output monitor
  initial begin
    int b, i, hold;
    b = 0;
    i = 0;
    hold = 20 * N;   // hold the output off at first so that the engines fill up
    out_ready = 0;
    wait (!rst);
    while (b < NB) begin
      @(negedge clk);
      out_ready = (b % 3 == 1) ? ($urandom % 4 != 0) : 1'b1;
      if (hold > 0) begin
        out_ready = 1'b0;
        hold--;
      end
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        if (i == 0) begin
          check(out_blk_cls == blk_class_e'(exp_cls[b]),
                $sformatf("block %0d class %0d expected %0d", b, out_blk_cls, exp_cls[b]));
          check(int'(out_th) == exp_th[b], $sformatf("block %0d TH %0d expected %0d", b, out_th, exp_th[b]));
          check(int'(out_tl) == exp_tl[b], $sformatf("block %0d TL %0d expected %0d", b, out_tl, exp_tl[b]));
          cls_seen[exp_cls[b]]++;
        end
        check(byte'(out_edge) == exp_edge[b][i],
              $sformatf("block %0d pixel %0d edge %0d expected %0d", b, i, out_edge, exp_edge[b][i]));
        edges_seen += int'(out_edge);
        check(out_last == (i == N - 1), $sformatf("block %0d pixel %0d last flag", b, i));
        i++;
        if (i == N) begin
          i = 0;
          b++;
        end
      end
    end
    check(max_parallel >= 2, "engines never worked in parallel");
    check(wraps > 0, "dispatcher never wrapped to engine 0");
    check(backpressure > 0, "input back-pressure never happened");
    check(stalls > 0, "output stall never happened");
    check(edges_seen > 0, "no edge pixel seen");
    for (int k = 0; k < 5; k++) check(cls_seen[k] > 0, $sformatf("block class %0d never seen", k));
    $display("engines busy at once: %0d, wraps %0d, back-pressure clocks %0d, stalls %0d, edge pixels %0d",
             max_parallel, wraps, backpressure, stalls, edges_seen);
    $display("blocks per class: %0d %0d %0d %0d %0d", cls_seen[0], cls_seen[1], cls_seen[2],
             cls_seen[3], cls_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
