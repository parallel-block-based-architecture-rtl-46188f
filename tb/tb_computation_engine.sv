// tb_computation_engine: self-checking test of one computation engine.
//
// Sends a sequence of 16x16 blocks of different content (noise, ramp,
// disc, stripes, constant) back to back, with random gaps on the input and
// random stalls on the output, and compares the edge map, the block class
// and both thresholds of every block with the reference model. It also
// checks the latency from the last input pixel to the first edge bit
// against its formula, which depends on the block size only, and that
// each of the five block classes and an output stall occurred.
`timescale 1ns/1ps
module tb_computation_engine;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int BLK = 16;
  localparam int N   = BLK * BLK;
  localparam int NB  = 10;
  localparam int NUM_W = $clog2(N + 1) + 8;
  localparam int LAT = 256 + 256 * (NUM_W + 3) + N + 2 * BLK * (BLK + 2) + 17;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_edge, out_last, busy;
  pix_t in_pixel;
  blk_class_e out_blk_cls;
  mag_t out_th, out_tl;

  computation_engine #(.BLK(BLK)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid, .out_ready, .out_edge, .out_last,
    .out_blk_cls, .out_th, .out_tl, .busy
  );

  int checks = 0, failures = 0;
  int blk_pix [NB][N];
  int exp_edge [NB][N];
  int exp_cls [NB], exp_th [NB], exp_tl [NB];
  int kinds [NB] = '{0, 1, 2, 3, 4, 5, 6, 7, 1, 0};
  int cls_seen [5];
  longint t_last_in [NB], t_first_out [NB];
  longint cycle = 0;
  int stalls = 0, edges_seen = 0;

  always @(posedge clk) cycle <= cycle + 1;

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
          exp_edge[b][r*BLK+c] = edge_map[r][c];
        end
      exp_cls[b] = blk_cls;
      exp_th[b]  = th;
      exp_tl[b]  = tl;
    end
  end

  // input driver: signals change on the falling edge, a transfer happens
  // on the rising edge when in_valid and in_ready are both high
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
      in_valid = ($urandom % 8 != 0);
      in_pixel = pix_t'(blk_pix[b][i]);
      #1;
      if (in_valid && in_ready) begin
        if (i == N - 1) t_last_in[b] = cycle;
        i++;
        if (i == N) begin
          i = 0;
          b++;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // output monitor
  initial begin
    int b, i;
    b = 0;
    i = 0;
    out_ready = 0;
    wait (!rst);
    while (b < NB) begin
      @(negedge clk);
      out_ready = (b % 2 == 1) ? ($urandom % 4 != 0) : 1'b1;
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        if (i == 0) begin
          t_first_out[b] = cycle;
          check(out_blk_cls == blk_class_e'(exp_cls[b]),
                $sformatf("block %0d class %0d expected %0d", b, out_blk_cls, exp_cls[b]));
          check(int'(out_th) == exp_th[b], $sformatf("block %0d TH %0d expected %0d", b, out_th, exp_th[b]));
          check(int'(out_tl) == exp_tl[b], $sformatf("block %0d TL %0d expected %0d", b, out_tl, exp_tl[b]));
          cls_seen[exp_cls[b]]++;
        end
        check(int'(out_edge) == exp_edge[b][i],
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
    // latency of a block that finds the engine idle: CDF pass, one
    // division per histogram bin, equalized output, two window passes and
    // a fixed pipeline overhead; later blocks may wait for the engine
    check(t_first_out[0] - t_last_in[0] == LAT,
          $sformatf("block 0 latency %0d expected %0d", t_first_out[0] - t_last_in[0], LAT));
    for (int k = 1; k < NB; k++)
      check(t_first_out[k] - t_last_in[k] >= LAT,
            $sformatf("block %0d latency %0d below %0d", k, t_first_out[k] - t_last_in[k], LAT));
    for (int k = 0; k < 5; k++) check(cls_seen[k] > 0, $sformatf("block class %0d never seen", k));
    check(stalls > 0, "output stall never happened");
    check(edges_seen > 0, "no edge pixel seen");
    $display("latency of block 0: %0d clocks, edge pixels %0d, stalls %0d",
             t_first_out[0] - t_last_in[0], edges_seen, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
