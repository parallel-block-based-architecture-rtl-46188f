// tb_adaptive_threshold: runs the two passes and the decision of the
// threshold unit on 16x16 blocks of gradient magnitudes (random, from test
// images, and constant) for every block class, and compares TH and TL
// with the reference model. Also checks that done follows compute by two
// clocks.
`timescale 1ns/1ps
module tb_adaptive_threshold;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int BLK = 16;
  localparam int N   = BLK * BLK;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear, mm_valid, cnt_valid, compute, done;
  mag_t mm_mag, cnt_mag, th_o, tl_o, mag_min, mag_max;
  blk_class_e cls_i;
  logic [3:0] level;
  adaptive_threshold #(.BLK(BLK)) dut (
    .clk, .rst, .clear, .mm_valid, .mm_mag, .cnt_valid, .cnt_mag,
    .blk_cls(cls_i), .compute, .done, .th(th_o), .tl(tl_o), .level,
    .mag_min, .mag_max);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(int src, int cls);
    int wait_cl;
    if (src == 0) begin
      for (int r = 0; r < BLK; r++) for (int c = 0; c < BLK; c++) mag[r][c] = $urandom % 2041;
    end else if (src == 1) begin
      for (int r = 0; r < BLK; r++) for (int c = 0; c < BLK; c++) mag[r][c] = ($urandom % 4 == 0) ? $urandom % 900 : $urandom % 60;
    end else if (src == 2) begin
      make_image(BLK, 2, 0);
      equalize(BLK);
      gradient(BLK);
    end else begin
      for (int r = 0; r < BLK; r++) for (int c = 0; c < BLK; c++) mag[r][c] = 77;
    end
    blk_cls = cls;
    thresholds(BLK, 8);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < N; i++) begin
        mm_valid  = (pass == 0);
        cnt_valid = (pass == 1);
        mm_mag    = mag_t'(mag[i / BLK][i % BLK]);
        cnt_mag   = mag_t'(mag[i / BLK][i % BLK]);
        @(negedge clk);
      end
    mm_valid = 0;
    cnt_valid = 0;
    cls_i = blk_class_e'(cls);
    compute = 1;
    @(negedge clk);
    compute = 0;
    wait_cl = 1;
    while (!done && wait_cl < 10) begin
      @(negedge clk);
      wait_cl++;
    end
    check(wait_cl == 2, $sformatf("done after %0d clocks", wait_cl));
    check(int'(mag_min) == mmin && int'(mag_max) == mmax, "min/max");
    check(int'(th_o) == th, $sformatf("src %0d class %0d TH %0d expected %0d", src, cls, th_o, th));
    check(int'(tl_o) == tl, $sformatf("src %0d class %0d TL %0d expected %0d", src, cls, tl_o, tl));
  endtask

  initial begin
    clear = 0;
    mm_valid = 0;
    cnt_valid = 0;
    compute = 0;
    mm_mag = '0;
    cnt_mag = '0;
    cls_i = BLK_SMOOTH;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int src = 0; src < 4; src++)
      for (int cls = 0; cls < 5; cls++)
        for (int rep = 0; rep < 3; rep++) run_block(src, cls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
