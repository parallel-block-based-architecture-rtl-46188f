// tb_workload_sizes: runs the edge detector, at the default 64x64 blocks
// and four engines, on the other image sizes it is used with: a 256x256
// frame (25 blocks) and a 32x32 frame (a single block, border repeated),
// each in its own instance built for that frame size. The 512x512 size is
// covered by tb_edge_detector_full. Every edge flag is checked against
// the reference model.
`timescale 1ns/1ps
module tb_workload_sizes;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int checks_a, failures_a, edges_a, checks_b, failures_b, edges_b;
  int checks, failures;

  image_run #(.IMG_W(256), .IMG_H(256), .NF(1), .SEED(0)) u_256 (
    .clk, .rst, .done(done_a), .checks(checks_a), .failures(failures_a), .edges_seen(edges_a));
  image_run #(.IMG_W(32), .IMG_H(32), .NF(2), .SEED(1)) u_32 (
    .clk, .rst, .done(done_b), .checks(checks_b), .failures(failures_b), .edges_seen(edges_b));

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    wait (done_a && done_b);
    checks = checks_a + checks_b + 2;
    failures = failures_a + failures_b + ((edges_a == 0) ? 1 : 0) + ((edges_b == 0) ? 1 : 0);
    $display("256x256: %0d checks, %0d edge pixels; 32x32: %0d checks, %0d edge pixels",
             checks_a, edges_a, checks_b, edges_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end
endmodule
