// tb_block_classifier: feeds blocks of 256 pixel classes with chosen
// numbers of uniform and edge pixels, including the counts right at the
// class boundaries, and compares the block class with the table rules
// evaluated in real arithmetic.
`timescale 1ns/1ps
module tb_block_classifier;
  import canny_pkg::*;

  localparam int BLK = 16;
  localparam int N   = BLK * BLK;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear, pix_valid;
  pix_class_e pix_cls;
  logic [$clog2(N+1)-1:0] n_uniform, n_edge;
  blk_class_e blk_cls;
  block_classifier #(.BLK(BLK)) dut (.clk, .rst, .clear, .pix_valid, .pix_cls,
                                     .n_uniform, .n_edge, .blk_cls);

  int checks = 0, failures = 0;
  int seen [5];

  function automatic int expected(int nu, int ne);
    real t;
    t = real'(N);
    if (ne == 0) return (real'(nu) >= 307.0 * t / 1024.0) ? 0 : 1;
    if (real'(ne) < 307.0 * t / 1024.0) return (real'(nu) >= 665.0 * (t - real'(ne)) / 1024.0) ? 3 : 2;
    return 4;
  endfunction

  task automatic run_block(int nu, int ne);
    int order [N];
    int k, e;
    for (int i = 0; i < N; i++) order[i] = (i < nu) ? 0 : (i < nu + ne) ? 2 : 1;
    for (int i = N - 1; i > 0; i--) begin   // shuffle
      k = $urandom % (i + 1);
      e = order[i];
      order[i] = order[k];
      order[k] = e;
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < N; i++) begin
      pix_valid = ($urandom % 4 != 0);
      pix_cls = pix_class_e'(order[i]);
      if (!pix_valid) i--;
      @(negedge clk);
    end
    pix_valid = 0;
    #1;
    e = expected(nu, ne);
    seen[e]++;
    checks += 3;
    if (int'(blk_cls) != e || int'(n_uniform) != nu || int'(n_edge) != ne) begin
      failures++;
      if (failures < 10) $display("FAIL: nu %0d ne %0d class %0d expected %0d", nu, ne, blk_cls, e);
    end
  endtask

  initial begin
    int nu, ne;
    clear = 0;
    pix_valid = 0;
    pix_cls = PIX_UNIFORM;
    repeat (3) @(negedge clk);
    rst = 0;
    // boundaries for N = 256: 307N/1024 = 76.75, 665(N-ne)/1024
    run_block(76, 0);
    run_block(77, 0);
    run_block(0, 76);
    run_block(0, 77);
    run_block(130, 10);   // 665*246/1024 = 159.75
    run_block(159, 10);
    run_block(160, 10);
    run_block(179, 77);
    for (int t = 0; t < 40; t++) begin
      ne = (t % 4 == 0) ? 0 : (t % 4 == 3) ? 77 + $urandom % 100 : $urandom % 77;
      nu = $urandom % (N - ne + 1);
      run_block(nu, ne);
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
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
