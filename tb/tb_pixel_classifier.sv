// tb_pixel_classifier: 3x3 windows of low, medium and high variance,
// including windows exactly on the two thresholds, against a real-valued
// evaluation of var = (1/8) * sum (x - mean)^2.
`timescale 1ns/1ps
module tb_pixel_classifier;
  import canny_pkg::*;

  pix_t       win [3][3];
  pix_class_e cls;
  pixel_classifier dut (.win, .cls);

  int checks = 0, failures = 0;
  int seen [3];

  task automatic run_one();
    real mean, v;
    int e;
    mean = 0.0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) mean += real'(win[i][j]);
    mean /= 9.0;
    v = 0.0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) v += (real'(win[i][j]) - mean) ** 2;
    v /= 8.0;
    // compare with a small margin: exact ties are rounding noise in real
    e = (v <= 100.0 + 1e-6) ? 0 : (v <= 900.0 + 1e-6) ? 1 : 2;
    #1;
    checks++;
    seen[e]++;
    if (int'(cls) != e) begin
      failures++;
      if (failures < 10) $display("FAIL: var %f class %0d expected %0d", v, cls, e);
    end
  endtask

  initial begin
    int amp;
    for (int t = 0; t < 6000; t++) begin
      amp = (t % 3 == 0) ? 20 : (t % 3 == 1) ? 70 : 256;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) win[i][j] = pix_t'(($urandom % amp) + ((amp < 256) ? 50 : 0));
      run_one();
    end
    // exactly var = 100: eight pixels at a, one at a + d with d^2 * 8/9 / 8 = 100 -> d = 30
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[i][j] = 8'd40;
    win[1][1] = 8'd70;
    run_one();
    checks++;
    if (cls != PIX_UNIFORM) failures++;
    // exactly var = 900: d = 90
    win[1][1] = 8'd130;
    run_one();
    checks++;
    if (cls != PIX_TEXTURE) failures++;
    win[1][1] = 8'd131;
    run_one();
    checks++;
    if (cls != PIX_EDGE) failures++;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: class %0d never produced", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
