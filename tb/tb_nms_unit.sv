// tb_nms_unit: random magnitude windows and gradient directions in all
// octants, plus ridges and ties, against a real-valued interpolation of
// the two magnitudes along the gradient direction.
`timescale 1ns/1ps
module tb_nms_unit;
  import canny_pkg::*;

  mag_t  win [3][3];
  grad_t gx, gy;
  mag_t  mag_out;
  nms_unit dut (.win, .gx, .gy, .mag_out);

  int checks = 0, failures = 0;
  int kept = 0, suppressed = 0;

  function automatic real at(int r, int c);
    return real'(win[r][c]);
  endfunction

  initial begin
    int x, y, sx, sy, e;
    real ax, ay, w, f, b, m;
    for (int t = 0; t < 8000; t++) begin
      x = int'($urandom % 2001) - 1000;
      y = int'($urandom % 2001) - 1000;
      if (t % 8 == 1) y = 0;
      if (t % 8 == 2) x = 0;
      if (t % 8 == 3) y = x;
      if (t % 8 == 4) y = -x;
      if (x == 0 && y == 0) x = 1;   // a non-zero magnitude has a direction
      gx = grad_t'(x);
      gy = grad_t'(y);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) win[i][j] = mag_t'($urandom % 2000);
      if (t % 3 == 0) win[1][1] = mag_t'(1500 + $urandom % 540);   // likely a ridge
      if (t % 11 == 0) for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[i][j] = 11'd300; // ties
      if (t % 13 == 0) win[1][1] = '0;
      #1;
      m  = at(1, 1);
      ax = (x < 0) ? -x : x;
      ay = (y < 0) ? -y : y;
      sx = (x < 0) ? -1 : 1;
      sy = (y < 0) ? -1 : 1;
      if (ax >= ay) begin
        w = (ax == 0.0) ? 0.0 : ay / ax;
        f = (1.0 - w) * at(1, 1 + sx) + w * at(1 + sy, 1 + sx);
        b = (1.0 - w) * at(1, 1 - sx) + w * at(1 - sy, 1 - sx);
      end else begin
        w = ax / ay;
        f = (1.0 - w) * at(1 + sy, 1) + w * at(1 + sy, 1 + sx);
        b = (1.0 - w) * at(1 - sy, 1) + w * at(1 - sy, 1 - sx);
      end
      e = (m > 0.0 && m >= f - 1e-7 && m >= b - 1e-7) ? int'(win[1][1]) : 0;
      if (e != 0) kept++;
      else suppressed++;
      checks++;
      if (int'(mag_out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: gx %0d gy %0d centre %0d out %0d expected %0d", x, y, win[1][1], mag_out, e);
      end
    end
    checks += 2;
    if (kept == 0) failures++;
    if (suppressed == 0) failures++;
    $display("kept %0d suppressed %0d", kept, suppressed);
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
