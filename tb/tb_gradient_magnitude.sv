// tb_gradient_magnitude: random and extreme 3x3 windows against a
// mask-table Sobel computation.
`timescale 1ns/1ps
module tb_gradient_magnitude;
  import canny_pkg::*;

  pix_t  win [3][3];
  grad_t gx, gy;
  mag_t  mag;
  gradient_magnitude dut (.win, .gx, .gy, .mag);

  int checks = 0, failures = 0;
  int kx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int ky [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  initial begin
    int ex, ey, em;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          case (t % 4)
            0: win[i][j] = pix_t'($urandom);
            1: win[i][j] = (j == 2 || i == 2) ? 8'd255 : 8'd0;   // extreme positive
            2: win[i][j] = (j == 0 || i == 0) ? 8'd255 : 8'd0;   // extreme negative
            default: win[i][j] = pix_t'(100 + $urandom % 5);
          endcase
        end
      #1;
      ex = 0;
      ey = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          ex += kx[i][j] * int'(win[i][j]);
          ey += ky[i][j] * int'(win[i][j]);
        end
      em = (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey);
      checks += 3;
      if (int'(gx) != ex || int'(gy) != ey || int'(mag) != em) begin
        failures++;
        if (failures < 10) $display("FAIL: gx %0d/%0d gy %0d/%0d mag %0d/%0d", gx, ex, gy, ey, mag, em);
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
