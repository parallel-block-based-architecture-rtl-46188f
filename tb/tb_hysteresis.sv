// tb_hysteresis: random windows of suppressed magnitudes around the two
// thresholds; checks the edge bit and the strong/weak flags.
`timescale 1ns/1ps
module tb_hysteresis;
  import canny_pkg::*;

  mag_t win [3][3];
  mag_t th, tl;
  logic edge_out, f1_strong, f2_weak;
  hysteresis dut (.win, .th, .tl, .edge_out, .f1_strong, .f2_weak);

  int checks = 0, failures = 0;
  int n_strong = 0, n_linked = 0, n_dropped = 0;

  initial begin
    int t_h, t_l, ctr, es, ew, ee;
    bit nb;
    for (int t = 0; t < 5000; t++) begin
      t_h = 100 + $urandom % 400;
      t_l = t_h * 2 / 5;
      th = mag_t'(t_h);
      tl = mag_t'(t_l);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          win[i][j] = ($urandom % 3 == 0) ? mag_t'(0) : mag_t'($urandom % (2 * t_h));
      if (t % 5 == 0) win[1][1] = mag_t'(t_h);          // exactly TH: weak
      if (t % 7 == 0) win[1][1] = mag_t'(t_l);          // exactly TL: not an edge
      #1;
      ctr = int'(win[1][1]);
      nb = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          if ((i != 1 || j != 1) && int'(win[i][j]) > t_h) nb = 1;
      es = ctr > t_h;
      ew = !es && ctr > t_l;
      ee = es || (ew && nb);
      if (es) n_strong++;
      else if (ew && nb) n_linked++;
      else if (ew) n_dropped++;
      checks += 3;
      if (int'(edge_out) != ee || int'(f1_strong) != es || int'(f2_weak) != ew) begin
        failures++;
        if (failures < 10) $display("FAIL: centre %0d th %0d tl %0d edge %0d/%0d", ctr, t_h, t_l, edge_out, ee);
      end
    end
    checks += 3;
    if (n_strong == 0 || n_linked == 0 || n_dropped == 0) failures++;
    $display("strong %0d, weak linked %0d, weak dropped %0d", n_strong, n_linked, n_dropped);
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
