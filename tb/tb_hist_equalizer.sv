// tb_hist_equalizer: equalizes 16x16 blocks of different content (noise,
// ramp, disc, constant, two-level) with random input gaps and output
// stalls, compares every pixel with the reference mapping, and checks the
// latency from the last input pixel to the first output pixel.
`timescale 1ns/1ps
module tb_hist_equalizer;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int BLK   = 16;
  localparam int N     = BLK * BLK;
  localparam int NB    = 6;
  localparam int NUM_W = $clog2(N + 1) + 8;
  // CDF pass, one division per bin, then the first output
  localparam int LAT   = 256 + 256 * (NUM_W + 3) + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  pix_t in_pixel, out_pixel;
  hist_equalizer #(.BLK(BLK)) dut (.clk, .rst, .in_valid, .in_ready, .in_pixel,
                                   .out_valid, .out_ready, .out_pixel, .out_last);

  int checks = 0, failures = 0;
  int kinds [NB] = '{0, 1, 2, 4, 5, 0};
  int pix [NB][N], exp_pix [NB][N];
  longint cycle = 0, t_in [NB], t_out [NB] = '{default: 0};
  int stalls = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int b = 0; b < NB; b++) begin
      make_image(BLK, kinds[b], b);
      equalize(BLK);
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          pix[b][r*BLK+c]     = img[r][c];
          exp_pix[b][r*BLK+c] = eqp[r][c];
        end
    end
  end

  initial begin
    int b, i;
    in_valid = 0;
    in_pixel = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    b = 0;
    i = 0;
    while (b < NB) begin
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      in_pixel = pix_t'(pix[b][i]);
      #1;
      if (in_valid && in_ready) begin
        if (i == N - 1) t_in[b] = cycle;
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

  initial begin
    int b, i;
    b = 0;
    i = 0;
    out_ready = 0;
    wait (!rst);
    while (b < NB) begin
      @(negedge clk);
      out_ready = ($urandom % 3 != 0);
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && i == 0 && t_out[b] == 0) t_out[b] = cycle;
      if (out_valid && out_ready) begin
        checks++;
        if (int'(out_pixel) != exp_pix[b][i]) begin
          failures++;
          if (failures < 10) $display("FAIL: block %0d pixel %0d: %0d expected %0d", b, i, out_pixel, exp_pix[b][i]);
        end
        checks++;
        if (out_last != (i == N - 1)) failures++;
        i++;
        if (i == N) begin
          i = 0;
          b++;
        end
      end
    end
    for (int k = 0; k < NB; k++) begin
      checks++;
      if (t_out[k] - t_in[k] != LAT) begin
        failures++;
        $display("FAIL: block %0d latency %0d expected %0d", k, t_out[k] - t_in[k], LAT);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
