// adaptive_threshold: high and low hysteresis thresholds of one block.
//
// Works in two passes over the block's gradient magnitudes and one
// decision step:
//  1. mm_valid/mm_mag: the minimum and maximum magnitude are tracked.
//  2. cnt_valid/cnt_mag: NL reconstruction levels of a non-uniform
//     quantizer, R1 = (min+max)/2 and R(i+1) = (min+Ri)/2, are formed with
//     shifters and adders (in integers Ri = min + ((max-min) >> i)), and one
//     comparator and counter per level counts the pixels with magnitude
//     <= Ri. This is the discrete cumulative distribution at the levels.
//  3. compute: P1 (from the block class and the block size) times N gives
//     the number of pixels that should be strong edges. The level whose
//     count of pixels above it is closest to that number is selected (ties
//     go to the higher level), TH = Ri of that level and TL = 40% of TH,
//     rounded down. A smooth block (P1 = 0) gets TH = max, so no pixel is
//     above it and the block has no edges.
// done pulses two clocks after compute, with th, tl and level valid until
// the next compute. Reading "closest" as closest in the number of pixels
// above the level, NL = 8 levels and the smooth-block rule are this
// design's own choices.
module adaptive_threshold
  import canny_pkg::*;
#(
  parameter int unsigned BLK = 64,
  parameter int unsigned NL  = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       mm_valid,
  input  mag_t       mm_mag,
  input  logic       cnt_valid,
  input  mag_t       cnt_mag,
  input  blk_class_e blk_cls,
  input  logic       compute,
  output logic       done,
  output mag_t       th,
  output mag_t       tl,
  output logic [$clog2(NL+1)-1:0] level,
  output mag_t       mag_min,
  output mag_t       mag_max
);
  localparam int unsigned N   = BLK * BLK;
  localparam int unsigned C_W = $clog2(N + 1);
  localparam int unsigned L_W = $clog2(NL + 1);

  mag_t           rl  [NL];   // reconstruction levels R1..RNL
  logic [C_W-1:0] cnt [NL];   // pixels with magnitude <= Ri

  always_comb begin
    for (int i = 0; i < NL; i++)
      rl[i] = mag_min + ((mag_max - mag_min) >> (i + 1));
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      mag_min <= '1;
      mag_max <= '0;
      for (int i = 0; i < NL; i++) cnt[i] <= '0;
    end else begin
      if (mm_valid) begin
        if (mm_mag < mag_min) mag_min <= mm_mag;
        if (mm_mag > mag_max) mag_max <= mm_mag;
      end
      if (cnt_valid) begin
        for (int i = 0; i < NL; i++)
          if (cnt_mag <= rl[i]) cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  // decision: target number of strong pixels and closest level
  logic [C_W+15:0] p1n;
  logic [C_W-1:0]  target;
  logic [C_W-1:0]  above, diff, best_diff;
  logic [$clog2(NL)-1:0] best;
  always_comb begin
    p1n       = (C_W+16)'(p1_q16(int'(BLK), blk_cls)) * (C_W+16)'(N);
    target    = C_W'((p1n + (C_W+16)'(32768)) >> 16);
    best      = '0;
    best_diff = '1;
    above     = '0;
    diff      = '0;
    for (int i = 0; i < NL; i++) begin
      above = C_W'(N) - cnt[i];
      diff  = (above >= target) ? above - target : target - above;
      if (diff < best_diff) begin
        best_diff = diff;
        best      = ($clog2(NL))'(i);
      end
    end
  end

  logic stage;
  always_ff @(posedge clk) begin
    if (rst) begin
      stage <= 1'b0;
      done  <= 1'b0;
      th    <= '0;
      tl    <= '0;
      level <= '0;
    end else begin
      stage <= compute;
      done  <= stage;
      if (compute) begin
        if (blk_cls == BLK_SMOOTH) begin
          th    <= mag_max;
          level <= '0;
        end else begin
          th    <= rl[best];
          level <= L_W'(best) + 1'b1;
        end
      end
      if (stage) tl <= mag_t'((12'(th) * 12'd2) / 12'd5);
    end
  end
endmodule
