// hist_equalizer: per-block histogram equalization (contrast boost).
//
// The unit takes one block of N = BLK*BLK 8-bit pixels in raster order,
// builds its 256-bin histogram while storing the pixels, accumulates the
// cumulative distribution cdf(n), and turns it into a mapping table
//   H(n) = floor((cdf(n) - cdf_min) * 255 / (N - cdf_min)),
// with cdf_min the smallest non-zero cdf value, as in the equalization
// formula of the design. It then streams the block out again with every
// pixel replaced by H(pixel).
//
// Phases: LOAD (N accepted pixels, in_ready high), CDF (256 clocks, which
// also clear the histogram for the next block), MAP (one sequential
// division per bin, NUM_W + 3 clocks each whatever the content, with
// NUM_W = clog2(N+1) + 8), OUT (N pixels, advancing on out_ready). The
// first equalized pixel appears 256*(NUM_W+4) + 1 clocks after the last
// input pixel was taken. A new block is accepted only after the previous one has
// been sent out. A block of one grey level (N - cdf_min = 0) leaves the
// pixels unchanged; bins below the darkest pixel map to 0. Rounding down,
// the sequential divider and these two special cases are this design's
// own choices.
module hist_equalizer
  import canny_pkg::*;
#(
  parameter int unsigned BLK = 64
) (
  input  logic clk,
  input  logic rst,
  // input block stream
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pixel,
  // equalized block stream
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pixel,
  output logic out_last
);
  localparam int unsigned N     = BLK * BLK;
  localparam int unsigned A_W   = $clog2(N);
  localparam int unsigned C_W   = $clog2(N + 1);
  localparam int unsigned NUM_W = C_W + 8;

  typedef enum logic [2:0] {S_LOAD, S_CDF, S_MAP, S_WAIT, S_OUT} state_e;
  state_e state;

  pix_t           buffer [N];
  logic [C_W-1:0] hist   [256];
  logic [C_W-1:0] cdf    [256];
  pix_t           lut    [256];

  logic [A_W-1:0] addr;
  logic [7:0]     bin;
  logic [C_W-1:0] cdf_acc;
  logic [C_W-1:0] cdf_min;
  logic           min_found;

  // divider for the mapping formula
  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_num, div_quot;
  logic [C_W-1:0]   div_den, div_rem;

  seq_divider #(.NUM_W(NUM_W), .DEN_W(C_W)) u_div (
    .clk, .rst,
    .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_quot), .rem(div_rem)
  );

  logic [C_W-1:0] cdf_new;
  logic [C_W-1:0] span;
  assign cdf_new = cdf_acc + hist[bin];
  assign span    = C_W'(N) - cdf_min;
  assign div_num = (cdf[bin] > cdf_min) ? NUM_W'(cdf[bin] - cdf_min) * NUM_W'(255) : '0;
  assign div_den = span;

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_pixel = lut[buffer[addr]];
  assign out_last  = (state == S_OUT) && (addr == A_W'(N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_LOAD;
      addr      <= '0;
      bin       <= '0;
      cdf_acc   <= '0;
      cdf_min   <= '0;
      min_found <= 1'b0;
      div_start <= 1'b0;
      for (int i = 0; i < 256; i++) hist[i] <= '0;
    end else begin
      div_start <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          buffer[addr]   <= in_pixel;
          hist[in_pixel] <= hist[in_pixel] + 1'b1;
          addr           <= addr + 1'b1;
          if (addr == A_W'(N - 1)) begin
            state     <= S_CDF;
            addr      <= '0;
            bin       <= '0;
            cdf_acc   <= '0;
            min_found <= 1'b0;
          end
        end
        S_CDF: begin
          cdf[bin]  <= cdf_new;
          cdf_acc   <= cdf_new;
          hist[bin] <= '0;
          if (!min_found && cdf_new != '0) begin
            min_found <= 1'b1;
            cdf_min   <= cdf_new;
          end
          bin <= bin + 1'b1;
          if (bin == 8'd255) state <= S_MAP;
        end
        S_MAP: begin
          // bin wrapped to 0 on entry; every bin takes one division so the
          // mapping time does not depend on the block's content
          div_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (div_done) begin
          if (span == '0)              lut[bin] <= bin;
          else if (cdf[bin] <= cdf_min) lut[bin] <= '0;
          else                         lut[bin] <= pix_t'(div_quot);
          bin   <= bin + 1'b1;
          state <= (bin == 8'd255) ? S_OUT : S_MAP;
        end
        S_OUT: if (out_ready) begin
          addr <= addr + 1'b1;
          if (addr == A_W'(N - 1)) begin
            state <= S_LOAD;
            addr  <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The mapped value never exceeds 255 because cdf(n) - cdf_min <= N - cdf_min.
  a_map_range: assert property (@(posedge clk) disable iff (rst)
    (state == S_WAIT && div_done && span != '0) |-> div_quot <= NUM_W'(255));

endmodule
