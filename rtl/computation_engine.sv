// computation_engine: edge detection of one m x m image block.
//
// The engine chains the six units of the block-based detector:
// histogram equalization, block classification (pixel and block stage),
// gradient and magnitude, directional non-maximum suppression, adaptive
// threshold calculation and hysteresis thresholding. A block is taken in
// raster order on the input stream; its binary edge map leaves in raster
// order on the output stream, together with the block class and the two
// thresholds that were used for it.
//
// Passes over the block (N = BLK*BLK pixels, one per clock):
//   EQ    equalized pixels from hist_equalizer are written to the pixel
//         buffer (the equalizer itself loads N pixels, then needs about
//         256 + 23*256 clocks to build its mapping).
//   GRAD  3x3 windows of equalized pixels feed the gradient unit and the
//         pixel classifier in parallel; Gx, Gy and |Gx|+|Gy| are stored,
//         uniform and edge pixels are counted, min and max magnitude
//         are tracked.
//   NMS   3x3 windows of magnitudes feed non-maximum suppression; the same
//         centre magnitudes feed the level counters of the threshold unit.
//   THR   the threshold unit turns block class and counts into TH and TL.
//   HYST  3x3 windows of suppressed magnitudes give the edge bits.
// Each window pass takes BLK*(BLK+2)+2 clocks. The equalizer loads the
// next block while the later passes run, so the engine overlaps two
// blocks. The output stream stalls on out_ready; the input stream is
// held off with in_ready. Latency and rate are thus functions of the block
// size only, not of the frame size.
//
// Block borders are handled inside the block by edge replication; the
// overlap between neighbouring blocks is left to whatever cuts the image
// into blocks. The pass structure and the buffers between the units are
// this design's own choices.
module computation_engine
  import canny_pkg::*;
#(
  parameter int unsigned BLK = 64,
  parameter int unsigned NL  = 8,
  parameter int unsigned TU  = 100,
  parameter int unsigned TE  = 900
) (
  input  logic       clk,
  input  logic       rst,
  // block input
  input  logic       in_valid,
  output logic       in_ready,
  input  pix_t       in_pixel,
  // edge map output
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_edge,
  output logic       out_last,
  output blk_class_e out_blk_cls,
  output mag_t       out_th,
  output mag_t       out_tl,
  output logic       busy
);
  localparam int unsigned N    = BLK * BLK;
  localparam int unsigned A_W  = $clog2(N);
  localparam int unsigned RC_W = $clog2(BLK);
  localparam int unsigned GS_W = $bits(grad_sample_t);

  typedef enum logic [2:0] {S_EQ, S_GRAD, S_NMS, S_THR, S_HYST} state_e;
  state_e state;

  // ---------------------------------------------------------------- EQ
  logic eq_valid, eq_ready, eq_last;
  pix_t eq_pixel;
  hist_equalizer #(.BLK(BLK)) u_eq (
    .clk, .rst,
    .in_valid, .in_ready, .in_pixel,
    .out_valid(eq_valid), .out_ready(eq_ready),
    .out_pixel(eq_pixel), .out_last(eq_last)
  );
  assign eq_ready = (state == S_EQ);

  logic [A_W-1:0] eq_addr;

  // --------------------------------------------------------- pixel buffer
  logic            pix_start, pix_busy, pix_wv, pix_done;
  logic [7:0]      pix_win [3][3];
  logic [RC_W-1:0] pix_row, pix_col;
  window_buffer #(.DW(PIX_W), .BLK(BLK)) u_pix_buf (
    .clk, .rst,
    .we(eq_valid && eq_ready), .waddr(eq_addr), .wdata(eq_pixel),
    .start(pix_start), .en(1'b1), .busy(pix_busy),
    .win_valid(pix_wv), .win(pix_win), .win_row(pix_row), .win_col(pix_col),
    .done(pix_done)
  );

  pix_t pix_w [3][3];
  always_comb
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) pix_w[i][j] = pix_t'(pix_win[i][j]);

  // gradient and pixel class of the current window
  grad_t      g_x, g_y;
  mag_t       g_mag;
  pix_class_e p_cls;
  gradient_magnitude u_grad (.win(pix_w), .gx(g_x), .gy(g_y), .mag(g_mag));
  pixel_classifier #(.TU(TU), .TE(TE)) u_pcls (.win(pix_w), .cls(p_cls));

  logic         blk_clear;
  blk_class_e   b_cls;
  logic [$clog2(N+1)-1:0] n_uni, n_edg;
  block_classifier #(.BLK(BLK)) u_bcls (
    .clk, .rst, .clear(blk_clear),
    .pix_valid(pix_wv && state == S_GRAD), .pix_cls(p_cls),
    .n_uniform(n_uni), .n_edge(n_edg), .blk_cls(b_cls)
  );

  // registered write of the gradient sample
  logic         mag_we;
  logic [A_W-1:0] mag_waddr;
  grad_sample_t mag_wdata;
  always_ff @(posedge clk) begin
    if (rst) begin
      mag_we <= 1'b0;
    end else begin
      mag_we    <= pix_wv && state == S_GRAD;
      mag_waddr <= {pix_row, pix_col};
      mag_wdata <= '{gx: g_x, gy: g_y, mag: g_mag};
    end
  end

  // ------------------------------------------------------ gradient buffer
  logic            mag_start, mag_busy, mag_wv, mag_done;
  logic [GS_W-1:0] mag_win [3][3];
  logic [RC_W-1:0] mag_row, mag_col;
  window_buffer #(.DW(GS_W), .BLK(BLK)) u_mag_buf (
    .clk, .rst,
    .we(mag_we), .waddr(mag_waddr), .wdata(mag_wdata),
    .start(mag_start), .en(1'b1), .busy(mag_busy),
    .win_valid(mag_wv), .win(mag_win), .win_row(mag_row), .win_col(mag_col),
    .done(mag_done)
  );

  mag_t         m_w [3][3];
  grad_sample_t m_cell;
  grad_sample_t m_centre;
  always_comb begin
    m_cell = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        m_cell    = grad_sample_t'(mag_win[i][j]);
        m_w[i][j] = m_cell.mag;
      end
    m_centre = grad_sample_t'(mag_win[1][1]);
  end

  mag_t nms_mag;
  nms_unit u_nms (.win(m_w), .gx(m_centre.gx), .gy(m_centre.gy), .mag_out(nms_mag));

  logic           nms_we;
  logic [A_W-1:0] nms_waddr;
  mag_t           nms_wdata;
  always_ff @(posedge clk) begin
    if (rst) begin
      nms_we <= 1'b0;
    end else begin
      nms_we    <= mag_wv && state == S_NMS;
      nms_waddr <= {mag_row, mag_col};
      nms_wdata <= nms_mag;
    end
  end

  // ------------------------------------------------------ threshold unit
  logic thr_compute, thr_done;
  mag_t thr_th, thr_tl, thr_min, thr_max;
  logic [$clog2(NL+1)-1:0] thr_level;
  adaptive_threshold #(.BLK(BLK), .NL(NL)) u_thr (
    .clk, .rst, .clear(blk_clear),
    .mm_valid(pix_wv && state == S_GRAD), .mm_mag(g_mag),
    .cnt_valid(mag_wv && state == S_NMS), .cnt_mag(m_centre.mag),
    .blk_cls(b_cls), .compute(thr_compute), .done(thr_done),
    .th(thr_th), .tl(thr_tl), .level(thr_level),
    .mag_min(thr_min), .mag_max(thr_max)
  );

  // ----------------------------------------------------- NMS output buffer
  logic            nms_start, nms_busy, nms_wv, nms_done, nms_en;
  logic [MAG_W-1:0] nms_win [3][3];
  logic [RC_W-1:0] nms_row, nms_col;
  window_buffer #(.DW(MAG_W), .BLK(BLK)) u_nms_buf (
    .clk, .rst,
    .we(nms_we), .waddr(nms_waddr), .wdata(nms_wdata),
    .start(nms_start), .en(nms_en), .busy(nms_busy),
    .win_valid(nms_wv), .win(nms_win), .win_row(nms_row), .win_col(nms_col),
    .done(nms_done)
  );
  assign nms_en = out_ready || !(state == S_HYST);

  mag_t h_w [3][3];
  always_comb
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) h_w[i][j] = mag_t'(nms_win[i][j]);

  logic h_edge, h_strong, h_weak;
  hysteresis u_hyst (
    .win(h_w), .th(thr_th), .tl(thr_tl),
    .edge_out(h_edge), .f1_strong(h_strong), .f2_weak(h_weak)
  );

  assign out_valid   = nms_wv && state == S_HYST;
  assign out_edge    = h_edge;
  assign out_last    = out_valid && nms_row == RC_W'(BLK - 1) && nms_col == RC_W'(BLK - 1);
  assign out_blk_cls = b_cls;
  assign out_th      = thr_th;
  assign out_tl      = thr_tl;
  assign busy        = (state != S_EQ) || eq_valid;

  // ------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_EQ;
      eq_addr     <= '0;
      pix_start   <= 1'b0;
      mag_start   <= 1'b0;
      nms_start   <= 1'b0;
      thr_compute <= 1'b0;
      blk_clear   <= 1'b1;
    end else begin
      pix_start   <= 1'b0;
      mag_start   <= 1'b0;
      nms_start   <= 1'b0;
      thr_compute <= 1'b0;
      blk_clear   <= 1'b0;
      unique case (state)
        S_EQ: if (eq_valid) begin
          eq_addr <= eq_addr + 1'b1;
          if (eq_last) begin
            eq_addr   <= '0;
            state     <= S_GRAD;
            pix_start <= 1'b1;
            blk_clear <= 1'b1;
          end
        end
        S_GRAD: if (pix_done) begin
          state     <= S_NMS;
          mag_start <= 1'b1;
        end
        S_NMS: if (mag_done) begin
          state       <= S_THR;
          thr_compute <= 1'b1;
        end
        S_THR: if (thr_done) begin
          state     <= S_HYST;
          nms_start <= 1'b1;
        end
        S_HYST: if (nms_done) state <= S_EQ;
        default: state <= S_EQ;
      endcase
    end
  end

  // the gradient unit must see a full block before a threshold is computed
  a_thr_after_scan: assert property (@(posedge clk) disable iff (rst)
    thr_compute |-> !mag_busy);
  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_edge));

endmodule
