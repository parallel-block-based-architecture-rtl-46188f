// engine_array: parallel computation engines of the block-based detector.
//
// The image is cut into m x m (overlapping) blocks outside this module and
// sent block after block, each in raster order, on the pixel input stream.
// NUM_ENGINES computation engines work on different blocks at the same
// time: the dispatcher hands whole blocks to the engines in round-robin
// order, and the collector takes the edge maps back in the same order, so
// edge maps leave in the order the blocks arrived. Every engine needs the
// same number of clocks for a block, so round robin keeps them all busy
// when the input stream is steady.
//
// Interface: in_valid/in_ready/in_pixel carry the pixels; out_valid/
// out_ready/out_edge carry one edge bit per pixel, out_last marks the last
// pixel of a block, and out_blk_cls, out_th, out_tl give the class and the
// thresholds of the block being sent. The dispatch and collection order,
// the stream handshake and NUM_ENGINES = 4 are this design's own choices;
// the design only states that blocks are processed in parallel engines.
module engine_array
  import canny_pkg::*;
#(
  parameter int unsigned BLK         = 64,
  parameter int unsigned NUM_ENGINES = 4,
  parameter int unsigned NL          = 8,
  parameter int unsigned TU          = 100,
  parameter int unsigned TE          = 900
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  pix_t       in_pixel,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_edge,
  output logic       out_last,
  output blk_class_e out_blk_cls,
  output mag_t       out_th,
  output mag_t       out_tl,
  output logic [NUM_ENGINES-1:0] engine_busy
);
  localparam int unsigned N   = BLK * BLK;
  localparam int unsigned A_W = $clog2(N);
  localparam int unsigned E_W = (NUM_ENGINES > 1) ? $clog2(NUM_ENGINES) : 1;

  logic [E_W-1:0] wr_sel, rd_sel;
  logic [A_W-1:0] wr_cnt;

  logic       e_in_valid  [NUM_ENGINES];
  logic       e_in_ready  [NUM_ENGINES];
  logic       e_out_valid [NUM_ENGINES];
  logic       e_out_ready [NUM_ENGINES];
  logic       e_out_edge  [NUM_ENGINES];
  logic       e_out_last  [NUM_ENGINES];
  blk_class_e e_blk_cls   [NUM_ENGINES];
  mag_t       e_th        [NUM_ENGINES];
  mag_t       e_tl        [NUM_ENGINES];

  for (genvar e = 0; e < NUM_ENGINES; e++) begin : g_engine
    assign e_in_valid[e]  = in_valid && (wr_sel == E_W'(e));
    assign e_out_ready[e] = out_ready && (rd_sel == E_W'(e));
    computation_engine #(.BLK(BLK), .NL(NL), .TU(TU), .TE(TE)) u_engine (
      .clk, .rst,
      .in_valid(e_in_valid[e]), .in_ready(e_in_ready[e]), .in_pixel,
      .out_valid(e_out_valid[e]), .out_ready(e_out_ready[e]),
      .out_edge(e_out_edge[e]), .out_last(e_out_last[e]),
      .out_blk_cls(e_blk_cls[e]), .out_th(e_th[e]), .out_tl(e_tl[e]),
      .busy(engine_busy[e])
    );
  end

  // dispatcher and collector multiplexers
  always_comb begin
    in_ready    = 1'b0;
    out_valid   = 1'b0;
    out_edge    = 1'b0;
    out_last    = 1'b0;
    out_blk_cls = BLK_SMOOTH;
    out_th      = '0;
    out_tl      = '0;
    for (int e = 0; e < NUM_ENGINES; e++) begin
      if (wr_sel == E_W'(e)) in_ready = e_in_ready[e];
      if (rd_sel == E_W'(e)) begin
        out_valid   = e_out_valid[e];
        out_edge    = e_out_edge[e];
        out_last    = e_out_last[e];
        out_blk_cls = e_blk_cls[e];
        out_th      = e_th[e];
        out_tl      = e_tl[e];
      end
    end
  end

  function automatic logic [E_W-1:0] next_sel(input logic [E_W-1:0] s);
    return (s == E_W'(NUM_ENGINES - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_sel <= '0;
      rd_sel <= '0;
      wr_cnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_cnt == A_W'(N - 1)) begin
          wr_cnt <= '0;
          wr_sel <= next_sel(wr_sel);
        end
      end
      if (out_valid && out_ready && out_last) rd_sel <= next_sel(rd_sel);
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid);

endmodule
