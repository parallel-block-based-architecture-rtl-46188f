// block_merger: assembles the edge maps of the blocks into one edge image.
//
// Takes the edge maps of the blocks made by block_divider, in the same
// block order and each in raster order, and keeps of every block only its
// interior S x S pixels (S = BLK - 2*OV), that is the pixels whose
// neighbourhood lay completely inside the block, dropping the overlap
// border and anything past the image edge. The kept bits go to an edge
// frame buffer of IMG_W x IMG_H bits. When the last block of a frame has
// arrived the edge image is sent out in raster order, one bit per clock
// (edge_flag), with out_last on the last pixel; no block is taken while
// the edge image is being sent. Frame buffer and order are this design's
// own choices, matching block_divider.
module block_merger #(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned BLK   = 64,
  parameter int unsigned OV    = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_edge,
  output logic out_valid,
  input  logic out_ready,
  output logic edge_flag,
  output logic out_last
);
  localparam int unsigned S    = BLK - 2 * OV;
  localparam int unsigned NTX  = (IMG_W + S - 1) / S;
  localparam int unsigned NTY  = (IMG_H + S - 1) / S;
  localparam int unsigned F_W  = $clog2(IMG_W * IMG_H);
  localparam int unsigned B_W  = $clog2(BLK);
  localparam int unsigned TX_W = (NTX > 1) ? $clog2(NTX) : 1;
  localparam int unsigned TY_W = (NTY > 1) ? $clog2(NTY) : 1;
  localparam int unsigned K_W  = $clog2(IMG_W + IMG_H + BLK) + 2;

  logic emap [IMG_W * IMG_H];

  logic            sending;
  logic [F_W-1:0]  raddr;
  logic [TX_W-1:0] tx;
  logic [TY_W-1:0] ty;
  logic [B_W-1:0]  br, bc;

  logic signed [K_W-1:0] yr, xc;
  logic keep;
  always_comb begin
    yr   = K_W'(ty) * K_W'(S) + K_W'(br) - K_W'(OV);
    xc   = K_W'(tx) * K_W'(S) + K_W'(bc) - K_W'(OV);
    keep = (br >= B_W'(OV)) && (br < B_W'(OV + S)) && (bc >= B_W'(OV)) && (bc < B_W'(OV + S))
        && (yr < K_W'(IMG_H)) && (xc < K_W'(IMG_W));
  end

  logic [F_W-1:0] waddr;
  assign waddr = F_W'(yr) * F_W'(IMG_W) + F_W'(xc);

  assign in_ready  = !sending;
  assign out_valid = sending;
  assign edge_flag = emap[raddr];
  assign out_last  = sending && (raddr == F_W'(IMG_W * IMG_H - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sending <= 1'b0;
      raddr   <= '0;
      tx      <= '0;
      ty      <= '0;
      br      <= '0;
      bc      <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        if (keep) emap[waddr] <= in_edge;
        bc <= bc + 1'b1;
        if (bc == B_W'(BLK - 1)) begin
          bc <= '0;
          br <= br + 1'b1;
          if (br == B_W'(BLK - 1)) begin
            br <= '0;
            tx <= tx + 1'b1;
            if (tx == TX_W'(NTX - 1)) begin
              tx <= '0;
              ty <= ty + 1'b1;
              if (ty == TY_W'(NTY - 1)) begin
                ty      <= '0;
                sending <= 1'b1;
              end
            end
          end
        end
      end
    end else if (out_ready) begin
      raddr <= raddr + 1'b1;
      if (raddr == F_W'(IMG_W * IMG_H - 1)) begin
        raddr   <= '0;
        sending <= 1'b0;
      end
    end
  end
endmodule
