// window_buffer: block memory with a 3x3 neighbourhood scanner.
//
// Holds one BLK x BLK block of DW-bit samples, written one sample per clock
// through the write port (linear address row*BLK + col). A pulse on start
// scans the block in raster order and presents, for every centre pixel,
// the 3x3 window around it. Samples outside the block are replaced by the
// nearest sample of the block (edge replication), so every unit that uses
// a window sees the same neighbourhood at the block border.
//
// The scanner reads one column of three samples per clock (rows r-1, r,
// r+1, each clamped) through registered read ports and shifts it into a
// three-column register. Each row takes BLK+2 clocks (two to prime the
// columns), so a scan takes BLK*(BLK+2)+2 clocks. win_valid marks a valid
// window; en freezes the whole scanner, so a window is taken in a clock
// with win_valid && en. done pulses after the last window is taken.
// win[i][j] is row r-1+i, column c-1+j. Edge replication and the scan
// order are this design's own choices.
module window_buffer #(
  parameter int unsigned DW  = 8,
  parameter int unsigned BLK = 64
) (
  input  logic clk,
  input  logic rst,
  // write port
  input  logic                       we,
  input  logic [$clog2(BLK*BLK)-1:0] waddr,
  input  logic [DW-1:0]              wdata,
  // scanner
  input  logic                       start,
  input  logic                       en,
  output logic                       busy,
  output logic                       win_valid,
  output logic [DW-1:0]              win [3][3],
  output logic [$clog2(BLK)-1:0]     win_row,
  output logic [$clog2(BLK)-1:0]     win_col,
  output logic                       done
);
  localparam int unsigned RC_W = $clog2(BLK);
  localparam int unsigned CI_W = $clog2(BLK + 2);

  logic [DW-1:0] mem [BLK*BLK];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  // scan counters: row ri, read index ci = 0..BLK+1 (image column ci-1)
  logic            scanning;
  logic [RC_W-1:0] ri;
  logic [CI_W-1:0] ci;

  logic [RC_W-1:0] row_up, row_dn, col_rd;
  always_comb begin
    row_up = (ri == '0) ? ri : ri - 1'b1;
    row_dn = (ri == RC_W'(BLK - 1)) ? ri : ri + 1'b1;
    if (ci == '0)                        col_rd = '0;
    else if (ci > CI_W'(BLK))            col_rd = RC_W'(BLK - 1);
    else                                 col_rd = RC_W'(ci - 1'b1);
  end

  // stage 1: registered column read
  logic [DW-1:0]   col_q [3];
  logic            s1_valid;
  logic [RC_W-1:0] s1_row;
  logic [CI_W-1:0] s1_ci;
  logic            s1_last;

  // stage 2: window registers
  logic            s2_valid;
  logic [RC_W-1:0] s2_row;
  logic [RC_W-1:0] s2_col;
  logic            s2_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      scanning <= 1'b0;
      ri       <= '0;
      ci       <= '0;
      s1_valid <= 1'b0;
      s1_row   <= '0;
      s1_ci    <= '0;
      s1_last  <= 1'b0;
      s2_valid <= 1'b0;
      s2_row   <= '0;
      s2_col   <= '0;
      s2_last  <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        scanning <= 1'b1;
        ri       <= '0;
        ci       <= '0;
      end else if (en) begin
        // stage 0 -> 1
        s1_valid <= scanning;
        s1_row   <= ri;
        s1_ci    <= ci;
        s1_last  <= scanning && (ri == RC_W'(BLK - 1)) && (ci == CI_W'(BLK + 1));
        if (scanning) begin
          col_q[0] <= mem[{row_up, col_rd}];
          col_q[1] <= mem[{ri,     col_rd}];
          col_q[2] <= mem[{row_dn, col_rd}];
          if (ci == CI_W'(BLK + 1)) begin
            ci <= '0;
            if (ri == RC_W'(BLK - 1)) scanning <= 1'b0;
            else                      ri <= ri + 1'b1;
          end else begin
            ci <= ci + 1'b1;
          end
        end
        // stage 1 -> 2
        if (s1_valid) begin
          for (int i = 0; i < 3; i++) begin
            win[i][0] <= win[i][1];
            win[i][1] <= win[i][2];
            win[i][2] <= col_q[i];
          end
        end
        s2_valid <= s1_valid && (s1_ci >= CI_W'(2));
        s2_row   <= s1_row;
        s2_col   <= RC_W'(s1_ci - CI_W'(2));
        s2_last  <= s1_last;
        // window taken in this clock
        if (s2_valid && s2_last) done <= 1'b1;
      end
    end
  end

  assign busy      = scanning || s1_valid || s2_valid;
  assign win_valid = s2_valid;
  assign win_row   = s2_row;
  assign win_col   = s2_col;

endmodule
