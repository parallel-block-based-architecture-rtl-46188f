// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start loads num and den; NUM_W clocks later done pulses for
// one cycle with quot = floor(num / den) and rem = num mod den, and busy
// drops. A zero divisor gives an all-ones quotient. The histogram
// equalizer uses it for the scaling division of its mapping formula; the
// restoring algorithm is this design's own choice.
module seq_divider #(
  parameter int unsigned NUM_W = 21,
  parameter int unsigned DEN_W = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot,
  output logic [DEN_W-1:0] rem
);
  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q_sh;     // dividend bits shifted out, quotient bits shifted in
  logic [DEN_W:0]   r_acc;    // partial remainder, one bit wider than den
  logic [DEN_W-1:0] d_reg;
  logic [CNT_W-1:0] cnt;

  logic [DEN_W:0] r_shift;
  logic [DEN_W:0] r_diff;
  always_comb begin
    r_shift = {r_acc[DEN_W-1:0], q_sh[NUM_W-1]};
    r_diff  = r_shift - {1'b0, d_reg};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt   <= '0;
      q_sh  <= '0;
      r_acc <= '0;
      d_reg <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        q_sh  <= num;
        r_acc <= '0;
        d_reg <= den;
        cnt   <= CNT_W'(NUM_W);
      end else if (busy) begin
        if (!r_diff[DEN_W]) begin
          r_acc <= r_diff;
          q_sh  <= {q_sh[NUM_W-2:0], 1'b1};
        end else begin
          r_acc <= r_shift;
          q_sh  <= {q_sh[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q_sh;
  assign rem  = r_acc[DEN_W-1:0];
endmodule
