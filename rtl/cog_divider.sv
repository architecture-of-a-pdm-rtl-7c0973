// cog_divider: divides the COG numerator by the denominator with a single
// adder (pipeline stage 4).
//
// num and den are the stage registers of the COG adders and hold for the
// whole frame. In phase 0 the remainder starts at num; in every system
// cycle of the frame den is subtracted once if the remainder is not
// smaller than den, and the subtractions are counted. The quotient of a
// centre of gravity lies between 0 and NPOS-1, so the NPOS system cycles of
// a frame always suffice. At the frame end the count is published as the
// crisp output o, which holds for the next frame. The result is
// floor(num/den); den = 0 (no rule fired) gives 0. Repeated subtraction and
// the den = 0 result are this design's reading of "a divider built from an
// adder" that finishes within one main clock cycle.
module cog_divider
  import fc_pkg::*;
#(
  localparam int unsigned DEN_W = VAL_W + RES_BITS,
  localparam int unsigned NUM_W = VAL_W + 2 * RES_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  fc_ctrl_t         ctrl,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output pos_t             o
);

  logic [NUM_W-1:0] rem_q, rem_cur, rem_next;
  pos_t             q_q, q_cur, q_next;
  logic             sub;

  assign rem_cur  = ctrl.frame_start ? num : rem_q;
  assign q_cur    = ctrl.frame_start ? '0  : q_q;
  assign sub      = (den != '0) && (rem_cur >= NUM_W'(den)) && (q_cur != '1);
  assign rem_next = sub ? rem_cur - NUM_W'(den) : rem_cur;
  assign q_next   = sub ? q_cur + 1'b1 : q_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      rem_q <= '0;
      q_q   <= '0;
      o     <= '0;
    end else if (ctrl.tick) begin
      rem_q <= rem_next;
      q_q   <= q_next;
      if (ctrl.frame_end) o <= q_next;
    end
  end

endmodule
