// cog_accum: sums for the centre-of-gravity defuzzification, built from
// adders only (pipeline stage 3).
//
// Over one frame the first adder accumulates S(x) = mu(0) + ... + mu(x),
// the second adder accumulates T = S(0) + S(1) + ... + S(NPOS-1).
// Since T = NPOS*D - sum(x*mu(x)) with D = S(NPOS-1), the COG numerator is
//   num = NPOS*D - T = sum over x of x*mu(x)
// and the denominator is den = D; no multiplier is needed. At the frame
// end num and den are stored for the divider (stage 4) and both sums
// restart. The description places these adders in stage 3 and only cites
// the COG algorithm; the running-sum formulation is this design's choice.
module cog_accum
  import fc_pkg::*;
#(
  localparam int unsigned DEN_W = VAL_W + RES_BITS,
  localparam int unsigned NUM_W = VAL_W + 2 * RES_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  fc_ctrl_t         ctrl,
  input  val_t             mu,
  output logic [NUM_W-1:0] num,
  output logic [DEN_W-1:0] den
);

  logic [DEN_W-1:0] s_q, s_next;
  logic [NUM_W:0]   t_q, t_next;   // one bit more: T can reach NPOS*D

  assign s_next = s_q + DEN_W'(mu);
  assign t_next = t_q + (NUM_W+1)'(s_next);

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q <= '0;
      t_q <= '0;
      num <= '0;
      den <= '0;
    end else if (ctrl.tick) begin
      if (ctrl.frame_end) begin
        den <= s_next;
        num <= NUM_W'(({s_next, RES_BITS'(0)}) - t_next);
        s_q <= '0;
        t_q <= '0;
      end else begin
        s_q <= s_next;
        t_q <= t_next;
      end
    end
  end

endmodule
