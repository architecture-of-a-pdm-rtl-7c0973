// pdm_d: pulse-duration-modulated (PDM) to digital converter.
//
// Counts the system cycles in which pdm is high during one frame. On the
// last tick of the frame the count (including that phase) is stored in v,
// which then holds for the whole next frame, and the counter restarts.
// A pulse lasting the whole frame saturates at the largest value.
// The counting converter and its saturation are this design's choice.
module pdm_d
  import fc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  fc_ctrl_t ctrl,
  input  logic     pdm,
  output val_t     v
);

  val_t cnt_q;
  val_t cnt_next;

  always_comb begin
    cnt_next = cnt_q;
    if (pdm && cnt_q != '1) cnt_next = cnt_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q <= '0;
      v     <= '0;
    end else if (ctrl.tick) begin
      if (ctrl.frame_end) begin
        v     <= cnt_next;
        cnt_q <= '0;
      end else begin
        cnt_q <= cnt_next;
      end
    end
  end

endmodule
