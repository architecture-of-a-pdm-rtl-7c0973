// mf_counter: number h of the lower of the two active membership functions.
//
// With an overlap degree of 2, at any x at most two neighbouring MFs, h and
// h+1, are non-zero; one of them comes from the "even" generator and the
// other from the "odd" one. The counter starts every frame at h = 0 and
// steps to h+1 in the phase where the generator holding MF h outputs zero
// while the other generator (MF h+1) does not: MF h has ended and h+1
// becomes the lower active MF. It saturates at NUM_MF-1.
// Only h is passed on; h+1 is implied. The counting rule is this design's
// own: the described MF-counter is said to derive h from the two generator
// outputs, without the rule being spelled out.
//
// Timing: h is combinational and belongs to the current phase ctrl.x, so it
// can be latched together with the generator outputs of the same phase.
module mf_counter
  import fc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  fc_ctrl_t ctrl,
  input  val_t     y_even,
  input  val_t     y_odd,
  output mf_idx_t  h
);

  mf_idx_t h_q;
  val_t    y_low, y_high;
  logic    step;

  always_comb begin
    y_low  = h_q[0] ? y_odd  : y_even;
    y_high = h_q[0] ? y_even : y_odd;
    step   = (y_low == '0) && (y_high != '0) && (h_q != mf_idx_t'(NUM_MF - 1));
    h      = step ? h_q + 1'b1 : h_q;
  end

  always_ff @(posedge clk) begin
    if (rst) h_q <= '0;
    else if (ctrl.tick) h_q <= ctrl.frame_end ? '0 : h;
  end

endmodule
