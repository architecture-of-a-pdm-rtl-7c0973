// inference_unit: builds the resulting output membership function
// (pipeline stage 3), one value per system cycle.
//
// Two MF generators hold the even- and odd-numbered output MFs, which do not
// overlap within their own memory block (overlap degree 2). Each generator
// reports which of its MFs it is producing (mf_no); a 4-to-1 multiplexer
// per block picks the rule strength alpha*_j of that MF (even block: alpha0,
// 2, 4, 6; odd block: alpha1, 3, 5, 7). A MIN gate clips the generator
// output to that strength, and a MAX gate merges the clipped even and odd
// parts into the resulting function mu(x). The work per frame is fixed and
// does not depend on how many rules fired.
// Structure follows the described inference unit.
// Timing: mu belongs to the current phase ctrl.x (registered generator
// outputs, combinational MUX/MIN/MAX); alpha must hold for the whole frame.
module inference_unit
  import fc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic                 clk,
  input  logic                 rst,
  input  fc_ctrl_t             ctrl,
  input  mf_wr_t               wr_even,
  input  mf_wr_t               wr_odd,
  input  val_t [NUM_MF-1:0]    alpha,
  output val_t                 mu
);

  localparam int unsigned NO_W = MF_IDX_W - 1;

  val_t            y_even, y_odd;
  logic [NO_W-1:0] no_even, no_odd;
  val_t            a_even, a_odd, c_even, c_odd;

  mf_generator #(.DEPTH(MEM_DEPTH), .NO_W(NO_W)) u_gen_even (
    .clk, .rst, .ctrl, .wr(wr_even), .y(y_even), .mf_no(no_even));
  mf_generator #(.DEPTH(MEM_DEPTH), .NO_W(NO_W)) u_gen_odd (
    .clk, .rst, .ctrl, .wr(wr_odd),  .y(y_odd),  .mf_no(no_odd));

  assign a_even = alpha[{no_even, 1'b0}];
  assign a_odd  = alpha[{no_odd,  1'b1}];
  assign c_even = (y_even < a_even) ? y_even : a_even;
  assign c_odd  = (y_odd  < a_odd)  ? y_odd  : a_odd;
  assign mu     = (c_even > c_odd)  ? c_even : c_odd;

endmodule
