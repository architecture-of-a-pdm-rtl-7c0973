// fuzzifier: fuzzification of one PDM input (pipeline stage 1) and the
// D/PDM conversion of its result (start of stage 2).
//
// Two MF generators produce, once per system cycle, the values of the even-
// and odd-numbered membership functions at position x; the MF counter
// tracks the number h of the lower active MF. The input in_pdm is a pulse
// that starts with the frame and lasts as many system cycles as the input
// value. In the first phase in which it is low (x = input value), the two
// MF values and h are caught in 8-bit latches: they are the membership
// degrees of the input in MF h and MF h+1. An input held high for the whole
// frame is caught in the last phase.
// At the frame end the latched values move into the stage-2 registers
// (w_even, w_odd, h), which hold for the next frame; two D/PDM converters
// turn w_even / w_odd into PDM pulses for the hardwired rule base.
// Structure (two generators, MF counter, latches, D/PDM converters) follows
// the described fuzzifier; the stage registers, which the description
// leaves out of its drawings, and the last-phase capture are this design's.
module fuzzifier
  import fc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic     clk,
  input  logic     rst,
  input  fc_ctrl_t ctrl,
  input  mf_wr_t   wr_even,
  input  mf_wr_t   wr_odd,
  input  logic     in_pdm,
  // stage 2 (held for the frame after the one that sampled the input)
  output val_t     w_even,
  output val_t     w_odd,
  output mf_idx_t  h,
  output logic     w_even_pdm,
  output logic     w_odd_pdm
);

  val_t    y_even, y_odd;
  mf_idx_t h_now;
  logic [1:0] no_even_unused, no_odd_unused;

  mf_generator #(.DEPTH(MEM_DEPTH)) u_gen_even (
    .clk, .rst, .ctrl, .wr(wr_even), .y(y_even), .mf_no(no_even_unused));
  mf_generator #(.DEPTH(MEM_DEPTH)) u_gen_odd (
    .clk, .rst, .ctrl, .wr(wr_odd),  .y(y_odd),  .mf_no(no_odd_unused));

  mf_counter u_cnt (.clk, .rst, .ctrl, .y_even, .y_odd, .h(h_now));

  logic    done_q;
  logic    cap;
  val_t    lat_even_q, lat_odd_q;
  mf_idx_t lat_h_q;

  assign cap = !done_q && (!in_pdm || ctrl.frame_end);

  always_ff @(posedge clk) begin
    if (rst) begin
      done_q     <= 1'b0;
      lat_even_q <= '0;
      lat_odd_q  <= '0;
      lat_h_q    <= '0;
      w_even     <= '0;
      w_odd      <= '0;
      h          <= '0;
    end else if (ctrl.tick) begin
      if (cap) begin
        lat_even_q <= y_even;
        lat_odd_q  <= y_odd;
        lat_h_q    <= h_now;
      end
      if (ctrl.frame_end) begin
        w_even <= cap ? y_even : lat_even_q;
        w_odd  <= cap ? y_odd  : lat_odd_q;
        h      <= cap ? h_now  : lat_h_q;
        done_q <= 1'b0;
      end else if (cap) begin
        done_q <= 1'b1;
      end
    end
  end

  d_pdm u_dpdm_even (.ctrl, .v(w_even), .pdm(w_even_pdm));
  d_pdm u_dpdm_odd  (.ctrl, .v(w_odd),  .pdm(w_odd_pdm));

endmodule
