// fuzzy_top: pipelined fuzzy logic controller on pulse-duration-modulated
// (PDM) signals, NUM_IN inputs and one output, 8-bit resolution.
//
// A frame (main clock cycle) is 2**RES_BITS system cycles; the system clock
// is clk divided by CLK_DIV. Each input value v arrives as a PDM pulse that
// starts with the frame (frame_start / main_clk are provided for the
// external PDM sources) and stays high for v system cycles. The four
// pipeline stages each take one frame:
//   1  fuzzifier      MF generators + MF counter, degrees latched when the
//                     input pulse ends
//   2  rule base      hardwired PDM gate network (rulebase_hw) or the
//                     programmable sequential rule base (rulebase_prog),
//                     giving eight rule strengths alpha*_0..7
//   3  inference      output MF generators clipped by alpha* (MIN) and
//                     merged (MAX); COG sums accumulated
//   4  defuzzifier    repeated-subtraction divider
// The crisp output o changes at a frame end, four frames after the frame in
// which the inputs were sampled; o_pdm is o as a PDM pulse in the frame
// after that.
// rb_sel chooses the rule base feeding stage 3 (0: hardwired, 1:
// programmable); both run all the time. Both rule bases, the stage
// sequence and the clock ratios follow the described controller; rb_sel,
// the memory write ports and the output PDM converter are this design's.
//
// Memory programming (any time, on clk): mf_wr writes the MF memory
// selected by mf_gen: 2*i+0 / 2*i+1 are the even / odd memories of input i,
// 2*NUM_IN / 2*NUM_IN+1 those of the output. rule_* writes the rule memory.
module fuzzy_top
  import fc_pkg::*;
#(
  parameter int unsigned NUM_IN    = 2,
  parameter int unsigned CLK_DIV   = 4,
  parameter int unsigned MEM_DEPTH = 256,
  parameter int unsigned NRULES    = NPOS,
  parameter int unsigned HW_RULES  = 8,
  parameter logic [HW_RULES-1:0][NUM_IN-1:0][NUM_MF-1:0] HW_RULE_IN =
    128'h8080_4040_2020_1010_0808_0404_0202_0101,
  parameter logic [HW_RULES-1:0]               HW_RULE_OP  = '0,
  parameter logic [HW_RULES-1:0][MF_IDX_W-1:0] HW_RULE_OUT = 24'hFAC688,
  localparam int unsigned RULE_W = 1 + MF_IDX_W * NUM_IN + MF_IDX_W,
  localparam int unsigned RAW    = $clog2(NRULES),
  localparam int unsigned GSEL_W = $clog2(2 * NUM_IN + 2)
) (
  input  logic                 clk,
  input  logic                 por_n,
  input  logic [NUM_IN-1:0]    in_pdm,
  input  logic                 rb_sel,
  input  mf_wr_t               mf_wr,
  input  logic [GSEL_W-1:0]    mf_gen,
  input  logic                 rule_we,
  input  logic [RAW-1:0]       rule_addr,
  input  logic [RULE_W-1:0]    rule_data,
  output logic                 sys_tick,
  output logic                 frame_start,
  output logic                 main_clk,
  output logic                 rst,
  output pos_t                 o,
  output logic                 o_pdm
);

  fc_ctrl_t ctrl;

  control_unit #(.CLK_DIV(CLK_DIV)) u_ctrl (
    .clk, .por_n, .rst, .ctrl, .main_clk);

  assign sys_tick    = ctrl.tick;
  assign frame_start = ctrl.frame_start;

  // MF memory write steering
  mf_wr_t wr [2*NUM_IN+2];
  always_comb begin
    for (int g = 0; g < 2 * NUM_IN + 2; g++) begin
      wr[g]    = mf_wr;
      wr[g].we = mf_wr.we && (mf_gen == GSEL_W'(g));
    end
  end

  // stage 1/2: fuzzifiers
  val_t    [NUM_IN-1:0] w_even, w_odd;
  mf_idx_t [NUM_IN-1:0] h;
  logic    [NUM_IN-1:0] even_pdm, odd_pdm;

  for (genvar i = 0; i < NUM_IN; i++) begin : g_fuzz
    fuzzifier #(.MEM_DEPTH(MEM_DEPTH)) u_fuzz (
      .clk, .rst, .ctrl,
      .wr_even(wr[2*i]), .wr_odd(wr[2*i+1]),
      .in_pdm(in_pdm[i]),
      .w_even(w_even[i]), .w_odd(w_odd[i]), .h(h[i]),
      .w_even_pdm(even_pdm[i]), .w_odd_pdm(odd_pdm[i]));
  end

  // stage 2: rule bases
  val_t [NUM_MF-1:0] alpha_hw, alpha_prog, alpha;
  logic [NUM_MF-1:0] alpha_pdm_unused;

  rulebase_hw #(
    .NUM_IN(NUM_IN), .NUM_RULES(HW_RULES),
    .RULE_IN(HW_RULE_IN), .RULE_OP(HW_RULE_OP), .RULE_OUT(HW_RULE_OUT)
  ) u_rb_hw (
    .clk, .rst, .ctrl, .h, .even_pdm, .odd_pdm,
    .alpha(alpha_hw), .alpha_pdm(alpha_pdm_unused));

  rulebase_prog #(.NUM_IN(NUM_IN), .NRULES(NRULES)) u_rb_prog (
    .clk, .rst, .ctrl, .rule_we, .rule_addr, .rule_data,
    .h, .w_even, .w_odd, .alpha(alpha_prog));

  assign alpha = rb_sel ? alpha_prog : alpha_hw;

  // stage 3: inference and COG sums
  val_t mu;
  logic [VAL_W+2*RES_BITS-1:0] num;
  logic [VAL_W+RES_BITS-1:0]   den;

  inference_unit #(.MEM_DEPTH(MEM_DEPTH)) u_inf (
    .clk, .rst, .ctrl,
    .wr_even(wr[2*NUM_IN]), .wr_odd(wr[2*NUM_IN+1]),
    .alpha, .mu);

  cog_accum u_acc (.clk, .rst, .ctrl, .mu, .num, .den);

  // stage 4: division, output
  cog_divider u_div (.clk, .rst, .ctrl, .num, .den, .o);

  d_pdm u_out_pdm (.ctrl, .v(val_t'(o)), .pdm(o_pdm));

endmodule
