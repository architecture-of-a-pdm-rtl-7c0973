// rulebase_prog: programmable rule base that evaluates one rule per system
// cycle (pipeline stage 2).
//
// Rule word (RULE_W = 1 + 3*NUM_IN + 3 bits), from MSB to LSB:
//   valid | premise MF number of input 0 | ... | input NUM_IN-1 | output MF
// e.g. "if In1 is A1 and In2 is B5 then O is X3" (inputs 0 and 1) is
// {1'b1, 3'd1, 3'd5, 3'd3}: the premises in input order, then the output.
// In phase x the rule at address x is read, so up to NRULES = 2**RES_BITS
// rules are evaluated per frame. For every input the premise number selects
// the input's membership degree: the even or odd fuzzifier value if it
// equals h or h+1 (whichever of them holds that MF), otherwise zero. A
// parallel MIN gate gives the truth value alpha of the rule. The LSB of the
// output MF number steers alpha to the even or odd register bank; the
// upper two bits select one of four registers, whose content is compared
// with alpha (MAX) and replaced if alpha is greater. At the frame end the
// registers Reg0..Reg7 are copied into Reg0'..Reg7' (the output alpha) and
// cleared for the next frame.
// Datapath and register banks follow the described programmable rule base;
// the field order of the rule word follows the described encoding; the
// valid bit and the write port are this design's choices.
module rulebase_prog
  import fc_pkg::*;
#(
  parameter int unsigned NUM_IN = 2,
  parameter int unsigned NRULES = NPOS,
  localparam int unsigned RULE_W = 1 + MF_IDX_W * NUM_IN + MF_IDX_W,
  localparam int unsigned RAW    = $clog2(NRULES)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  fc_ctrl_t              ctrl,
  // rule memory write port
  input  logic                  rule_we,
  input  logic [RAW-1:0]        rule_addr,
  input  logic [RULE_W-1:0]     rule_data,
  // fuzzified inputs (stage 2 registers of the fuzzifiers)
  input  mf_idx_t [NUM_IN-1:0]  h,
  input  val_t    [NUM_IN-1:0]  w_even,
  input  val_t    [NUM_IN-1:0]  w_odd,
  output val_t    [NUM_MF-1:0]  alpha        // Reg0'..Reg7', stage 3
);

  localparam int unsigned BANK = NUM_MF / 2;

  logic [RULE_W-1:0] rule_mem [NRULES];
  logic [RULE_W-1:0] rule;
  logic              valid;
  mf_idx_t           out_mf;
  val_t [NUM_IN-1:0] omega;
  val_t              a;

  always_ff @(posedge clk)
    if (rule_we) rule_mem[rule_addr] <= rule_data;

  assign rule   = (int'(ctrl.x) < NRULES) ? rule_mem[RAW'(ctrl.x)] : '0;
  assign valid  = rule[RULE_W-1];
  assign out_mf = rule[MF_IDX_W-1:0];

  // if-part: select the membership degree of each premise
  always_comb begin
    for (int i = 0; i < NUM_IN; i++) begin
      mf_idx_t            p;
      logic [MF_IDX_W:0]  h1;
      p  = rule[MF_IDX_W*(NUM_IN-i) +: MF_IDX_W];
      h1 = {1'b0, h[i]} + 1'b1;
      if (p == h[i])                  omega[i] = h[i][0] ? w_odd[i] : w_even[i];
      else if ({1'b0, p} == h1)       omega[i] = h[i][0] ? w_even[i] : w_odd[i];
      else                            omega[i] = '0;
    end
  end

  parallel_min #(.N(NUM_IN), .W(VAL_W)) u_min (.in(omega), .min(a));

  // then-part: demux to the even/odd bank, MAX with the selected register
  val_t reg_even [BANK];
  val_t reg_odd  [BANK];
  val_t cur, upd;
  logic [MF_IDX_W-2:0] sel;

  assign sel = out_mf[MF_IDX_W-1:1];
  assign cur = out_mf[0] ? reg_odd[sel] : reg_even[sel];
  assign upd = (a > cur) ? a : cur;

  val_t reg_even_n [BANK];
  val_t reg_odd_n  [BANK];

  always_comb begin
    reg_even_n = reg_even;
    reg_odd_n  = reg_odd;
    if (valid) begin
      if (out_mf[0]) reg_odd_n[sel]  = upd;
      else           reg_even_n[sel] = upd;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < BANK; k++) begin
        reg_even[k] <= '0;
        reg_odd[k]  <= '0;
      end
      alpha <= '0;
    end else if (ctrl.tick) begin
      if (ctrl.frame_end) begin
        for (int k = 0; k < BANK; k++) begin
          alpha[2*k]   <= reg_even_n[k];
          alpha[2*k+1] <= reg_odd_n[k];
          reg_even[k]  <= '0;
          reg_odd[k]   <= '0;
        end
      end else begin
        reg_even <= reg_even_n;
        reg_odd  <= reg_odd_n;
      end
    end
  end

endmodule
