// rulebase_hw: hardwired rule base working directly on PDM signals
// (pipeline stage 2).
//
// For every input an MF demultiplexer puts the even/odd PDM membership
// signals onto eight MF wires according to h. A rule is a gate network on
// these wires: since all PDM pulses start with the frame, MIN is an AND
// gate and MAX an OR gate. Rules with the same output MF are merged by an
// OR (the strongest rule wins), giving one PDM signal alpha'_j per output
// MF. A PDM/D converter per output MF counts alpha'_j into the digital rule
// strength alpha*_j, which holds for the next frame (stage 3).
//
// The wiring is fixed at elaboration by two parameters:
//   RULE_IN[r][i]  MF mask of input i in rule r: the input's premise is the
//                  OR (MAX) of the selected MF wires; an empty mask leaves
//                  the input out of the rule,
//   RULE_OP[r]     0: the rule is the AND (MIN) of its input premises,
//                  1: the OR (MAX) of them,
//   RULE_OUT[r]    output MF number of rule r.
// This mask form, which covers the MIN rules and the MAX combinations of
// the described rule base,
// and the default table (rule r: In_i is MF r for all inputs -> output MF r)
// are this design's choices.
module rulebase_hw
  import fc_pkg::*;
#(
  parameter int unsigned NUM_IN    = 2,
  parameter int unsigned NUM_RULES = 8,
  parameter logic [NUM_RULES-1:0][NUM_IN-1:0][NUM_MF-1:0] RULE_IN =
    128'h8080_4040_2020_1010_0808_0404_0202_0101,
  parameter logic [NUM_RULES-1:0]               RULE_OP  = '0,
  parameter logic [NUM_RULES-1:0][MF_IDX_W-1:0] RULE_OUT = 24'hFAC688
) (
  input  logic                  clk,
  input  logic                  rst,
  input  fc_ctrl_t              ctrl,
  input  mf_idx_t [NUM_IN-1:0]  h,
  input  logic    [NUM_IN-1:0]  even_pdm,
  input  logic    [NUM_IN-1:0]  odd_pdm,
  output val_t    [NUM_MF-1:0]  alpha,        // alpha*_j, stage 3
  output logic    [NUM_MF-1:0]  alpha_pdm     // alpha'_j, current frame
);

  logic [NUM_IN-1:0][NUM_MF-1:0] mf;
  logic [NUM_RULES-1:0]          fire;

  for (genvar i = 0; i < NUM_IN; i++) begin : g_demux
    mf_demux u_demux (.h(h[i]), .even_pdm(even_pdm[i]), .odd_pdm(odd_pdm[i]),
                      .mf(mf[i]));
  end

  always_comb begin
    for (int r = 0; r < NUM_RULES; r++) begin
      fire[r] = !RULE_OP[r];
      for (int i = 0; i < NUM_IN; i++)
        if (RULE_IN[r][i] != '0) begin
          if (RULE_OP[r]) fire[r] |= |(mf[i] & RULE_IN[r][i]);
          else            fire[r] &= |(mf[i] & RULE_IN[r][i]);
        end
    end
    alpha_pdm = '0;
    for (int r = 0; r < NUM_RULES; r++)
      alpha_pdm[RULE_OUT[r]] |= fire[r];
  end

  for (genvar j = 0; j < NUM_MF; j++) begin : g_pdmd
    pdm_d u_pdmd (.clk, .rst, .ctrl, .pdm(alpha_pdm[j]), .v(alpha[j]));
  end

endmodule
