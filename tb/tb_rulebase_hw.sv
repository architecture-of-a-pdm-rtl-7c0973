// tb_rulebase_hw: drives random fuzzified inputs (h and PDM degrees) for
// many frames and checks the rule strengths one frame later, for the
// default diagonal rule table and for a table with an OR premise, an
// unused input, a rule that takes the MAX of two inputs and two rules
// sharing an output MF (the stronger wins).
module tb_rulebase_hw;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  mf_idx_t [1:0] h;
  val_t [1:0] we, wo;
  logic [1:0] ep, op;
  val_t [7:0] a_def, a_alt;
  logic [7:0] ap_def, ap_alt;
  int checks = 0, failures = 0;
  int merges = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);

  for (genvar i = 0; i < 2; i++) begin : g_pdm
    assign ep[i] = (ctrl.x < we[i]);
    assign op[i] = (ctrl.x < wo[i]);
  end

  rulebase_hw dut (.clk, .rst, .ctrl, .h, .even_pdm(ep), .odd_pdm(op),
                   .alpha(a_def), .alpha_pdm(ap_def));

  // alternative table, 3 rules:
  //   r0: In0 is (MF1 or MF2) and In1 is MF3 -> out 4
  //   r1: In0 is MF2                          -> out 4
  //   r2: In0 is MF5 or In1 is MF0 (MAX)      -> out 7
  localparam logic [2:0][1:0][7:0] ALT_IN = {8'b0000_0001, 8'b0010_0000,
                                             8'h00, 8'b0000_0100,
                                             8'b0000_1000, 8'b0000_0110};
  localparam logic [2:0][2:0] ALT_OUT = {3'd7, 3'd4, 3'd4};
  localparam logic [2:0]      ALT_OP  = 3'b100;
  rulebase_hw #(.NUM_IN(2), .NUM_RULES(3), .RULE_IN(ALT_IN), .RULE_OP(ALT_OP),
                .RULE_OUT(ALT_OUT))
    dut_alt (.clk, .rst, .ctrl, .h, .even_pdm(ep), .odd_pdm(op),
             .alpha(a_alt), .alpha_pdm(ap_alt));

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin
    int exp_def [8];
    int exp_alt [8];
    int d0, d1, r0, r1;
    logic have;
    h = '0; we = '0; wo = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    have = 0;
    for (int f = 0; f < 60; f++) begin
      for (int i = 0; i < 2; i++) begin
        h[i]  = mf_idx_t'((f < 8) ? f : $urandom_range(7));
        we[i] = val_t'($urandom_range(255));
        wo[i] = val_t'($urandom_range(255));
      end
      // hit the shared-output case often
      if (f % 3 == 0) begin h[0] = 3'd1; h[1] = 3'd2; end
      // frame runs; check previous frame's expectation at x = 0
      @(negedge clk);
      if (have) begin
        for (int j = 0; j < 8; j++) begin
          checks += 2;
          if (int'(a_def[j]) != exp_def[j]) begin
            failures++;
            if (failures < 10) $display("def f=%0d j=%0d a=%0d exp=%0d", f, j, a_def[j], exp_def[j]);
          end
          if (int'(a_alt[j]) != exp_alt[j]) begin
            failures++;
            if (failures < 10) $display("alt f=%0d j=%0d a=%0d exp=%0d", f, j, a_alt[j], exp_alt[j]);
          end
        end
      end
      for (int j = 0; j < 8; j++) begin
        exp_def[j] = mn(deg(int'(h[0]), int'(we[0]), int'(wo[0]), j), deg(int'(h[1]), int'(we[1]), int'(wo[1]), j));
        exp_alt[j] = 0;
      end
      d0 = mx(deg(int'(h[0]), int'(we[0]), int'(wo[0]), 1), deg(int'(h[0]), int'(we[0]), int'(wo[0]), 2));
      r0 = mn(d0, deg(int'(h[1]), int'(we[1]), int'(wo[1]), 3));
      r1 = deg(int'(h[0]), int'(we[0]), int'(wo[0]), 2);
      if (r0 > 0 && r1 > 0) merges++;
      exp_alt[4] = mx(r0, r1);
      exp_alt[7] = mx(deg(int'(h[0]), int'(we[0]), int'(wo[0]), 5), deg(int'(h[1]), int'(we[1]), int'(wo[1]), 0));
      have = 1;
      repeat (255) @(posedge clk);
      @(posedge clk); #1;
    end
    checks++;
    if (merges == 0) begin failures++; $display("no MAX merge exercised"); end
    $display("merges=%0d", merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
