// tb_rulebase_prog: programs a random rule memory (valid rules scattered
// over all 256 addresses, including the first and the last), drives random
// fuzzified inputs and checks Reg0'..Reg7' in the following frame against
// alpha_j = max over the valid rules for MF j of min(premise degrees).
// The rule memory is reprogrammed between runs.
module tb_rulebase_prog;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  logic rule_we;
  logic [7:0] rule_addr;
  logic [9:0] rule_data;
  mf_idx_t [1:0] h;
  val_t [1:0] we, wo;
  val_t [7:0] alpha;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  rulebase_prog dut (.clk, .rst, .ctrl, .rule_we, .rule_addr, .rule_data,
                     .h, .w_even(we), .w_odd(wo), .alpha);

  logic [9:0] rules [256];

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction

  initial begin
    int expv [8];
    int r;
    logic have;
    rule_we = 0; rule_addr = '0; rule_data = '0;
    h = '0; we = '0; wo = '0;
    have = 0;
    for (int run = 0; run < 3; run++) begin
      rst = 1;
      for (int a = 0; a < 256; a++) begin
        logic v;
        v = (a == 0 || a == 255) ? 1'b1 : ($urandom_range(99) < 25);
        rules[a] = {v, 3'($urandom_range(7)), 3'($urandom_range(7)), 3'($urandom_range(7))};
        rule_we = 1; rule_addr = 8'(a); rule_data = rules[a];
        @(posedge clk); #1;
      end
      rule_we = 0;
      rst = 0;
      have = 0;
      for (int f = 0; f < 12; f++) begin
        for (int i = 0; i < 2; i++) begin
          h[i]  = mf_idx_t'($urandom_range(7));
          we[i] = val_t'($urandom_range(255));
          wo[i] = val_t'($urandom_range(255));
        end
        @(negedge clk);
        if (have) begin
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(alpha[j]) != expv[j]) begin
              failures++;
              if (failures < 10) $display("run=%0d f=%0d j=%0d a=%0d exp=%0d", run, f, j, alpha[j], expv[j]);
            end
          end
        end
        for (int j = 0; j < 8; j++) expv[j] = 0;
        for (int a = 0; a < 256; a++) begin
          if (!rules[a][9]) continue;
          r = mn(deg(int'(h[0]), int'(we[0]), int'(wo[0]), int'(rules[a][8:6])),
                 deg(int'(h[1]), int'(we[1]), int'(wo[1]), int'(rules[a][5:3])));
          if (r > expv[rules[a][2:0]]) expv[rules[a][2:0]] = r;
        end
        have = 1;
        repeat (256) @(posedge clk);
        #1;
      end
    end
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
