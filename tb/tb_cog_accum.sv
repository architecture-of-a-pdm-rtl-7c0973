// tb_cog_accum: random membership values (including all-zero and
// all-full frames) over a frame; in the next frame num must equal
// sum x*mu(x) and den sum mu(x).
module tb_cog_accum;
  import fc_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  val_t mu;
  logic [23:0] num;
  logic [15:0] den;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  cog_accum dut (.clk, .rst, .ctrl, .mu, .num, .den);

  initial begin
    longint en, ed;
    logic have;
    mu = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    have = 0;
    for (int f = 0; f < 15; f++) begin
      longint sn, sd;
      sn = 0; sd = 0;
      for (int x = 0; x < 256; x++) begin
        mu = (f == 1) ? 8'd255 : (f == 2) ? 8'd0 : 8'($urandom_range(255));
        sn += longint'(x) * longint'(mu);
        sd += longint'(mu);
        @(negedge clk);
        if (have && x == 0) begin
          checks += 2;
          if (longint'(num) != en) begin failures++; $display("f=%0d num=%0d exp=%0d", f, num, en); end
          if (longint'(den) != ed) begin failures++; $display("f=%0d den=%0d exp=%0d", f, den, ed); end
        end
        @(posedge clk); #1;
      end
      en = sn; ed = sd; have = 1;
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
