// tb_control_unit: checks the clock division by four, the frame of 256
// system cycles, the frame flags and the power-up reset stretch.
module tb_control_unit;
  import fc_pkg::*;

  logic clk = 0, por_n = 0;
  logic rst, main_clk;
  fc_ctrl_t ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .por_n, .rst, .ctrl, .main_clk);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int cyc, ticks, last_tick, rst_ticks, exp_x;
    repeat (3) @(posedge clk);
    #1 por_n = 1;
    // reset must last 4 system cycles after release (plus synchroniser)
    cyc = 0; rst_ticks = 0;
    while (rst) begin
      @(posedge clk); #1;
      cyc++;
      if (ctrl.tick) rst_ticks++;
      if (cyc > 100) break;
    end
    check(cyc >= 4 * 4 && cyc <= 4 * 4 + 8, "reset length");
    // follow three frames
    ticks = 0; last_tick = -1; cyc = 0;
    exp_x = -1;
    repeat (3 * 256 * 4 + 8) begin
      @(negedge clk);
      cyc++;
      if (ctrl.tick) begin
        if (last_tick >= 0) check(cyc - last_tick == 4, "tick period");
        last_tick = cyc;
        if (exp_x >= 0) check(int'(ctrl.x) == exp_x, "x sequence");
        exp_x = (int'(ctrl.x) + 1) % 256;
        check(ctrl.frame_start == (ctrl.x == 0), "frame_start");
        check(ctrl.frame_end == (ctrl.x == 255), "frame_end");
        check(main_clk == (ctrl.x < 128), "main_clk");
        check(!rst, "rst low");
        ticks++;
      end
    end
    check(ticks >= 3 * 256, "tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
