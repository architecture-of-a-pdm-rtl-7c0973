// tb_pdm_d: drives pulses of random width and random bit patterns and
// checks the count presented during the following frame, including the
// saturation of a pulse that lasts the whole frame.
module tb_pdm_d;
  import fc_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  logic pdm;
  val_t v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  pdm_d dut (.clk, .rst, .ctrl, .pdm, .v);

  int frame_cnt, prev_cnt;
  logic [255:0] pattern;

  initial begin
    pdm = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    prev_cnt = -1;
    for (int f = 0; f < 12; f++) begin
      int w;
      w = (f == 1) ? 256 : (f == 2) ? 0 : int'($urandom_range(255));
      for (int b = 0; b < 256; b++)
        pattern[b] = (f >= 8) ? 1'($urandom_range(1)) : (b < w);
      frame_cnt = 0;
      for (int x = 0; x < 256; x++) begin
        pdm = pattern[x];
        if (pattern[x]) frame_cnt++;
        // during this frame v holds the previous frame's count
        @(negedge clk);
        if (prev_cnt >= 0) begin
          checks++;
          if (int'(v) != prev_cnt) begin
            failures++;
            if (failures < 10) $display("f=%0d v=%0d exp=%0d", f, v, prev_cnt);
          end
        end
        @(posedge clk); #1;
      end
      prev_cnt = (frame_cnt > 255) ? 255 : frame_cnt;
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
