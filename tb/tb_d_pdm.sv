// tb_d_pdm: for random values and every phase of the frame, the pulse must
// be high exactly in phases 0 .. v-1.
module tb_d_pdm;
  import fc_pkg::*;

  fc_ctrl_t ctrl;
  val_t v;
  logic pdm;
  int checks = 0, failures = 0;

  d_pdm dut (.ctrl, .v, .pdm);

  initial begin
    int width;
    ctrl = '0;
    ctrl.tick = 1'b1;
    for (int t = 0; t < 40; t++) begin
      v = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : 8'($urandom_range(255));
      width = 0;
      for (int x = 0; x < 256; x++) begin
        ctrl.x = pos_t'(x);
        ctrl.frame_start = (x == 0);
        ctrl.frame_end = (x == 255);
        #1;
        if (pdm) width++;
        checks++;
        if (pdm != (x < int'(v))) begin
          failures++;
          if (failures < 10) $display("v=%0d x=%0d pdm=%0b", v, x, pdm);
        end
      end
      checks++;
      if (width != int'(v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
