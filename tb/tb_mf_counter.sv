// tb_mf_counter: feeds the even/odd values of the triangular reference MFs
// and checks that h is the lower active MF in every phase of two frames.
module tb_mf_counter;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  val_t y_even, y_odd;
  mf_idx_t h;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  mf_counter dut (.clk, .rst, .ctrl, .y_even, .y_odd, .h);

  always_comb begin
    int e, o;
    e = 0; o = 0;
    for (int j = 0; j < 8; j += 2) if (mf_ref(j, int'(ctrl.x)) > e) e = mf_ref(j, int'(ctrl.x));
    for (int j = 1; j < 8; j += 2) if (mf_ref(j, int'(ctrl.x)) > o) o = mf_ref(j, int'(ctrl.x));
    y_even = val_t'(e);
    y_odd  = val_t'(o);
  end

  initial begin
    int x, eh;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (2 * 256) begin
      @(negedge clk);
      x = int'(ctrl.x);
      eh = x / 36;
      if (eh > 7) eh = 7;
      checks++;
      if (int'(h) != eh) begin
        failures++;
        if (failures < 10) $display("x=%0d h=%0d exp=%0d", x, h, eh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
