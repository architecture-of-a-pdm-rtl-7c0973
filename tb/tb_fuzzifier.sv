// tb_fuzzifier: loads the triangular reference MFs, applies PDM inputs of
// random duration (plus 0, 183 and 255) and checks, in the following
// frame, the latched degrees of MF h and h+1, the number h and the two
// regenerated PDM pulses.
module tb_fuzzifier;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  mf_wr_t wr_e, wr_o;
  logic in_pdm;
  val_t w_even, w_odd;
  mf_idx_t h;
  logic pe, po;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  fuzzifier dut (.clk, .rst, .ctrl, .wr_even(wr_e), .wr_odd(wr_o), .in_pdm,
                 .w_even, .w_odd, .h, .w_even_pdm(pe), .w_odd_pdm(po));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d", what, ctrl.x);
    end
  endtask

  initial begin
    int vin, prev, ee, eo, eh;
    wr_e = '0; wr_o = '0; in_pdm = 0;
    for (int k = 0; k < 256; k++) begin
      wr_e = '{1'b1, 1'b0, 8'(k), 8'(mf_slope(0, k))};
      wr_o = '{1'b1, 1'b0, 8'(k), 8'(mf_slope(1, k))};
      @(posedge clk); #1;
      wr_e = '{1'b1, 1'b1, 8'(k), 8'(mf_pos(k))};
      wr_o = '{1'b1, 1'b1, 8'(k), 8'(mf_pos(k))};
      @(posedge clk); #1;
    end
    wr_e = '0; wr_o = '0;
    rst = 0;
    // first frame: generators not yet synchronised
    repeat (256) @(posedge clk);
    #1;
    prev = -1;
    for (int f = 0; f < 30; f++) begin
      vin = (f == 0) ? 183 : (f == 1) ? 0 : (f == 2) ? 255 : (f == 3) ? 36 : int'($urandom_range(255));
      for (int x = 0; x < 256; x++) begin
        in_pdm = (x < vin);
        @(negedge clk);
        if (prev >= 0) begin
          eh = prev / 36; if (eh > 7) eh = 7;
          ee = 0; eo = 0;
          for (int j = 0; j < 8; j += 2) if (mf_ref(j, prev) > ee) ee = mf_ref(j, prev);
          for (int j = 1; j < 8; j += 2) if (mf_ref(j, prev) > eo) eo = mf_ref(j, prev);
          if (x == 0) begin
            chk(int'(w_even) == ee, "w_even");
            chk(int'(w_odd) == eo, "w_odd");
            chk(int'(h) == eh, "h");
          end
          chk(pe == (x < ee), "even pdm");
          chk(po == (x < eo), "odd pdm");
        end
        @(posedge clk); #1;
      end
      prev = vin;
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
