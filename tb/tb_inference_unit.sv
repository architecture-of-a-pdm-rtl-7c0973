// tb_inference_unit: loads the triangular reference MFs as output MFs,
// applies random rule strengths (some zero, some full) and checks every
// value of the resulting function: mu(x) = max_j min(MF_j(x), alpha_j).
module tb_inference_unit;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  mf_wr_t wr_e, wr_o;
  val_t [7:0] alpha;
  val_t mu;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  inference_unit dut (.clk, .rst, .ctrl, .wr_even(wr_e), .wr_odd(wr_o), .alpha, .mu);

  initial begin
    int e, c;
    wr_e = '0; wr_o = '0; alpha = '0;
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
    repeat (256) @(posedge clk);
    #1;
    for (int f = 0; f < 20; f++) begin
      for (int j = 0; j < 8; j++) begin
        c = $urandom_range(5);
        alpha[j] = (c == 0) ? 8'd0 : (c == 1) ? 8'd255 : 8'($urandom_range(255));
      end
      for (int x = 0; x < 256; x++) begin
        @(negedge clk);
        e = 0;
        for (int j = 0; j < 8; j++) begin
          c = mf_ref(j, x);
          if (int'(alpha[j]) < c) c = int'(alpha[j]);
          if (c > e) e = c;
        end
        checks++;
        if (int'(mu) != e) begin
          failures++;
          if (failures < 10) $display("f=%0d x=%0d mu=%0d exp=%0d", f, x, mu, e);
        end
        @(posedge clk); #1;
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
