// tb_mf_generator: checks MF reconstruction from the compressed memories.
// Part 1 loads the eight triangular reference MFs (even block into one
// generator, odd block into another) and compares every value of two
// frames, and the reported MF number, with the closed-form triangles.
// Part 2 loads random start values, slopes and strictly increasing
// breakpoints and compares with y(x) = y(x-1) + m_k for x_{k-1} < x <= x_k.
module tb_mf_generator;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  mf_wr_t wr_e, wr_o, wr_r;
  val_t y_e, y_o, y_r;
  logic [1:0] no_e, no_o, no_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  mf_generator dut_e (.clk, .rst, .ctrl, .wr(wr_e), .y(y_e), .mf_no(no_e));
  mf_generator dut_o (.clk, .rst, .ctrl, .wr(wr_o), .y(y_o), .mf_no(no_o));
  mf_generator dut_r (.clk, .rst, .ctrl, .wr(wr_r), .y(y_r), .mf_no(no_r));

  int rslope [256];
  int rpos   [256];
  int rref   [256];

  task automatic wr_all(ref mf_wr_t w, input int k, input int slope, input int pos);
    w = '{we: 1'b1, sel_pos: 1'b0, addr: 8'(k), data: 8'(slope)};
    @(posedge clk); #1;
    w = '{we: 1'b1, sel_pos: 1'b1, addr: 8'(k), data: 8'(pos)};
    @(posedge clk); #1;
    w.we = 1'b0;
  endtask

  function automatic int exp_even(int x);
    int m = 0;
    for (int j = 0; j < 8; j += 2) if (mf_ref(j, x) > m) m = mf_ref(j, x);
    return m;
  endfunction
  function automatic int exp_odd(int x);
    int m = 0;
    for (int j = 1; j < 8; j += 2) if (mf_ref(j, x) > m) m = mf_ref(j, x);
    return m;
  endfunction

  initial begin
    int n, x, k, acc;
    wr_e = '0; wr_o = '0; wr_r = '0;
    // reference triangles
    for (k = 0; k < 256; k++) begin
      wr_all(wr_e, k, mf_slope(0, k), mf_pos(k));
      wr_all(wr_o, k, mf_slope(1, k), mf_pos(k));
    end
    // random table: 12 breakpoints, last segment ends at 255
    n = 12;
    rslope[0] = $urandom_range(255);
    rpos[0] = 0;
    for (k = 1; k <= n; k++) begin
      rslope[k] = $urandom_range(255);
      rpos[k] = (k == n) ? 255 : rpos[k-1] + 1 + $urandom_range(30);
      if (rpos[k] > 255) rpos[k] = 255;
    end
    for (k = n + 1; k < 256; k++) begin rslope[k] = $urandom_range(255); rpos[k] = 0; end
    for (k = 0; k < 256; k++) wr_all(wr_r, k, rslope[k], rpos[k]);
    // reference: segment k covers rpos[k-1] < x <= rpos[k]
    acc = rslope[0];
    rref[0] = acc;
    for (x = 1; x < 256; x++) begin
      k = 1;
      while (k < n && x > rpos[k]) k++;
      acc = (acc + rslope[k]) % 256;
      rref[x] = acc;
    end
    @(posedge clk); #1 rst = 0;
    // skip first frame
    while (!(ctrl.tick && ctrl.frame_end)) @(posedge clk);
    repeat (2 * 256) begin
      @(negedge clk);
      x = int'(ctrl.x);
      checks += 3;
      if (int'(y_e) != exp_even(x)) begin
        failures++;
        if (failures < 10) $display("even x=%0d y=%0d exp=%0d", x, y_e, exp_even(x));
      end
      if (int'(y_o) != exp_odd(x)) begin
        failures++;
        if (failures < 10) $display("odd x=%0d y=%0d exp=%0d", x, y_o, exp_odd(x));
      end
      if (int'(y_r) != rref[x]) begin
        failures++;
        if (failures < 10) $display("rand x=%0d y=%0d exp=%0d", x, y_r, rref[x]);
      end
      checks += 2;
      if (int'(no_e) != (x < 36 ? 0 : x < 108 ? 1 : x < 180 ? 2 : 3)) begin
        failures++;
        if (failures < 10) $display("no_e x=%0d no=%0d", x, no_e);
      end
      if (int'(no_o) != (x < 72 ? 0 : x < 144 ? 1 : x < 216 ? 2 : 3)) begin
        failures++;
        if (failures < 10) $display("no_o x=%0d no=%0d", x, no_o);
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
