// tb_pendulum: the controller configured like a two-input inverted-
// pendulum controller: 7 triangular MFs per input and for the output
// (peaks every 42 steps) and 19 rules, loaded both into the programmable
// rule memory and as the hardwired rule table. The rule table is a
// stand-in with the right size: "In0 is A_a and In1 is B_b -> X_(a-b+6)/2"
// for the 19 pairs with 5 <= a+b <= 7. Random input pairs are run through
// both rule bases and compared with a reference computation, and the
// operation rate is checked: one result per 4*256 input clock cycles,
// i.e. about 5860 operations per second at a 6 MHz input clock.
module tb_pendulum;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  localparam int NMF = 7, SP = 42, SL = 6;
  localparam int NR = 19;
  localparam int NF = 24;

  typedef logic [NR-1:0][1:0][7:0] rin_t;
  typedef logic [NR-1:0][2:0]      rout_t;

  function automatic rin_t make_in();
    rin_t r;
    int n;
    n = 0;
    r = '0;
    for (int a = 0; a < NMF; a++)
      for (int b = 0; b < NMF; b++)
        if (a + b >= 5 && a + b <= 7) begin
          r[n][0] = 8'(1 << a);
          r[n][1] = 8'(1 << b);
          n++;
        end
    return r;
  endfunction

  function automatic rout_t make_out();
    rout_t r;
    int n;
    n = 0;
    r = '0;
    for (int a = 0; a < NMF; a++)
      for (int b = 0; b < NMF; b++)
        if (a + b >= 5 && a + b <= 7) begin
          r[n] = 3'((a - b + 6) / 2);
          n++;
        end
    return r;
  endfunction

  localparam rin_t  RIN  = make_in();
  localparam rout_t ROUT = make_out();

  logic clk = 0, por_n = 0;
  logic [1:0] in_pdm;
  logic rb_sel;
  mf_wr_t mf_wr;
  logic [2:0] mf_gen;
  logic rule_we;
  logic [7:0] rule_addr;
  logic [9:0] rule_data;
  logic sys_tick, frame_start, main_clk, rst, o_pdm;
  pos_t o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fuzzy_top #(.HW_RULES(NR), .HW_RULE_IN(RIN), .HW_RULE_OUT(ROUT)) dut (.*);

  pos_t xt, xcur;
  assign xcur = frame_start ? '0 : xt;
  always_ff @(posedge clk)
    if (sys_tick) xt <= frame_start ? pos_t'(1) : xt + 1'b1;

  int v0 [NF], v1 [NF];
  logic sel [NF];
  int exp_o [NF];
  int frame = -1;

  assign in_pdm[0] = (frame >= 0 && frame < NF) ? (int'(xcur) < v0[frame]) : 1'b0;
  assign in_pdm[1] = (frame >= 0 && frame < NF) ? (int'(xcur) < v1[frame]) : 1'b0;
  assign rb_sel    = (frame >= 2 && frame < NF + 2) ? sel[frame - 2] : 1'b0;

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  function automatic int model(int a, int b);
    int alpha [8];
    longint sn, sd;
    for (int j = 0; j < 8; j++) alpha[j] = 0;
    for (int r = 0; r < NR; r++) begin
      int p, q;
      for (int k = 0; k < 8; k++) begin
        if (RIN[r][0][k]) p = k;
        if (RIN[r][1][k]) q = k;
      end
      alpha[ROUT[r]] = mx(alpha[ROUT[r]], mn(mfg_ref(NMF, SP, SL, p, a), mfg_ref(NMF, SP, SL, q, b)));
    end
    sn = 0; sd = 0;
    for (int x = 0; x < 256; x++) begin
      int m;
      m = 0;
      for (int j = 0; j < NMF; j++) m = mx(m, mn(mfg_ref(NMF, SP, SL, j, x), alpha[j]));
      sn += longint'(x) * m;
      sd += longint'(m);
    end
    return (sd == 0) ? 0 : int'(sn / sd);
  endfunction

  initial begin
    mf_wr = '0; mf_gen = '0; rule_we = 0; rule_addr = '0; rule_data = '0;
    for (int f = 0; f < NF; f++) begin
      v0[f] = $urandom_range(255);
      v1[f] = $urandom_range(255);
      sel[f] = 1'(f % 2);
      exp_o[f] = model(v0[f], v1[f]);
    end
    for (int g = 0; g < 6; g++)
      for (int k = 0; k < 256; k++) begin
        mf_gen = 3'(g);
        mf_wr = '{1'b1, 1'b0, 8'(k), 8'(mfg_slope(NMF, SP, SL, g % 2, k))};
        @(posedge clk); #1;
        mf_wr = '{1'b1, 1'b1, 8'(k), 8'(mfg_pos(NMF, SP, k))};
        @(posedge clk); #1;
      end
    mf_wr = '0;
    for (int a = 0; a < 256; a++) begin
      rule_we = 1; rule_addr = 8'(a);
      rule_data = '0;
      if (a < NR) begin
        int p, q;
        for (int k = 0; k < 8; k++) begin
          if (RIN[a][0][k]) p = k;
          if (RIN[a][1][k]) q = k;
        end
        rule_data = {1'b1, 3'(p), 3'(q), ROUT[a]};
      end
      @(posedge clk); #1;
    end
    rule_we = 0;
    por_n = 1;
    wait (!rst);
    @(posedge clk iff (sys_tick && xcur == 8'd255));
    @(posedge clk iff (sys_tick && xcur == 8'd255));
    frame = 0;
    for (int f = 0; f < NF + 4; f++) begin
      // input clock cycles per controller operation (one frame)
      if (f >= 2) begin
        checks++;
        if (per_q != 4 * 256) begin failures++; $display("period %0d", per_q); end
      end
      for (int x = 0; x < 256; x++) begin
        @(negedge clk iff sys_tick);
        if (x == 0 && f >= 4) begin
          checks++;
          if (int'(o) != exp_o[f - 4]) begin
            failures++;
            if (failures < 10)
              $display("frame %0d in=(%0d,%0d) sel=%0b o=%0d exp=%0d", f - 4,
                       v0[f-4], v1[f-4], sel[f-4], o, exp_o[f - 4]);
          end
        end
        if (x < 255) begin
          @(posedge clk);
        end
      end
      @(posedge clk);
      frame++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input clock cycles between frame starts
  int clk_cnt = 0;
  int fs_last = -1;
  int per_q = 0;
  always @(posedge clk) begin
    clk_cnt++;
    if (sys_tick && frame_start) begin
      if (fs_last >= 0) per_q = clk_cnt - fs_last;
      fs_last = clk_cnt;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
