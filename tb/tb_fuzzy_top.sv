// tb_fuzzy_top: end-to-end test of the controller at its default size
// (two inputs, 8-bit resolution, clock divided by four).
//
// All six MF memories get the triangular reference MFs; the rule memory
// gets the 64-rule table "In0 is A_a and In1 is B_b -> X_(a+b)/2". Random
// and corner input values are sent as PDM pulses, one pair per frame, and
// the rule base select is toggled. For every frame the expected crisp
// output is computed from scratch (membership degrees, rule strengths,
// clipped output function, centre of gravity, floor division) and compared
// with o four frames later, and with the width of o_pdm in the frame after.
// Counted mechanisms: frames through each rule base, rule base switches,
// rules merged by MAX, frames with no rule firing, every MF number h.
module tb_fuzzy_top;
  import fc_pkg::*;
  import tb_mf_pkg::*;

  localparam int NF = 40;

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

  fuzzy_top dut (.*);

  // frame position seen by the external PDM sources
  pos_t xt;
  pos_t xcur;
  assign xcur = frame_start ? '0 : xt;
  always_ff @(posedge clk)
    if (sys_tick) xt <= frame_start ? pos_t'(1) : xt + 1'b1;

  int v0 [NF], v1 [NF];
  logic sel [NF];
  int exp_o [NF];
  int frame = -1;        // frame index of stimulus, -1 before the first
  int pdm_w;

  assign in_pdm[0] = (frame >= 0 && frame < NF) ? (int'(xcur) < v0[frame]) : 1'b0;
  assign in_pdm[1] = (frame >= 0 && frame < NF) ? (int'(xcur) < v1[frame]) : 1'b0;
  assign rb_sel    = (frame >= 2 && frame < NF + 2) ? sel[frame - 2] : 1'b0;

  // mechanism counters
  int n_hw = 0, n_prog = 0, n_switch = 0, n_merge = 0, n_none = 0;
  bit h_seen [8];

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  function automatic int model(int a, int b, bit use_prog, output int merged);
    int alpha [8];
    int cnt [8];
    longint sn, sd;
    merged = 0;
    for (int j = 0; j < 8; j++) begin alpha[j] = 0; cnt[j] = 0; end
    if (!use_prog) begin
      for (int j = 0; j < 8; j++) alpha[j] = mn(mf_ref(j, a), mf_ref(j, b));
    end else begin
      for (int p = 0; p < 8; p++)
        for (int q = 0; q < 8; q++) begin
          int r;
          r = mn(mf_ref(p, a), mf_ref(q, b));
          if (r > 0) cnt[(p + q) / 2]++;
          alpha[(p + q) / 2] = mx(alpha[(p + q) / 2], r);
        end
      for (int j = 0; j < 8; j++) if (cnt[j] > 1) merged = 1;
    end
    sn = 0; sd = 0;
    for (int x = 0; x < 256; x++) begin
      int m;
      m = 0;
      for (int j = 0; j < 8; j++) m = mx(m, mn(mf_ref(j, x), alpha[j]));
      sn += longint'(x) * m;
      sd += longint'(m);
    end
    return (sd == 0) ? 0 : int'(sn / sd);
  endfunction

  task automatic wr_mf(input int g, input bit pos, input int k, input int d);
    mf_gen = 3'(g);
    mf_wr = '{we: 1'b1, sel_pos: pos, addr: 8'(k), data: 8'(d)};
    @(posedge clk); #1;
    mf_wr.we = 1'b0;
  endtask

  initial begin
    int merged, ck;
    mf_wr = '0; mf_gen = '0; rule_we = 0; rule_addr = '0; rule_data = '0;
    // stimulus and expected results
    for (int f = 0; f < NF; f++) begin
      case (f)
        0: begin v0[f] = 183; v1[f] = 183; end
        1: begin v0[f] = 0;   v1[f] = 255; end
        2: begin v0[f] = 255; v1[f] = 255; end
        3: begin v0[f] = 36;  v1[f] = 100; end
        default: begin v0[f] = $urandom_range(255); v1[f] = $urandom_range(255); end
      endcase
      sel[f] = (f < 6) ? 1'b0 : (f < 12) ? 1'b1 : 1'($urandom_range(1));
      if (f == 5) begin v0[f] = 0; v1[f] = 255; end
      exp_o[f] = model(v0[f], v1[f], sel[f], merged);
      if (sel[f]) n_prog++; else n_hw++;
      if (f > 0 && sel[f] != sel[f-1]) n_switch++;
      if (merged != 0) n_merge++;
      ck = v0[f] / 36; if (ck > 7) ck = 7; h_seen[ck] = 1;
      ck = v1[f] / 36; if (ck > 7) ck = 7; h_seen[ck] = 1;
    end
    // program memories while in power-up reset
    for (int g = 0; g < 6; g++)
      for (int k = 0; k < 256; k++) begin
        wr_mf(g, 1'b0, k, mf_slope(g % 2, k));
        wr_mf(g, 1'b1, k, mf_pos(k));
      end
    for (int a = 0; a < 256; a++) begin
      int p, q;
      p = a % 8; q = (a / 8) % 8;
      rule_we = 1; rule_addr = 8'(a);
      rule_data = (a < 64) ? {1'b1, 3'(p), 3'(q), 3'((p + q) / 2)} : 10'd0;
      @(posedge clk); #1;
    end
    rule_we = 0;
    por_n = 1;
    wait (!rst);
    // align to a frame start, let one frame pass so the generators sync
    @(posedge clk iff (sys_tick && xcur == 8'd255));
    @(posedge clk iff (sys_tick && xcur == 8'd255));
    frame = 0;
    for (int f = 0; f < NF + 5; f++) begin
      // this is frame f; result of frame f-4 is on o, its PDM in frame f-5
      pdm_w = 0;
      for (int x = 0; x < 256; x++) begin
        @(negedge clk iff sys_tick);
        if (o_pdm) pdm_w++;
        if (x == 0 && f >= 4 && f - 4 < NF) begin
          checks++;
          if (int'(o) != exp_o[f - 4]) begin
            failures++;
            if (failures < 10)
              $display("frame %0d in=(%0d,%0d) sel=%0b o=%0d exp=%0d", f - 4,
                       v0[f-4], v1[f-4], sel[f-4], o, exp_o[f - 4]);
          end
        end
        if (x < 255) @(posedge clk);
      end
      if (f >= 4 && f - 4 < NF) begin
        checks++;
        if (pdm_w != exp_o[f - 4]) begin
          failures++;
          if (failures < 10) $display("frame %0d o_pdm width %0d exp %0d", f - 4, pdm_w, exp_o[f-4]);
        end
      end
      @(posedge clk);
      frame++;
    end
    for (int f = 0; f < NF; f++) if (exp_o[f] == 0 && !sel[f]) n_none++;
    $display("hw=%0d prog=%0d switches=%0d merges=%0d no_rule=%0d", n_hw, n_prog, n_switch, n_merge, n_none);
    checks += 5;
    if (n_hw == 0)     begin failures++; $display("hardwired rule base never used"); end
    if (n_prog == 0)   begin failures++; $display("programmable rule base never used"); end
    if (n_switch == 0) begin failures++; $display("rule base never switched"); end
    if (n_merge == 0)  begin failures++; $display("no MAX merge of rules"); end
    if (n_none == 0)   begin failures++; $display("no frame without firing rule"); end
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (!h_seen[j]) begin failures++; $display("h=%0d never used", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
