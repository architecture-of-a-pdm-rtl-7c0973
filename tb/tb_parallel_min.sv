// tb_parallel_min: compares the bit-parallel MIN gate with a plain
// minimum, for three 4-bit inputs exhaustively and for two and five 8-bit
// inputs with random values (many of them equal or close).
module tb_parallel_min;
  logic [2:0][3:0] a;
  logic [3:0] ma;
  logic [4:0][7:0] b;
  logic [7:0] mb;
  logic [1:0][7:0] c;
  logic [7:0] mc;
  int checks = 0, failures = 0;

  parallel_min #(.N(3), .W(4)) dut_a (.in(a), .min(ma));
  parallel_min #(.N(5), .W(8)) dut_b (.in(b), .min(mb));
  parallel_min #(.N(2), .W(8)) dut_c (.in(c), .min(mc));

  initial begin
    int m;
    for (int v = 0; v < 4096; v++) begin
      a = 12'(v);
      #1;
      m = 15;
      for (int k = 0; k < 3; k++) if (int'(a[k]) < m) m = int'(a[k]);
      checks++;
      if (int'(ma) != m) begin
        failures++;
        if (failures < 10) $display("a=%h min=%0d exp=%0d", a, ma, m);
      end
    end
    for (int t = 0; t < 5000; t++) begin
      int base;
      base = $urandom_range(255);
      for (int k = 0; k < 5; k++)
        b[k] = (t % 2 != 0) ? 8'(base ^ $urandom_range(7)) : 8'($urandom_range(255));
      c[0] = 8'($urandom_range(255));
      c[1] = (t % 3 == 0) ? c[0] : 8'($urandom_range(255));
      #1;
      m = 255;
      for (int k = 0; k < 5; k++) if (int'(b[k]) < m) m = int'(b[k]);
      checks++;
      if (int'(mb) != m) failures++;
      checks++;
      if (mc != ((c[0] < c[1]) ? c[0] : c[1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
