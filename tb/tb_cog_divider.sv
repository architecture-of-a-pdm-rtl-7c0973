// tb_cog_divider: loads random numerator/denominator pairs whose quotient
// lies in 0..255 (plus den = 0, quotient 255 and tiny denominators) and
// checks floor(num/den) at the end of the same frame: the divider has
// exactly one frame.
module tb_cog_divider;
  import fc_pkg::*;

  logic clk = 0, rst = 1;
  fc_ctrl_t ctrl;
  logic [23:0] num;
  logic [15:0] den;
  pos_t o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_ctrl_gen u_cg (.clk, .rst, .ctrl);
  cog_divider dut (.clk, .rst, .ctrl, .num, .den, .o);

  initial begin
    int q, d, r, e1;
    num = '0; den = '0;
    e1 = -1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 40; f++) begin
      case (f)
        0: begin d = 0;     q = 0;   r = 0; end
        1: begin d = 65280; q = 255; r = 0; end
        2: begin d = 1;     q = 255; r = 0; end
        3: begin d = 7;     q = 0;   r = 6; end
        default: begin
          d = $urandom_range(65280, 1);
          q = $urandom_range(255);
          r = $urandom_range(d - 1);
        end
      endcase
      den = 16'(d);
      num = (d == 0) ? 24'($urandom_range(1000)) : 24'(q * d + r);
      // num/den are divided during this frame; o shows the quotient from
      // the frame end on
      @(negedge clk);
      if (e1 >= 0) begin
        checks++;
        if (int'(o) != e1) begin
          failures++;
          if (failures < 10) $display("f=%0d o=%0d exp=%0d", f, o, e1);
        end
      end
      e1 = (d == 0) ? 0 : q;
      repeat (256) @(posedge clk);
      #1;
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
