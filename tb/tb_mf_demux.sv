// tb_mf_demux: exhaustive check of the MF wire routing for every h and
// every combination of the even and odd signals.
module tb_mf_demux;
  import fc_pkg::*;

  mf_idx_t h;
  logic e, o;
  logic [7:0] mf, exp_mf;
  int checks = 0, failures = 0;

  mf_demux dut (.h, .even_pdm(e), .odd_pdm(o), .mf);

  initial begin
    for (int hh = 0; hh < 8; hh++)
      for (int b = 0; b < 4; b++) begin
        h = mf_idx_t'(hh); e = b[0]; o = b[1];
        #1;
        exp_mf = '0;
        // MF j is carried by the even signal if j is even
        exp_mf[hh] = (hh % 2 == 0) ? e : o;
        if (hh < 7) exp_mf[hh + 1] = ((hh + 1) % 2 == 0) ? e : o;
        checks++;
        if (mf !== exp_mf) begin
          failures++;
          $display("h=%0d e=%0b o=%0b mf=%b exp=%b", hh, e, o, mf, exp_mf);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
