// mf_demux: puts the two PDM membership signals of one input onto the MF
// wires MF0 .. MF{NUM_MF-1}.
//
// The lower active MF has number h. If h is even, the even signal drives
// wire h and the odd signal wire h+1; if h is odd, the odd signal drives
// wire h and the even signal wire h+1. All other wires are low (degree 0).
// A wire h+1 beyond the last MF is dropped. Combinational.
module mf_demux
  import fc_pkg::*;
(
  input  mf_idx_t             h,
  input  logic                even_pdm,
  input  logic                odd_pdm,
  output logic [NUM_MF-1:0]   mf
);

  always_comb begin
    mf = '0;
    mf[h] = h[0] ? odd_pdm : even_pdm;
    if (h != mf_idx_t'(NUM_MF - 1))
      mf[h + 1'b1] = h[0] ? even_pdm : odd_pdm;
  end

endmodule
