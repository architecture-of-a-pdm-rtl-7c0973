// parallel_min: minimum of N unsigned words, computed bit-parallel from the
// most significant bit down.
//
// Bit b of the minimum is the AND over all inputs of (in_k[b] OR out_k),
// where out_k ("knocked out") marks an input already known to be larger
// than the minimum. An input is knocked out at bit b when it has a 1 where
// the minimum has a 0; once out it stays out. Each bit level is one AND
// over the inputs plus one AND/OR pair per input, so the delay grows with
// the word width but hardly with N, and another input costs one column of
// gates. The gate structure follows the described parallel MIN gate;
// the width and input count are parameters.
// Combinational.
module parallel_min #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        min
);

  logic [N-1:0] out_q [W+1];   // knocked-out flags entering each bit level

  always_comb begin
    out_q[W] = '0;
    for (int b = W - 1; b >= 0; b--) begin
      min[b] = 1'b1;
      for (int k = 0; k < N; k++)
        min[b] &= in[k][b] | out_q[b+1][k];
      for (int k = 0; k < N; k++)
        out_q[b][k] = out_q[b+1][k] | (in[k][b] & ~min[b]);
    end
  end

endmodule
