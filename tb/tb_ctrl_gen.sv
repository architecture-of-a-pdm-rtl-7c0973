// tb_ctrl_gen: frame timing source for block testbenches. Produces the
// fc_ctrl_t bundle with a tick every DIV clk cycles and x counting from 0
// at the first tick after rst is released.
module tb_ctrl_gen
  import fc_pkg::*;
#(
  parameter int unsigned DIV = 1
) (
  input  logic     clk,
  input  logic     rst,
  output fc_ctrl_t ctrl
);
  int unsigned div;
  pos_t        x;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= 0;
      x   <= '0;
    end else begin
      div <= (div == DIV - 1) ? 0 : div + 1;
      if (div == DIV - 1) x <= x + 1'b1;
    end
  end

  assign ctrl.tick        = !rst && (div == DIV - 1);
  assign ctrl.x           = x;
  assign ctrl.frame_start = (x == '0);
  assign ctrl.frame_end   = (x == '1);
endmodule
