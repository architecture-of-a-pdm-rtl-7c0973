// control_unit: clock enables, frame timing and power-up reset.
//
// The controller runs from one input clock clk. The control unit derives
//   * the system clock, as an enable ctrl.tick that is high in one clk cycle
//     out of CLK_DIV (the input clock divided by four),
//   * the main clock cycle, a frame of 2**RES_BITS system cycles, by counting
//     the position x on every tick (the system clock divided by the
//     x-resolution), flagged by ctrl.frame_start / ctrl.frame_end,
//   * a power-up reset: por_n (active low, asynchronous, e.g. from a
//     power-on-reset cell) is synchronised and stretched so that rst stays
//     high for RST_TICKS system cycles after por_n is released.
// The division ratios follow the described controller; using enables on a
// single clock instead of derived clocks, and the reset stretch length, are
// this design's choices. main_clk is a 50 % duty copy of the frame period
// for external PDM sources (high in the first half of each frame).
module control_unit
  import fc_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 4,
  parameter int unsigned RST_TICKS = 4
) (
  input  logic     clk,
  input  logic     por_n,
  output logic     rst,
  output fc_ctrl_t ctrl,
  output logic     main_clk
);

  localparam int unsigned DIV_W = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned RST_W = $clog2(RST_TICKS + 1);

  logic [DIV_W-1:0] div_q;
  pos_t             x_q;
  logic [1:0]       por_sync_q;
  logic [RST_W-1:0] rst_cnt_q;
  logic             tick;

  assign tick = (div_q == DIV_W'(CLK_DIV - 1));

  // input clock divider -> system clock enable
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) div_q <= '0;
    else if (tick) div_q <= '0;
    else div_q <= div_q + 1'b1;
  end

  // position counter -> main clock cycle
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) x_q <= '0;
    else if (tick) x_q <= x_q + 1'b1;
  end

  // power-up reset: synchronise release, then hold for RST_TICKS system cycles
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      por_sync_q <= '0;
      rst_cnt_q  <= '0;
    end else begin
      por_sync_q <= {por_sync_q[0], 1'b1};
      if (por_sync_q[1] && tick && rst_cnt_q != RST_W'(RST_TICKS))
        rst_cnt_q <= rst_cnt_q + 1'b1;
    end
  end

  assign rst              = (rst_cnt_q != RST_W'(RST_TICKS));
  assign ctrl.tick        = tick;
  assign ctrl.x           = x_q;
  assign ctrl.frame_start = (x_q == '0);
  assign ctrl.frame_end   = (x_q == '1);
  assign main_clk         = ~x_q[RES_BITS-1];

endmodule
