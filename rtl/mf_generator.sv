// mf_generator: rebuilds a set of non-overlapping membership functions (one
// memory block, "even" or "odd") from their compressed, piecewise-linear form.
//
// Storage: a slope memory and a position memory, DEPTH words each.
//   slope[0]          start value m0 (the value at x = 0)
//   slope[k], pos[k]  for k > 0: slope m_k of segment k and the position x_k
//                     where segment k ends (the next slope change)
// Reconstruction (one value per system cycle, one frame per main cycle):
//   y(0) = m0
//   y(x) = y(x-1) + m_k   for x_{k-1} < x <= x_k   (x_0 = 0)
// The address counter starts at 1 with x = 1 and advances when the
// comparator sees the position counter reach pos[addr]. The adder is
// RES_BITS wide and wraps, so an 8-bit slope word read as two's complement
// gives any step from -255 to +255. The datapath (position memory,
// comparator A=B, position counter, address counter, slope memory, adder,
// 8-bit latch) follows the described MF generator; the wrapping slope
// encoding, the write port and the exact segment bounds are this design's
// reading.
//
// mf_no counts the MFs this block has produced so far in the frame: it
// starts at 0 and steps whenever the output falls back to zero. The
// inference unit uses it to pick the matching rule strength.
//
// Timing: y and mf_no belong to the current phase ctrl.x; they are registers
// updated on ctrl.tick. The position counter re-synchronises on every
// ctrl.frame_end, so the first frame after reset is not valid.
module mf_generator
  import fc_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned NO_W   = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  fc_ctrl_t         ctrl,
  input  mf_wr_t           wr,
  output val_t             y,
  output logic [NO_W-1:0]  mf_no
);

  localparam int unsigned AW = $clog2(DEPTH);

  val_t slope_mem [DEPTH];
  pos_t pos_mem   [DEPTH];

  logic [AW-1:0]   addr_q;   // address counter
  pos_t            pos_q;    // position counter (x of the current phase)
  val_t            acc_q;    // 8-bit latch behind the adder
  logic [NO_W-1:0] no_q;

  pos_t  pos_next;
  val_t  sum;
  logic  hit;                // comparator A=B

  assign pos_next = pos_q + 1'b1;
  assign sum      = acc_q + slope_mem[addr_q];
  assign hit      = (pos_mem[addr_q] == pos_next);

  always_ff @(posedge clk) begin
    if (wr.we) begin
      if (wr.sel_pos) pos_mem[wr.addr[AW-1:0]]   <= pos_t'(wr.data);
      else            slope_mem[wr.addr[AW-1:0]] <= wr.data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q <= '0;
      pos_q  <= '0;
      acc_q  <= '0;
      no_q   <= '0;
    end else if (ctrl.tick) begin
      if (ctrl.frame_end) begin
        acc_q  <= slope_mem[0];
        addr_q <= AW'(1);
        pos_q  <= '0;
        no_q   <= '0;
      end else begin
        acc_q <= sum;
        pos_q <= pos_next;
        if (hit && addr_q != AW'(DEPTH - 1)) addr_q <= addr_q + 1'b1;
        if (sum == '0 && acc_q != '0 && no_q != '1) no_q <= no_q + 1'b1;
      end
    end
  end

  assign y     = acc_q;
  assign mf_no = no_q;

endmodule
