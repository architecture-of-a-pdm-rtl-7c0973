// fc_pkg: types and constants shared by the PDM fuzzy controller.
//
// The controller works on frames ("main clock cycles") of 2**RES_BITS
// system clock cycles. During one frame the position x on the universe of
// discourse runs from 0 to 2**RES_BITS-1, one step per system clock.
// The control unit broadcasts the frame timing to every block as an
// fc_ctrl_t bundle; all state changes happen on clk when ctrl.tick is set.
//
// Widths follow the 8-bit resolution and the 8 membership functions (MFs)
// per variable of the described controller. The bundle layout, the MF
// memory write port and the rule word format are this design's own choices.
package fc_pkg;

  localparam int unsigned RES_BITS = 8;               // x-resolution in bits
  localparam int unsigned NPOS     = 1 << RES_BITS;   // system cycles per frame
  localparam int unsigned VAL_W    = 8;               // membership value width
  localparam int unsigned NUM_MF   = 8;               // MFs per variable
  localparam int unsigned MF_IDX_W = 3;               // width of an MF number
  localparam int unsigned MEM_AW   = 8;               // MF memory address width

  typedef logic [RES_BITS-1:0] pos_t;
  typedef logic [VAL_W-1:0]    val_t;
  typedef logic [MF_IDX_W-1:0] mf_idx_t;

  // Frame timing, valid for the current system cycle (phase x).
  //   tick        : system clock enable (one clk cycle in every CLK_DIV)
  //   x           : position of the current phase
  //   frame_start : phase x == 0 (first system cycle of a main cycle)
  //   frame_end   : phase x == NPOS-1; stage registers load on this tick
  typedef struct packed {
    logic tick;
    logic frame_start;
    logic frame_end;
    pos_t x;
  } fc_ctrl_t;

  // Write port of one MF memory pair (slope and position memory).
  typedef struct packed {
    logic                we;
    logic                sel_pos;   // 1: position memory, 0: slope memory
    logic [MEM_AW-1:0]   addr;
    logic [VAL_W-1:0]    data;
  } mf_wr_t;

endpackage
