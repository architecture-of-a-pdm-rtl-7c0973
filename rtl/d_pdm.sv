// d_pdm: digital to pulse-duration-modulated (PDM) converter.
//
// A value v becomes a pulse that starts with the frame and lasts v system
// cycles: the output is high in phases x = 0 .. v-1 and low from x = v on.
// Because every PDM signal in the controller starts at x = 0, the minimum
// of two such signals is their AND and the maximum their OR.
// The converter compares v with the frame's position counter (one
// comparator); the comparator form is this design's choice, the pulse
// convention follows the described converter.
// Timing: combinational; v must be held for the whole frame.
module d_pdm
  import fc_pkg::*;
(
  input  fc_ctrl_t ctrl,
  input  val_t     v,
  output logic     pdm
);

  assign pdm = (ctrl.x < pos_t'(v));

endmodule
