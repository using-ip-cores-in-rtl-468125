// comb_wrapper: wrapper that gives a combinational IP core the
// synchronous-module control interface.
//
// A combinational core has no clock, so control flow never rests inside it and
// go_depth, abrt, susp and prmt cannot change what it does. The status outputs
// are therefore constant: inst = 1, insd = 0, term = 0. The core's result is
// forwarded only in a step in which the module is activated; in every other
// step the output carries the value the surrounding program gives it:
//   y = go_surf ? y_core : y_in
// The core's inputs go straight to the core and do not pass through here.
//
// Interface: ctrl_in / ctrl_out (aif_pkg structs), y_core from the core, y_in
// from the surrounding program, y to it. Purely combinational, no clock.
//
// All of this follows the described wrapper for combinational cores; only the
// parameterised width is this design's own.
module comb_wrapper
  import aif_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  aif_ctrl_in_t  ctrl_in,
  output aif_ctrl_out_t ctrl_out,
  input  logic [W-1:0]  y_core,
  input  logic [W-1:0]  y_in,
  output logic [W-1:0]  y
);

  assign ctrl_out.inst = 1'b1;
  assign ctrl_out.insd = 1'b0;
  assign ctrl_out.term = 1'b0;

  assign y = ctrl_in.go_surf ? y_core : y_in;

endmodule
