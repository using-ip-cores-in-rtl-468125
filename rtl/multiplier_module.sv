// multiplier_module: the sequential multiplier core wrapped as a module with
// the synchronous-module control interface, usable from a synchronous program
// like any compiled module (in sequence, in loops, under abort and suspend).
//
// The wrapper is made of seq_wrapper_ctrl and an output multiplexer:
//   * the core is started (valid) whenever the module is entered (go_depth);
//   * its clock enable is the inverse of susp, so a suspended call is frozen;
//   * term is raised in the step in which the core reports rdy while the
//     module is inside, and insd while the call is in progress;
//   * Y is the core's product while the module is active and its data flow is
//     not killed (~prmt & (insd | go_surf)), and y_in, the value the
//     surrounding program gives Y, in every other step.
// Because the core registers its inputs, the module may be entered again in
// the very step in which it terminates; one core is enough (the module's
// dupEnd and dupAny attributes are both false, see aif_pkg).
//
// Interface: clk, rst (clears the inside flag), ctrl_in / ctrl_out, the
// factors a and b, y_in and the output y. Timing: entered in step t, it
// terminates in step t + W + 1 (steps counted while not suspended).
//
// Structure, control equations and 32-bit widths follow the described example
// wrapper; the core's latency is the one of seq_multiplier.
module multiplier_module
  import aif_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  aif_ctrl_in_t  ctrl_in,
  output aif_ctrl_out_t ctrl_out,
  input  logic [W-1:0]  y_in,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [W-1:0]  y
);

  logic         define_vars;
  logic         core_ce;
  logic         core_valid;
  logic         core_rdy;
  logic [W-1:0] core_y;

  seq_wrapper_ctrl #(.TERMINATES(1'b1)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .ctrl_in    (ctrl_in),
    .ctrl_out   (ctrl_out),
    .core_rdy   (core_rdy),
    .define_vars(define_vars),
    .core_ce    (core_ce),
    .core_rst   (core_valid)
  );

  seq_multiplier #(.W(W)) u_core (
    .clk  (clk),
    .ce   (core_ce),
    .valid(core_valid),
    .a    (a),
    .b    (b),
    .y    (core_y),
    .rdy  (core_rdy)
  );

  assign y = define_vars ? core_y : y_in;

endmodule
