// sync_ip_top: the two kinds of wrapped IP module side by side.
//
// u_prog is the example synchronous program that accumulates a dot product by
// calling the sequential multiplier IP module in a loop (dot_product_prog ->
// multiplier_module -> seq_wrapper_ctrl + seq_multiplier). Its control
// interface (prog_ctrl_in / prog_ctrl_out) is what a calling program, or a
// surrounding abort or suspend statement, would drive.
//
// u_comb is the wrapper for a combinational IP core. The core itself is not
// part of this design: its result enters on comb_y_core, and its inputs are
// connected to it outside. comb_y_in is the value the surrounding program
// gives the output, comb_y the value the program then sees.
//
// Interface: clk, rst (synchronous, active high); the program's control
// structs, n, the arrays a_vec and b_vec, and sum; the combinational wrapper's
// control structs and data. Timing: see the two submodules.
module sync_ip_top
  import aif_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned N_MAX = 16,
  parameter int unsigned CW    = 32,
  localparam int unsigned NW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // dot-product program
  input  aif_ctrl_in_t  prog_ctrl_in,
  output aif_ctrl_out_t prog_ctrl_out,
  input  logic [NW-1:0] n,
  input  logic [W-1:0]  a_vec [N_MAX],
  input  logic [W-1:0]  b_vec [N_MAX],
  output logic [W-1:0]  sum,
  // combinational IP module
  input  aif_ctrl_in_t  comb_ctrl_in,
  output aif_ctrl_out_t comb_ctrl_out,
  input  logic [CW-1:0] comb_y_core,
  input  logic [CW-1:0] comb_y_in,
  output logic [CW-1:0] comb_y
);

  dot_product_prog #(.W(W), .N_MAX(N_MAX)) u_prog (
    .clk     (clk),
    .rst     (rst),
    .ctrl_in (prog_ctrl_in),
    .ctrl_out(prog_ctrl_out),
    .n       (n),
    .a_vec   (a_vec),
    .b_vec   (b_vec),
    .sum     (sum)
  );

  comb_wrapper #(.W(CW)) u_comb (
    .ctrl_in (comb_ctrl_in),
    .ctrl_out(comb_ctrl_out),
    .y_core  (comb_y_core),
    .y_in    (comb_y_in),
    .y       (comb_y)
  );

endmodule
