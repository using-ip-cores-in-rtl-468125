// dot_product_prog: hardware for the example synchronous program that uses the
// wrapped multiplier in a loop,
//
//     sum = 0; i = 0;
//     while (i < n) { MultiplierModule(A[i], B[i], P); next(sum) = sum + P; i = i + 1; }
//
// i.e. it forms sum = A[0]*B[0] + ... + A[n-1]*B[n-1] (mod 2^W).
//
// How it works. One flag, l_prog, says that control flow rests inside the loop,
// which is the same as "the multiplier call is in progress". When the program
// is entered (go_depth) it clears sum and i and, if n > 0, enters the
// multiplier module with A[0], B[0]. In the step in which the multiplier module
// terminates, the rest of the loop body runs in the same step: the product P is
// added to sum for the next step, i is incremented and, if the new i is still
// below n, the multiplier module is entered again in that same step with
// A[i], B[i]. The module's last step and the next call's first step thus
// overlap; this is legal because the multiplier registers its inputs. When
// the new i reaches n the program terminates (term) in that step.
//
// The program is itself a module with the control interface of aif_pkg:
//   * abrt aborts the loop: the inside flag is cleared and the multiplier call
//     is aborted with it; no new call is started. With prmt low (weak abort) the
//     actions of the current step still run, with prmt high (strong) they do not.
//   * susp freezes the loop and, through its clock enable, the multiplier core.
//     A frozen step runs no loop-body actions.
//   * prmt kills this step's data flow, here and in the multiplier module: a
//     product that arrives in such a step is not added (the loop index, which
//     belongs to the control flow here, still advances).
// These three are handed down unchanged to the multiplier module.
//
// Interface: clk, rst (clears the inside flags), ctrl_in / ctrl_out, n (loop
// count, values above N_MAX are taken as N_MAX), a_vec / b_vec (the arrays A
// and B), sum (current value of the program's output variable).
// Timing: with no suspension, entered in step t, it terminates in step
// t + n*(W + 1) (n >= 1); with n = 0 it terminates in the step it is entered.
//
// The loop and its use of the multiplier module follow the described example.
// Array size N_MAX, the treatment of i = i + 1 as an update visible in the
// loop test of the same step, P reading 0 outside the multiplier's steps, the
// clamping of n, and how abort and suspend act on the loop's own actions are
// this design's choices.
module dot_product_prog
  import aif_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned N_MAX = 16,
  localparam int unsigned NW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  aif_ctrl_in_t  ctrl_in,
  output aif_ctrl_out_t ctrl_out,
  input  logic [NW-1:0] n,
  input  logic [W-1:0]  a_vec [N_MAX],
  input  logic [W-1:0]  b_vec [N_MAX],
  output logic [W-1:0]  sum
);

  localparam int unsigned IW = (N_MAX > 1) ? $clog2(N_MAX) : 1;

  logic          l_prog;       // control flow is inside the loop
  logic [NW-1:0] i_reg;        // index of the multiplication in progress
  logic [W-1:0]  sum_reg;
  logic [NW-1:0] n_eff;
  logic [NW-1:0] i_new;        // i + 1, as seen by the loop test
  logic          start;
  logic          moving;       // control may move this step
  logic          body_ctrl;    // multiplier call ends and control moves on
  logic          body_data;    // loop-body actions after the call run
  logic          loop_exit;
  logic          restart;
  logic          first_call;
  logic [IW-1:0] idx;
  logic [W-1:0]  p;            // product P, as the multiplier module drives it
  logic [W-1:0]  sum_cur;

  aif_ctrl_in_t  m_ctrl_in;
  aif_ctrl_out_t m_ctrl_out;

  assign n_eff = (n > NW'(N_MAX)) ? NW'(N_MAX) : n;
  assign start = ctrl_in.go_depth;
  assign i_new = i_reg + 1'b1;

  assign moving     = l_prog & ~ctrl_in.susp & ~ctrl_in.abrt;
  assign body_ctrl  = moving & m_ctrl_out.term;
  assign body_data  = l_prog & ~ctrl_in.susp & ~ctrl_in.prmt & m_ctrl_out.term;
  assign loop_exit  = (i_new >= n_eff);
  assign restart    = body_ctrl & ~loop_exit & ~start;
  assign first_call = start & (n_eff != '0);

  // Index of the call being started: 0 when the program is entered, the
  // incremented i on a restart.
  assign idx = start ? '0 : IW'(i_new);

  assign m_ctrl_in.go_depth = first_call | restart;
  assign m_ctrl_in.go_surf  = first_call | restart;
  assign m_ctrl_in.abrt     = ctrl_in.abrt;
  assign m_ctrl_in.susp     = ctrl_in.susp;
  assign m_ctrl_in.prmt     = ctrl_in.prmt;

  multiplier_module #(.W(W)) u_mult (
    .clk     (clk),
    .rst     (rst),
    .ctrl_in (m_ctrl_in),
    .ctrl_out(m_ctrl_out),
    .y_in    ('0),
    .a       (a_vec[idx]),
    .b       (b_vec[idx]),
    .y       (p)
  );

  // sum = 0 is an immediate assignment: it already holds in the step the
  // program is entered (or its surface runs).
  assign sum_cur = ctrl_in.go_surf ? '0 : sum_reg;
  assign sum     = sum_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      l_prog  <= 1'b0;
      i_reg   <= '0;
      sum_reg <= '0;
    end else if (start) begin
      l_prog  <= first_call;
      i_reg   <= '0;
      sum_reg <= '0;
    end else begin
      l_prog <= (l_prog & ctrl_in.susp)
              | (moving & ~(m_ctrl_out.term & loop_exit));
      if (body_data) sum_reg <= sum_reg + p;
      if (body_data | body_ctrl) i_reg <= i_new;
    end
  end

  assign ctrl_out.inst = 1'b0;
  assign ctrl_out.insd = l_prog;
  assign ctrl_out.term = (start & (n_eff == '0)) | (body_ctrl & loop_exit & ~start);

  // The loop restarts the multiplier module in the step in which it
  // terminates, with one instance only. That is legal only for a module whose
  // attributes say it needs no duplicate.
  if (MULT_DUP_END || MULT_DUP_ANY) begin : g_dup_check
    $error("multiplier module would need a duplicate instance for this loop");
  end

  // A program is not entered in a step in which its context suspends it.
  a_no_start_when_susp: assert property (@(posedge clk) disable iff (rst)
    ctrl_in.go_depth |-> !ctrl_in.susp);

  // The multiplier is restarted only in a step in which its last call ends.
  a_restart_on_term: assert property (@(posedge clk) disable iff (rst)
    restart |-> m_ctrl_out.term);

endmodule
