// tb_sync_ip_top: end-to-end test of the whole design at its default sizes.
//
// The dot-product program is run as a calling program would run it: entered
// with random arrays and loop counts, left to finish, suspended for random
// steps, aborted strongly (abrt with prmt) and weakly (abrt alone), and entered
// again. Every run is checked for its cycle count (n*(W+1) steps plus the
// suspended ones), its status outputs and its final sum against the dot
// product computed here. In every step the combinational wrapper is driven as
// well, with a small combinational core (a 16 x 16 multiplier written here) and
// random control inputs, and its output and status are checked.
// Mechanisms counted, each of which must occur: multiplier restarted in its
// terminating step, suspended steps, strong and weak aborts, empty loop
// (n = 0), completed runs, combinational core selected and not selected.
module tb_sync_ip_top;
  import aif_pkg::*;

  localparam int unsigned W     = 32;
  localparam int unsigned N_MAX = 16;
  localparam int unsigned CW    = 32;
  localparam int unsigned NW    = $clog2(N_MAX + 1);
  localparam int unsigned LAT   = W + 1;

  logic          clk = 1'b0;
  logic          rst;
  aif_ctrl_in_t  prog_ctrl_in;
  aif_ctrl_out_t prog_ctrl_out;
  logic [NW-1:0] n;
  logic [W-1:0]  a_vec [N_MAX];
  logic [W-1:0]  b_vec [N_MAX];
  logic [W-1:0]  sum;
  aif_ctrl_in_t  comb_ctrl_in;
  aif_ctrl_out_t comb_ctrl_out;
  logic [15:0]   cx1, cx2;
  logic [CW-1:0] comb_y_core, comb_y_in, comb_y;

  int checks   = 0;
  int failures = 0;
  int n_done = 0, n_restart = 0, n_susp = 0, n_strong = 0, n_weak = 0, n_zero = 0;
  int n_comb_core = 0, n_comb_outer = 0;

  assign comb_y_core = CW'(cx1) * CW'(cx2);   // combinational IP core

  sync_ip_top dut (
    .clk, .rst, .prog_ctrl_in, .prog_ctrl_out, .n, .a_vec, .b_vec, .sum,
    .comb_ctrl_in, .comb_ctrl_out, .comb_y_core, .comb_y_in, .comb_y);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (!rst && dut.u_prog.u_mult.ctrl_out.term && dut.u_prog.u_mult.ctrl_in.go_depth) n_restart++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Drive and check the combinational wrapper in the current step.
  task automatic comb_step();
    comb_ctrl_in = aif_ctrl_in_t'($urandom);
    if (comb_ctrl_in.go_depth) comb_ctrl_in.go_surf = 1'b1;
    cx1 = 16'($urandom); cx2 = 16'($urandom); comb_y_in = $urandom;
    #1;
    if (comb_ctrl_in.go_surf) begin
      n_comb_core++;
      check(comb_y == CW'(cx1) * CW'(cx2), "combinational module: core result expected");
    end else begin
      n_comb_outer++;
      check(comb_y == comb_y_in, "combinational module: surrounding value expected");
    end
    check(comb_ctrl_out.inst && !comb_ctrl_out.insd && !comb_ctrl_out.term,
          "combinational module status");
  endtask

  function automatic logic [W-1:0] dot(input int cnt);
    logic [W-1:0] s = '0;
    for (int j = 0; j < cnt; j++) s += a_vec[j] * b_vec[j];
    return s;
  endfunction

  task automatic run(input int nn, input int susp_rate, input int abort_at, input bit is_strong);
    int eff, steps, susp_steps, expect_done;
    bit done;
    eff = (nn > N_MAX) ? N_MAX : nn;
    foreach (a_vec[j]) begin a_vec[j] = $urandom; b_vec[j] = $urandom; end
    n = NW'(nn);
    prog_ctrl_in = '0; prog_ctrl_in.go_depth = 1'b1; prog_ctrl_in.go_surf = 1'b1;
    comb_step();
    check(sum == '0, "sum must read 0 in the entry step");
    check(prog_ctrl_out.term == (eff == 0), "term in the entry step");
    check(prog_ctrl_out.inst == 1'b0, "the program is not instantaneous");
    @(negedge clk);
    prog_ctrl_in = '0;
    if (eff == 0) begin
      n_zero++;
      comb_step();
      check(!prog_ctrl_out.insd && sum == '0, "empty loop leaves nothing running");
      return;
    end
    steps = 1; susp_steps = 0; done = 0; expect_done = 0;
    while (!done && steps < 4 * N_MAX * LAT) begin
      prog_ctrl_in = '0;
      if (susp_rate > 0 && ($urandom % susp_rate) == 0) prog_ctrl_in.susp = 1'b1;
      if (steps == abort_at) begin
        prog_ctrl_in.susp = 1'b0;
        prog_ctrl_in.abrt = 1'b1;
        prog_ctrl_in.prmt = is_strong;
      end
      comb_step();
      check(prog_ctrl_out.insd, "insd must be high while the loop runs");
      if (prog_ctrl_in.susp) begin susp_steps++; n_susp++; end
      if (prog_ctrl_in.abrt) begin
        done = 1;
        check(!prog_ctrl_out.term, "an aborted program must not terminate");
        if (is_strong) n_strong++; else n_weak++;
        expect_done = (is_strong && steps % LAT == 0) ? steps / LAT - 1 : steps / LAT;
      end else if (prog_ctrl_out.term) begin
        done = 1;
        n_done++;
        expect_done = eff;
        check(steps == eff * LAT + susp_steps,
              $sformatf("term after %0d steps, expected %0d", steps, eff * LAT + susp_steps));
      end
      @(negedge clk);
      steps++;
    end
    prog_ctrl_in = '0;
    comb_step();
    check(done, "run never ended");
    check(!prog_ctrl_out.insd, "insd must be low after the run");
    check(sum == dot(expect_done), $sformatf("sum %h, expected %h", sum, dot(expect_done)));
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; prog_ctrl_in = '0; comb_ctrl_in = '0; n = '0;
    cx1 = '0; cx2 = '0; comb_y_in = '0;
    foreach (a_vec[j]) begin a_vec[j] = '0; b_vec[j] = '0; end
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run(N_MAX, 0, -1, 0);
    run(0, 0, -1, 0);
    run(3, 0, -1, 0);
    run(N_MAX, 5, -1, 0);
    run(10, 0, 4 * LAT + 9, 1);
    run(10, 0, 2 * LAT, 0);
    run(10, 0, 2 * LAT, 1);
    for (int k = 0; k < 8; k++) run($urandom % (N_MAX + 1), (k % 2 == 1) ? 7 : 0, -1, 0);
    check(n_done > 0 && n_restart > 0 && n_susp > 0 && n_strong > 0 && n_weak > 0 && n_zero > 0
          && n_comb_core > 0 && n_comb_outer > 0, "a mechanism never occurred");
    $display("completed=%0d restarts_at_term=%0d suspended=%0d strong_aborts=%0d weak_aborts=%0d empty_loops=%0d comb_core=%0d comb_outer=%0d",
             n_done, n_restart, n_susp, n_strong, n_weak, n_zero, n_comb_core, n_comb_outer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
