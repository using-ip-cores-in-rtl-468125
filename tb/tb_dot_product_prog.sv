// tb_dot_product_prog: self-checking test of the dot-product program.
//
// Fills A and B with random words and runs the program for many loop counts
// (0, 1, N_MAX, above N_MAX, random). For each run it checks that sum reads 0
// in the step the program is entered, that term comes exactly n*(W+1) steps
// after entry (at once for n = 0) plus the number of suspended steps, that insd
// is high until then and low after, and that sum then equals the dot product
// the testbench computes itself. Runs cut short by a strong abort (abrt with
// prmt) or a weak one (abrt alone, also exactly in a step in which a product
// arrives) must end without term and leave the sum of the products that were
// completed before (strong) or up to and including (weak) that step.
module tb_dot_product_prog;
  import aif_pkg::*;

  localparam int unsigned W     = 32;
  localparam int unsigned N_MAX = 16;
  localparam int unsigned NW    = $clog2(N_MAX + 1);
  localparam int unsigned LAT   = W + 1;

  logic          clk = 1'b0;
  logic          rst;
  aif_ctrl_in_t  ctrl_in;
  aif_ctrl_out_t ctrl_out;
  logic [NW-1:0] n;
  logic [W-1:0]  a_vec [N_MAX];
  logic [W-1:0]  b_vec [N_MAX];
  logic [W-1:0]  sum;

  int checks   = 0;
  int failures = 0;
  int n_runs = 0, n_restart = 0, n_susp = 0, n_strong = 0, n_weak = 0, n_zero = 0;

  dot_product_prog #(.W(W), .N_MAX(N_MAX)) dut (.clk, .rst, .ctrl_in, .ctrl_out, .n, .a_vec, .b_vec, .sum);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && dut.restart) n_restart++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [W-1:0] dot(input int cnt);
    logic [W-1:0] s = '0;
    for (int j = 0; j < cnt; j++) s += a_vec[j] * b_vec[j];
    return s;
  endfunction

  task automatic fill();
    foreach (a_vec[j]) begin a_vec[j] = $urandom; b_vec[j] = $urandom; end
  endtask

  // Enter the program with loop count nn. susp_rate > 0 suspends random
  // steps. abort_at >= 0 aborts in that step after entry (strong if `is_strong`).
  task automatic run(input int nn, input int susp_rate, input int abort_at, input bit is_strong);
    int eff, steps, susp_steps, expect_done;
    bit done;
    eff = (nn > N_MAX) ? N_MAX : nn;
    fill();
    n = NW'(nn);
    n_runs++;
    ctrl_in = '0; ctrl_in.go_depth = 1'b1; ctrl_in.go_surf = 1'b1;
    #1;
    check(sum == '0, "sum must read 0 in the entry step");
    if (eff == 0) begin
      n_zero++;
      check(ctrl_out.term == 1'b1, "n = 0 must terminate at once");
    end else begin
      check(ctrl_out.term == 1'b0, "term in the entry step");
    end
    @(negedge clk);
    ctrl_in = '0;
    if (eff == 0) begin
      #1;
      check(ctrl_out.insd == 1'b0 && sum == '0, "n = 0 leaves nothing running");
      return;
    end
    steps = 1; susp_steps = 0; done = 0;
    while (!done && steps < 4 * N_MAX * LAT) begin
      ctrl_in = '0;
      if (susp_rate > 0 && ($urandom % susp_rate) == 0) ctrl_in.susp = 1'b1;
      if (steps == abort_at) begin
        ctrl_in.susp = 1'b0;
        ctrl_in.abrt = 1'b1;
        ctrl_in.prmt = is_strong;
      end
      #1;
      check(ctrl_out.insd == 1'b1, "insd must be high while the loop runs");
      if (ctrl_in.susp) begin susp_steps++; n_susp++; end
      if (ctrl_in.abrt) begin
        done = 1;
        check(ctrl_out.term == 1'b0, "an aborted program must not terminate");
        if (is_strong) n_strong++; else n_weak++;
        expect_done = (is_strong && steps % LAT == 0) ? steps / LAT - 1 : steps / LAT;
      end else if (ctrl_out.term) begin
        done = 1;
        expect_done = eff;
        check(steps == eff * LAT + susp_steps,
              $sformatf("term after %0d steps, expected %0d", steps, eff * LAT + susp_steps));
      end
      @(negedge clk);
      steps++;
    end
    ctrl_in = '0;
    #1;
    check(done, "run never ended");
    check(ctrl_out.insd == 1'b0, "insd must be low after the run");
    check(dut.u_mult.ctrl_out.insd == 1'b0, "multiplier left running");
    check(sum == dot(expect_done), $sformatf("sum %h, expected %h (%0d products)", sum, dot(expect_done), expect_done));
    // stay idle a few steps: nothing changes
    repeat (3) begin
      @(negedge clk);
      #1;
      check(ctrl_out.insd == 1'b0 && ctrl_out.term == 1'b0 && sum == dot(expect_done), "idle program changed");
    end
  endtask

  initial begin
    rst = 1'b1; ctrl_in = '0; n = '0; fill();
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run(1, 0, -1, 0);
    run(0, 0, -1, 0);
    run(N_MAX, 0, -1, 0);
    run(N_MAX + 3, 0, -1, 0);
    for (int k = 0; k < 6; k++) run($urandom % (N_MAX + 1), 0, -1, 0);
    for (int k = 0; k < 4; k++) run(1 + $urandom % N_MAX, 6, -1, 0);
    run(8, 0, 3 * LAT + 5, 1);      // is_strong abort between products
    run(8, 0, 3 * LAT, 1);          // is_strong abort in a product's step: product lost
    run(8, 0, 3 * LAT, 0);          // weak abort in a product's step: product kept
    run(8, 0, 5 * LAT + 7, 0);      // weak abort between products
    run(5, 0, -1, 0);               // entered again after an abort
    check(n_restart > 0 && n_susp > 0 && n_strong > 0 && n_weak > 0 && n_zero > 0,
          "a mechanism never occurred");
    $display("runs=%0d restarts_at_term=%0d suspended=%0d strong_aborts=%0d weak_aborts=%0d empty_loops=%0d",
             n_runs, n_restart, n_susp, n_strong, n_weak, n_zero);
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
