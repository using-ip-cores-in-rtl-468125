// tb_seq_wrapper_ctrl: self-checking test of the sequential-wrapper control.
//
// Drives random control inputs (go_depth always with go_surf, as a caller
// does) and a random core ready flag, keeps its own copy of the inside flag,
// and compares every step's insd, inst, term, output-select, clock enable and
// core restart with the values worked out from that copy. Three variants are
// checked: ending on the core's ready flag, never ending, and ending after
// RDY_COUNT = 5 unsuspended steps counted by the wrapper itself. It also counts
// entries, aborts, suspended steps, terminations and re-entries in the
// terminating step, and fails if one never happened.
module tb_seq_wrapper_ctrl;
  import aif_pkg::*;

  logic          clk = 1'b0;
  logic          rst;
  aif_ctrl_in_t  ctrl_in;
  aif_ctrl_out_t out_t, out_n, out_c;
  logic          dv_c, ce_c, cr_c;
  logic          core_rdy;
  logic          dv_t, ce_t, cr_t, dv_n, ce_n, cr_n;

  int checks   = 0;
  int failures = 0;
  int n_count_term = 0;
  int n_enter = 0, n_abort = 0, n_susp = 0, n_term = 0, n_reenter = 0;

  seq_wrapper_ctrl #(.TERMINATES(1'b1)) dut_t (
    .clk, .rst, .ctrl_in, .ctrl_out(out_t), .core_rdy,
    .define_vars(dv_t), .core_ce(ce_t), .core_rst(cr_t));

  seq_wrapper_ctrl #(.TERMINATES(1'b0)) dut_n (
    .clk, .rst, .ctrl_in, .ctrl_out(out_n), .core_rdy,
    .define_vars(dv_n), .core_ce(ce_n), .core_rst(cr_n));

  seq_wrapper_ctrl #(.TERMINATES(1'b1), .RDY_COUNT(5)) dut_c (
    .clk, .rst, .ctrl_in, .ctrl_out(out_c), .core_rdy,
    .define_vars(dv_c), .core_ce(ce_c), .core_rst(cr_c));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // reference inside flags
  bit ref_l_t, ref_l_n, ref_l_c;
  int ref_steps;

  task automatic compare();
    bit term_t;
    term_t = ref_l_t & core_rdy;
    check(out_t.inst == 1'b0 && out_n.inst == 1'b0, "inst must be 0");
    check(out_t.insd == ref_l_t, "insd (terminating)");
    check(out_n.insd == ref_l_n, "insd (never terminating)");
    check(out_t.term == term_t, "term (terminating)");
    check(out_n.term == 1'b0, "term (never terminating)");
    check(dv_t == (!ctrl_in.prmt && (ref_l_t || ctrl_in.go_surf)), "define_vars (terminating)");
    check(dv_n == (!ctrl_in.prmt && (ref_l_n || ctrl_in.go_surf)), "define_vars (never terminating)");
    check(ce_t == !ctrl_in.susp && ce_n == !ctrl_in.susp, "core clock enable");
    check(cr_t == ctrl_in.go_depth && cr_n == ctrl_in.go_depth, "core restart");
    check(out_c.insd == ref_l_c, "insd (counted end)");
    check(out_c.term == (ref_l_c && ref_steps == 5), "term (counted end)");
    check(dv_c == (!ctrl_in.prmt && (ref_l_c || ctrl_in.go_surf)), "define_vars (counted end)");
    check(ce_c == !ctrl_in.susp && cr_c == ctrl_in.go_depth, "core ce / restart (counted end)");
  endtask

  initial begin
    rst = 1'b1; ctrl_in = '0; core_rdy = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    ref_l_t = 1'b0; ref_l_n = 1'b0; ref_l_c = 1'b0; ref_steps = 0;
    for (int k = 0; k < 3000; k++) begin
      bit term_t;
      ctrl_in.go_depth = ($urandom % 6) == 0;
      ctrl_in.go_surf  = ctrl_in.go_depth | (($urandom % 5) == 0);
      ctrl_in.abrt     = ($urandom % 8) == 0;
      ctrl_in.susp     = ($urandom % 6) == 0;
      ctrl_in.prmt     = ($urandom % 7) == 0;
      core_rdy         = ($urandom % 4) == 0;
      #1;
      compare();
      term_t = ref_l_t & core_rdy;
      if (ctrl_in.go_depth) n_enter++;
      if (ref_l_t && ctrl_in.abrt && !ctrl_in.susp) n_abort++;
      if (ref_l_t && ctrl_in.susp) n_susp++;
      if (term_t) n_term++;
      if (term_t && ctrl_in.go_depth) n_reenter++;
      ref_l_t = ctrl_in.go_depth | (ref_l_t & ~(ctrl_in.abrt | term_t)) | (ref_l_t & ctrl_in.susp);
      ref_l_n = ctrl_in.go_depth | (ref_l_n & ~ctrl_in.abrt) | (ref_l_n & ctrl_in.susp);
      begin
        bit term_c;
        term_c = ref_l_c && ref_steps == 5;
        if (term_c) n_count_term++;
        if (ctrl_in.go_depth) ref_steps = 1;
        else if (ref_l_c && !ctrl_in.susp && ref_steps != 5) ref_steps++;
        ref_l_c = ctrl_in.go_depth | (ref_l_c & ~(ctrl_in.abrt | term_c)) | (ref_l_c & ctrl_in.susp);
      end
      @(negedge clk);
    end
    // synchronous reset clears the flag
    ctrl_in = '0; ctrl_in.susp = 1'b1; rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    #1;
    check(out_t.insd == 1'b0 && out_n.insd == 1'b0 && out_c.insd == 1'b0, "reset clears insd");
    check(n_enter > 0 && n_abort > 0 && n_susp > 0 && n_term > 0 && n_reenter > 0 && n_count_term > 0,
          "a control situation never occurred");
    $display("entries=%0d aborts=%0d suspended=%0d terminations=%0d re-entries=%0d counted_ends=%0d",
             n_enter, n_abort, n_susp, n_term, n_reenter, n_count_term);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
