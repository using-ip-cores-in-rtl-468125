// tb_multiplier_module: self-checking test of the wrapped multiplier.
//
// A random caller enters the module, restarts it in the step in which it
// terminates, aborts it, suspends it and kills its data flow. An independent
// step-by-step model of the module (inside flag, enabled-step counter of the
// core, last product) gives the expected insd, inst, term and Y in every step;
// Y is compared whenever the model knows the core's output. For every call
// that ran without suspension the number of steps from entry to term must be
// exactly W + 1 (one to register the factors, W to add). Each situation is counted and must occur at least once.
module tb_multiplier_module;
  import aif_pkg::*;

  localparam int unsigned W = 32;

  logic          clk = 1'b0;
  logic          rst;
  aif_ctrl_in_t  ctrl_in;
  aif_ctrl_out_t ctrl_out;
  logic [W-1:0]  y_in, a, b, y;

  int checks   = 0;
  int failures = 0;
  int n_enter = 0, n_term = 0, n_restart = 0, n_abort = 0, n_susp = 0, n_prmt = 0, n_lat = 0;

  multiplier_module #(.W(W)) dut (.clk, .rst, .ctrl_in, .ctrl_out, .y_in, .a, .b, .y);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // model state
  bit           m_l;
  bit           m_started;
  int           m_cnt;
  logic [W-1:0] m_prod;       // product being computed
  logic [W-1:0] m_y;          // core output register
  bit           m_y_known;
  int           entry_step, step, susp_in_call;

  initial begin
    rst = 1'b1; ctrl_in = '0; a = '0; b = '0; y_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    m_l = 0; m_started = 0; m_cnt = 0; m_y_known = 0;
    step = 0; entry_step = 0; susp_in_call = 0;
    for (int k = 0; k < 6000; k++) begin
      bit m_rdy, m_term, dv;
      m_rdy  = m_started && (m_cnt == W);
      m_term = m_l && m_rdy;
      // caller
      ctrl_in = '0;
      ctrl_in.susp = m_l && ((k / 1000) % 2 == 1) && (($urandom % 10) == 0);
      ctrl_in.prmt = ($urandom % 12) == 0;
      ctrl_in.abrt = m_l && !ctrl_in.susp && (($urandom % 150) == 0);
      if (!ctrl_in.susp) begin
        if (!m_l)        ctrl_in.go_depth = ($urandom % 4) == 0;
        else if (m_term) ctrl_in.go_depth = ($urandom % 2) == 0;
      end
      ctrl_in.go_surf = ctrl_in.go_depth;
      a = $urandom; b = $urandom; y_in = $urandom;
      #1;
      // compare
      dv = !ctrl_in.prmt && (m_l || ctrl_in.go_surf);
      check(ctrl_out.inst == 1'b0, "inst");
      check(ctrl_out.insd == m_l, "insd");
      check(ctrl_out.term == m_term, $sformatf("term: got %0b expected %0b", ctrl_out.term, m_term));
      if (!dv) check(y == y_in, "Y must carry the surrounding value");
      else if (m_y_known) check(y == m_y, $sformatf("Y=%h expected product %h", y, m_y));
      // statistics
      if (ctrl_in.go_depth) n_enter++;
      if (m_term) n_term++;
      if (m_term && ctrl_in.go_depth) n_restart++;
      if (m_l && ctrl_in.abrt) n_abort++;
      if (m_l && ctrl_in.susp) begin n_susp++; susp_in_call++; end
      if (dv == 1'b0 && m_l && ctrl_in.prmt) n_prmt++;
      if (m_term && susp_in_call == 0 && !ctrl_in.susp) begin
        n_lat++;
        check(step - entry_step == W + 1, $sformatf("latency %0d steps, expected %0d", step - entry_step, W + 1));
      end
      // model update (clock edge)
      if (!ctrl_in.susp) begin
        if (ctrl_in.go_depth) begin
          m_started = 1; m_cnt = 0; m_prod = a * b;
        end else if (m_started && m_cnt < W) begin
          m_cnt++;
          if (m_cnt == W) begin m_y = m_prod; m_y_known = 1; end
        end
      end
      m_l = ctrl_in.go_depth | (m_l & ~(ctrl_in.abrt | m_term)) | (m_l & ctrl_in.susp);
      if (ctrl_in.go_depth) begin entry_step = step; susp_in_call = 0; end
      step++;
      @(negedge clk);
    end
    check(n_enter > 0 && n_term > 0 && n_restart > 0 && n_abort > 0 && n_susp > 0 && n_prmt > 0 && n_lat > 0,
          "a situation never occurred");
    $display("entries=%0d terminations=%0d restarts_at_term=%0d aborts=%0d suspended=%0d killed=%0d timed=%0d",
             n_enter, n_term, n_restart, n_abort, n_susp, n_prmt, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
