// tb_comb_wrapper: self-checking test of the combinational-core wrapper.
//
// A small combinational core (a 16 x 16 -> 32 multiplier written here) feeds
// the wrapper. Random control inputs and data check that the output is the
// core's result exactly when go_surf is high and the surrounding value
// otherwise, whatever go_depth, abrt, susp and prmt are, and that the status
// outputs read inst = 1, insd = 0, term = 0.
module tb_comb_wrapper;
  import aif_pkg::*;

  localparam int unsigned W = 32;

  aif_ctrl_in_t  ctrl_in;
  aif_ctrl_out_t ctrl_out;
  logic [15:0]   x1, x2;
  logic [W-1:0]  y_core, y_in, y;

  int checks   = 0;
  int failures = 0;
  int n_core   = 0;
  int n_outer  = 0;

  assign y_core = x1 * x2;   // the combinational IP core

  comb_wrapper #(.W(W)) dut (.ctrl_in, .ctrl_out, .y_core, .y_in, .y);

  initial begin
    for (int k = 0; k < 400; k++) begin
      ctrl_in = aif_ctrl_in_t'($urandom);
      if (ctrl_in.go_depth) ctrl_in.go_surf = 1'b1;
      x1 = 16'($urandom); x2 = 16'($urandom); y_in = $urandom;
      #1;
      checks++;
      if (ctrl_in.go_surf) begin
        n_core++;
        if (y !== 32'(x1) * 32'(x2)) begin
          failures++;
          $display("FAIL: active step, y=%h expected %h", y, 32'(x1) * 32'(x2));
        end
      end else begin
        n_outer++;
        if (y !== y_in) begin
          failures++;
          $display("FAIL: inactive step, y=%h expected y_in=%h", y, y_in);
        end
      end
      checks++;
      if (ctrl_out !== '{inst: 1'b1, insd: 1'b0, term: 1'b0}) begin
        failures++;
        $display("FAIL: status outputs %b", ctrl_out);
      end
    end
    checks++;
    if (n_core == 0 || n_outer == 0) begin
      failures++;
      $display("FAIL: one output selection never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
