// tb_seq_multiplier: self-checking test of the multi-cycle multiplier core.
//
// Starts multiplications with random and corner-case factors and checks the
// product against the testbench's own a*b (low W bits), that rdy rises
// exactly W enabled clocks after the clock that registers the factors, that clocks with ce low freeze the core, that a new
// valid drops a running multiplication, and that rdy and y hold while idle.
module tb_seq_multiplier;

  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         ce;
  logic         valid;
  logic [W-1:0] a, b, y;
  logic         rdy;

  int checks   = 0;
  int failures = 0;

  seq_multiplier #(.W(W)) dut (.clk, .ce, .valid, .a, .b, .y, .rdy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One multiplication; with `stall` set, ce is low in random clocks.
  task automatic multiply(input logic [W-1:0] fa, input logic [W-1:0] fb, input bit stall);
    logic [W-1:0] expect_y;
    int steps;
    int clocks;
    expect_y = fa * fb;
    a = fa; b = fb; valid = 1'b1; ce = 1'b1;
    @(negedge clk);
    valid = 1'b0;
    a = $urandom; b = $urandom;     // inputs are registered: changing them must not matter
    steps = 0; clocks = 0;
    while (!rdy && clocks < 8 * W) begin
      ce = stall ? (($urandom % 3) != 0) : 1'b1;
      @(negedge clk);
      clocks++;
      if (ce) steps++;
    end
    check(rdy, "rdy never rose");
    check(steps == W, $sformatf("latency %0d enabled clocks, expected %0d", steps, W));
    check(y == expect_y, $sformatf("%h * %h = %h, expected %h", fa, fb, y, expect_y));
  endtask

  initial begin
    ce = 1'b1; valid = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);

    multiply('0, 32'h1234_5678, 1'b0);
    multiply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0);
    multiply(32'd1, 32'hDEAD_BEEF, 1'b0);
    multiply(32'd65535, 32'd65537, 1'b0);
    for (int k = 0; k < 40; k++) multiply($urandom, $urandom, k[0]);

    // rdy and y hold while idle, with ce on or off.
    begin
      logic [W-1:0] held;
      held = y;
      repeat (10) begin
        ce = 1'($urandom % 2);
        @(negedge clk);
        check(rdy && y == held, "result not held while idle");
      end
    end

    // A new valid drops the running multiplication.
    begin
      logic [W-1:0] a2, b2;
      int clocks;
      a = $urandom; b = $urandom; valid = 1'b1; ce = 1'b1;
      @(negedge clk);
      valid = 1'b0;
      repeat (W / 2) begin
        @(negedge clk);
        check(!rdy, "rdy during a multiplication");
      end
      a2 = $urandom; b2 = $urandom;
      a = a2; b = b2; valid = 1'b1;
      @(negedge clk);
      valid = 1'b0;
      clocks = 0;
      while (!rdy && clocks < 4 * W) begin
        @(negedge clk);
        clocks++;
      end
      check(clocks == W, $sformatf("restart latency %0d, expected %0d", clocks, W));
      check(y == a2 * b2, "restarted multiplication has the wrong product");
    end

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
