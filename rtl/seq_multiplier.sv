// seq_multiplier: non-pipelined, multi-cycle multiplier IP core.
//
// The core takes two W-bit factors, registers them when `valid` is high and
// then works out the product one bit of B per clock by shift and add (radix 2).
// After W such steps the low W bits of the product are written to the output
// register `y` and `rdy` is set. `rdy` stays high, and `y` holds the product,
// until the next `valid` starts a new multiplication. A `valid` while a
// multiplication is still running drops the old one and starts over.
//
// Interface: clk, ce (clock enable: with ce low the core keeps every register),
// valid, a, b, y, rdy. There is no reset; a multiplication is brought into a
// known state by `valid`, which is how the wrapper uses it.
//
// Timing: `valid` sampled at the end of step t gives rdy = 1 and the product in
// step t + W + 1: one clock registers the factors, W clocks add (clocks are
// counted only while ce is high).
//
// The port list, the registered inputs and outputs, the multi-cycle latency and
// the meaning of valid and rdy follow the described core. The shift-and-add
// datapath, its W + 1 cycle latency, the truncation of the product to W bits and
// that valid and all state changes wait for ce are choices of this design.
module seq_multiplier #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         rdy
);

  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0]  a_r;      // multiplicand, shifted left each step
  logic [W-1:0]  b_r;      // multiplier, shifted right each step
  logic [W-1:0]  acc;      // partial product
  logic [CW-1:0] cnt;      // steps done
  logic          busy;
  logic [W-1:0]  acc_next;

  always_comb begin
    acc_next = acc + (b_r[0] ? a_r : '0);
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      if (valid) begin
        a_r  <= a;
        b_r  <= b;
        acc  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
        rdy  <= 1'b0;
      end else if (busy) begin
        a_r <= a_r << 1;
        b_r <= b_r >> 1;
        acc <= acc_next;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(W - 1)) begin
          busy <= 1'b0;
          y    <= acc_next;
          rdy  <= 1'b1;
        end
      end
    end
  end

endmodule
