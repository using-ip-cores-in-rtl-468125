// seq_wrapper_ctrl: control part of the wrapper that turns a clocked IP core
// into a module with the synchronous-module control interface.
//
// One register, l, records that control flow is inside the module. It is set
// when the module is entered (go_depth) and kept while the module neither
// terminates nor is aborted; a suspended module always stays inside:
//   next(l) = go_depth | (l & ~(abrt | term)) | (l & susp)
// From l and the core's ready flag the status outputs are
//   inst = 0,  insd = l,  term = l & rdy   (term = 0 for a core that never ends)
// The wrapper's data outputs come from the core when `define_vars` is high:
//   define_vars = ~prmt & (insd | go_surf)
// and from the surrounding program otherwise. The core itself is driven with
//   ce = ~susp        (suspension freezes its state; outputs may still follow inputs)
//   core_rst = go_depth   (the core is restarted whenever the module is entered)
//
// A core without a ready flag can be wrapped with RDY_COUNT > 0: the wrapper
// then deduces the end itself by counting the steps since the module was
// entered (suspended steps do not count) and takes rdy to be high from the
// RDY_COUNT-th step on; core_rdy is not used.
//
// Interface: clk, rst (synchronous, clears l), ctrl_in / ctrl_out (aif_pkg
// structs), core_rdy from the core; define_vars, core_ce, core_rst to it.
// Timing: insd, term and define_vars are combinational in the current step;
// l changes at the clock edge that ends the step.
//
// The equations are the described ones. The clock-enable equation is written
// once as ~susp and once as plain susp in the printed example wrapper; this
// module follows ~susp, which is what the text explains. Deducing the end by
// counting steps is a described option; its counter, the TERMINATES and
// RDY_COUNT parameters and the synchronous reset of l are this design's
// choices.
module seq_wrapper_ctrl
  import aif_pkg::*;
#(
  parameter bit          TERMINATES = 1'b1,
  parameter int unsigned RDY_COUNT  = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  aif_ctrl_in_t  ctrl_in,
  output aif_ctrl_out_t ctrl_out,
  input  logic          core_rdy,
  output logic          define_vars,
  output logic          core_ce,
  output logic          core_rst
);

  logic l;
  logic insd;
  logic term;
  logic rdy;

  if (RDY_COUNT == 0) begin : g_core_rdy
    assign rdy = core_rdy;
  end else begin : g_count_rdy
    localparam int unsigned SW = $clog2(RDY_COUNT + 1);
    logic [SW-1:0] steps;   // steps since entry, saturating at RDY_COUNT
    always_ff @(posedge clk) begin
      if (rst) begin
        steps <= '0;
      end else if (ctrl_in.go_depth) begin
        steps <= SW'(1);
      end else if (l && !ctrl_in.susp && steps != SW'(RDY_COUNT)) begin
        steps <= steps + 1'b1;
      end
    end
    assign rdy = (steps == SW'(RDY_COUNT));
    // core_rdy is not read in this variant.
  end

  assign insd = l;
  assign term = TERMINATES ? (l & rdy) : 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      l <= 1'b0;
    end else begin
      l <= ctrl_in.go_depth
         | (insd & ~(ctrl_in.abrt | term))
         | (insd & ctrl_in.susp);
    end
  end

  assign ctrl_out.inst = 1'b0;
  assign ctrl_out.insd = insd;
  assign ctrl_out.term = term;

  assign define_vars = ~ctrl_in.prmt & (insd | ctrl_in.go_surf);
  assign core_ce     = ~ctrl_in.susp;
  assign core_rst    = ctrl_in.go_depth;

  // Entering a module always activates its surface as well.
  a_depth_implies_surf: assert property (@(posedge clk) disable iff (rst)
    ctrl_in.go_depth |-> ctrl_in.go_surf);

endmodule
