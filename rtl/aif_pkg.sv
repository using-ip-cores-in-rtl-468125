// aif_pkg: types shared by every module that offers the synchronous-module
// control interface.
//
// A module compiled from a synchronous program (and an IP core once it is
// wrapped) is driven by five control inputs from its caller and reports three
// status outputs back. They are bundled here as two packed structs so that
// caller and callee are wired with one port each way:
//   go_surf  : run only the combinational (surface) part of the module this step
//   go_depth : start the module this step (implies go_surf)
//   abrt     : abort the control flow that is inside the module
//   susp     : freeze the control flow that is inside (wins over abrt)
//   prmt     : kill the data flow, so that the module assigns nothing this step
//   inst     : the module is instantaneous (combinational)
//   insd     : control flow is inside the module, started in an earlier step
//   term     : the module finishes of its own accord in this step
// The signal set follows the described module format; packing them into
// structs is this design's choice.
package aif_pkg;

  typedef struct packed {
    logic go_surf;
    logic go_depth;
    logic abrt;
    logic susp;
    logic prmt;
  } aif_ctrl_in_t;

  typedef struct packed {
    logic inst;
    logic insd;
    logic term;
  } aif_ctrl_out_t;

  // Module attributes of the multiplier IP module. Its core registers all of
  // its inputs, so it may be restarted in the step in which it terminates
  // (dupEnd false), and it has no combinational path from input to output
  // (dupAny false). A compiler reads these to decide whether the core must be
  // instantiated twice; for this core it never must.
  localparam bit MULT_DUP_END = 1'b0;
  localparam bit MULT_DUP_ANY = 1'b0;

endpackage
