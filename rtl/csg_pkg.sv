// csg_pkg: constants and types shared by the control-signal-gated datapaths.
//
// Control-signal gating stops switching on a datapath bus by gating the
// control inputs (register enables, multiplexer selects, tri-state enables) of
// the steering module that drives it, whenever the bus will not be observed.
// The datapath width of 64 bits is the width of the example datapaths and of
// the execute unit the technique was originally applied to.
package csg_pkg;

  localparam int unsigned DATA_W = 64;

endpackage
