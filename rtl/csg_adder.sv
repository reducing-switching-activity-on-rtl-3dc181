// csg_adder: computational module of the datapath, a W-bit adder with carry
// out.
//
// Computational modules are not steered by control signals, so control-signal
// gating treats all their inputs as fully observable (ODC_M = 0) and adds no
// logic to them: switching is stopped on the buses that feed them instead.
// The adder of the example datapaths has two W-bit inputs and produces a Sum
// and a Carry; carry-in is not used.  Purely combinational.
module csg_adder #(
  parameter int unsigned W = csg_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         carry
);

  assign {carry, sum} = {1'b0, a} + {1'b0, b};

endmodule
