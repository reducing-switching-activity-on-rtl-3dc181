// gated_reg: datapath register with a control-signal-gated load enable.
//
// A register's data input is unobservable at its output in cycle T when its
// enable was low in cycle T-1.  So when the output bus will not be observed in
// cycle T (its observability don't-care, ODC, is true), the load in cycle T-1
// can be dropped and the bus keeps its old value instead of switching:
//
//     reg_en_gated = reg_en & ~ODC_P(RegOut)@T-1
//
// `odc_next` is that one-cycle-early ODC: it is high during cycle T-1 when the
// register output will be a don't-care in cycle T.  The gating is a single
// gate in the enable path (an AND, or a NOR2 of the inverted enable and the
// ODC); no logic is added on the data bus.
//
// Timing: d is captured at the rising clock edge that ends a cycle in which
// en & ~odc_next is high; q changes one cycle later.  Synchronous reset clears q to zero
// (reset is this implementation's choice; the gating rule itself is the one
// above).
module gated_reg #(
  parameter int unsigned W = csg_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // ungated load enable from the control section
  input  logic         odc_next,  // ODC_P of q for the next cycle
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         en_gated   // the enable actually applied (for activity counts)
);

  assign en_gated = en & ~odc_next;

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (en_gated) q <= d;
  end

endmodule
