// gated_sel_mux: two-input multiplexer whose select lines are held while its
// output is unobserved.
//
// Input k of the mux is unobservable at the output when select line sel<k> is
// low.  Stopping switching through a mux needs two things: the selects must
// not switch, and the selected input must not switch.  The selects come from
// flip-flops (the fan-in cone of the select lines); their load enable is
// gated with the one-cycle-early ODC of the mux output, so that if the output
// will be a don't-care in cycle T the selects of cycle T-1 are kept:
//
//     sel_flop_en_gated = sel_en & ~ODC_P(MuxOut)@T-1
//
// The select lines are one-hot (sel0 for input 0, sel1 for input 1) as in the
// mux primitive of the technique; with neither line high the output is zero
// (AND-OR mux, this implementation's choice).  Keeping the data inputs quiet is
// the job of whatever drives them (see gated_reg).
//
// Timing: sel_d is registered at the rising edge ending a cycle in which
// sel_en & ~odc_next is high; the mux itself is combinational on the
// registered selects.  Synchronous reset clears both selects.
module gated_sel_mux #(
  parameter int unsigned W = csg_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel_en,    // ungated load enable of the select flip-flops
  input  logic         odc_next,  // ODC_P of mux_out for the next cycle
  input  logic [1:0]   sel_d,     // next one-hot select {sel1, sel0}
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [1:0]   sel_q,     // current select lines {sel1, sel0}
  output logic [W-1:0] mux_out
);

  logic sel_load;
  assign sel_load = sel_en & ~odc_next;

  always_ff @(posedge clk) begin
    if (!rst_n)        sel_q <= '0;
    else if (sel_load) sel_q <= sel_d;
  end

  assign mux_out = ({W{sel_q[0]}} & in0) | ({W{sel_q[1]}} & in1);

  // The select lines are one-hot or idle.
  a_sel_onehot0 : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_q))
    else $error("gated_sel_mux: select lines not one-hot");

endmodule
