// csg_fanout_example: a bus with two fanouts, gated by the intersection of
// the ODCs along both paths.
//
// DBus fans out to input 0 of a two-input mux (one-hot selects sel0/sel1) and
// to one input of an adder that produces Sum and Carry.  Along each path the
// ODC is:
//   ODC_P(Fanout0) = ~sel0 + ODC_P(MuxOut)          (eq. 2, mux input 0)
//   ODC_P(Fanout1) =  ODC_P(Sum) * ODC_P(Carry)     (eq. 2, adder: ODC_M = 0)
//   ODC_P(DBus)    =  ODC_P(Fanout0) * ODC_P(Fanout1)  (eq. 1)
// DBus is driven by a gated register whose load enable is dropped whenever
// ODC_P(DBus) will be true in the next cycle.  Mux input 1 is driven the same
// way with ODC = ~sel1 + ODC_P(MuxOut); both mux inputs are thus gatable, so
// the mux selects are gated too, with ODC_P(MuxOut).
//
// Mux output, Sum and Carry leave the block.  Their ODCs are supplied by the
// environment one cycle early (odc_*_next), since a primary output has no ODC
// of its own (tie them low for "always observed").  The registers driving
// DBus and mux input 1, and the second adder operand being a plain input, are
// this implementation's choices; the method fixes only the fanout structure.
// GATING = 0 gives the ungated reference behaviour.
//
// Timing: loads and select updates are presented in cycle T-1 and take
// effect at the rising edge that ends it; mux_out, sum and carry are
// combinational in cycle T.  An output is guaranteed to be correct only in a
// cycle whose ODC was announced as 0, and only for operands loaded in the
// cycle before.
module csg_fanout_example
  import csg_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter bit          GATING = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dreg_en,          // load DBus register
  input  logic [W-1:0] ddata,
  input  logic         mreg_en,          // load mux input-1 register
  input  logic [W-1:0] mdata,
  input  logic         sel_en,           // load the mux select flip-flops
  input  logic [1:0]   sel_d,            // next one-hot select {sel1, sel0}
  input  logic [W-1:0] addend,           // second adder operand (cycle T)
  input  logic         odc_muxout_next,  // ODC_P(MuxOut) for the next cycle
  input  logic         odc_sum_next,     // ODC_P(Sum) for the next cycle
  input  logic         odc_carry_next,   // ODC_P(Carry) for the next cycle
  output logic [W-1:0] mux_out,
  output logic [W-1:0] sum,
  output logic         carry,
  output logic [W-1:0] dbus,
  output logic [W-1:0] mbus,
  output logic         dreg_en_gated,
  output logic         mreg_en_gated
);

  logic       odc_mux_n, odc_sum_n, odc_carry_n;
  logic [1:0] sel_q, sel_next;
  logic       odc_fanout0_next, odc_fanout1_next, odc_dbus_next, odc_mbus_next;

  assign odc_mux_n   = GATING ? odc_muxout_next : 1'b0;
  assign odc_sum_n   = GATING ? odc_sum_next    : 1'b0;
  assign odc_carry_n = GATING ? odc_carry_next  : 1'b0;

  // Select lines as they will be in the next cycle.
  assign sel_next = (sel_en && !odc_mux_n) ? sel_d : sel_q;

  assign odc_fanout0_next = ~sel_next[0] | odc_mux_n;
  assign odc_fanout1_next = odc_sum_n & odc_carry_n;
  assign odc_dbus_next    = GATING ? (odc_fanout0_next & odc_fanout1_next) : 1'b0;
  assign odc_mbus_next    = GATING ? (~sel_next[1] | odc_mux_n) : 1'b0;

  gated_reg #(.W(W)) u_dreg (
    .clk, .rst_n, .en (dreg_en), .odc_next (odc_dbus_next),
    .d (ddata), .q (dbus), .en_gated (dreg_en_gated)
  );

  gated_reg #(.W(W)) u_mreg (
    .clk, .rst_n, .en (mreg_en), .odc_next (odc_mbus_next),
    .d (mdata), .q (mbus), .en_gated (mreg_en_gated)
  );

  gated_sel_mux #(.W(W)) u_mux (
    .clk, .rst_n, .sel_en, .odc_next (odc_mux_n), .sel_d,
    .in0 (dbus), .in1 (mbus), .sel_q, .mux_out
  );

  csg_adder #(.W(W)) u_add (
    .a (dbus), .b (addend), .sum, .carry
  );

endmodule
