// example_gating_ctrl: control-section gating logic of the example datapath
// (TReg/IReg -> mux -> adder -> tri-state output).
//
// The control section keeps mux_sel and sum_en in flip-flops.  Their D inputs
// (mux_sel_d, sum_en_d) are the values for the next cycle, which gives the
// one-cycle-early ODCs the gating needs.  Working from the output back:
//   ODC_P(OutBus) = 0                       (primary output)
//   ODC_P(RBus)   = ~sum_en                 (tri-state input)
//   ODC_P(IBus)   = ~mux_sel | ~sum_en      (mux input 1, eq. 2)
//   ODC_P(TBus)   =  mux_sel | ~sum_en      (mux input 0, eq. 2)
// and so, with next-cycle values,
//   ireg_en_gated = ireg_en &  mux_sel_d & sum_en_d
//   treg_en_gated = treg_en & ~mux_sel_d & sum_en_d
//   mux_sel flop loads only when sum_en_d is high (held while sum_en is 0).
// These outputs are the one-cycle-early ODCs that gated_reg and
// gated_sel_mux consume (odc_* = ~observed).  The select flop itself sits in
// gated_sel_mux; this block owns the sum_en flip-flop.
//
// GATING = 0 gives the ungated reference behaviour (all ODCs forced to zero)
// so that activity can be compared; GATING = 1 is the design.
//
// Timing: all outputs except sum_en_q are combinational from the next-cycle
// control inputs.  sum_en_q is registered, synchronously reset to 0.
module example_gating_ctrl #(
  parameter bit GATING = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mux_sel_d,     // next-cycle mux select (1 = IBus)
  input  logic sum_en_d,      // next-cycle output driver enable
  output logic sum_en_q,      // current output driver enable
  output logic odc_tbus_next, // ODC_P(TBus) for the next cycle
  output logic odc_ibus_next, // ODC_P(IBus) for the next cycle
  output logic odc_rbus_next  // ODC_P(RBus) for the next cycle
);

  always_ff @(posedge clk) begin
    if (!rst_n) sum_en_q <= 1'b0;
    else        sum_en_q <= sum_en_d;
  end

  always_comb begin
    if (GATING) begin
      odc_rbus_next = ~sum_en_d;
      odc_ibus_next = ~mux_sel_d | odc_rbus_next;
      odc_tbus_next =  mux_sel_d | odc_rbus_next;
    end else begin
      odc_rbus_next = 1'b0;
      odc_ibus_next = 1'b0;
      odc_tbus_next = 1'b0;
    end
  end

endmodule
