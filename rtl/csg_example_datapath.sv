// csg_example_datapath: the example 64-bit datapath with control-signal
// gating.
//
// Structure: two enabled registers, TReg and IReg, drive TBus and IBus into
// the two inputs of a mux (mux_sel = 0 picks TBus, 1 picks IBus).  The mux
// output RBus is added to SBus, and the sum leaves the datapath through a
// tri-state driver enabled by sum_en.  When sum_en is 0 nothing on TBus, IBus
// or RBus is observed, and when it is 1 only the selected register is.  The
// gating logic (example_gating_ctrl) uses the next-cycle values of mux_sel and
// sum_en to
//   - drop the IReg load unless IBus is selected and observed next cycle,
//   - drop the TReg load unless TBus is selected and observed next cycle,
//   - hold mux_sel while sum_en is 0,
// so the three internal buses stay quiet while the output is unused.  No gate
// is added on any data bus.
//
// Interface and timing (one operation):
//   cycle T-1: present tdata/idata with treg_en/ireg_en, and the control for
//              cycle T on mux_sel_d/sum_en_d.
//   cycle T:   present sbus; if sum_en is 1, out_bus = selected operand +
//              sbus (combinational), out_driven = 1.  Otherwise out_bus keeps
//              its last driven value.
// Contract that gating relies on: an operand consumed in cycle T is loaded
// in cycle T-1 (the register output is read only in the cycle after its
// load).  A register whose load is dropped is never read before it is
// reloaded.
//
// SBus comes from elsewhere in the datapath and is a plain input here; the
// carry out of the adder is not used by this datapath.  Reset values, the
// keeper on the output bus and the GATING switch (0 = ungated reference) are
// this implementation's choices.
module csg_example_datapath
  import csg_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter bit          GATING = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  // register loads (cycle T-1)
  input  logic         treg_en,
  input  logic [W-1:0] tdata,
  input  logic         ireg_en,
  input  logic [W-1:0] idata,
  // control for the next cycle (D inputs of the control flip-flops)
  input  logic         mux_sel_d,
  input  logic         sum_en_d,
  // second adder operand (cycle T)
  input  logic [W-1:0] sbus,
  // output bus
  output logic [W-1:0] out_bus,
  output logic         out_driven,
  // internal buses and applied enables, brought out for activity measurement
  output logic [W-1:0] tbus,
  output logic [W-1:0] ibus,
  output logic [W-1:0] rbus,
  output logic         treg_en_gated,
  output logic         ireg_en_gated,
  output logic [1:0]   mux_sel_lines  // registered one-hot select {sel1, sel0}
);

  logic         sum_en;
  logic         odc_tbus_next, odc_ibus_next, odc_rbus_next;
  logic [1:0]   sel_q;
  logic [W-1:0] sum;
  logic         carry_unused;
  logic [0:0]   tri_en_gated_unused;

  example_gating_ctrl #(.GATING(GATING)) u_ctrl (
    .clk, .rst_n,
    .mux_sel_d, .sum_en_d,
    .sum_en_q      (sum_en),
    .odc_tbus_next, .odc_ibus_next, .odc_rbus_next
  );

  gated_reg #(.W(W)) u_treg (
    .clk, .rst_n,
    .en (treg_en), .odc_next (odc_tbus_next),
    .d  (tdata),   .q (tbus), .en_gated (treg_en_gated)
  );

  gated_reg #(.W(W)) u_ireg (
    .clk, .rst_n,
    .en (ireg_en), .odc_next (odc_ibus_next),
    .d  (idata),   .q (ibus), .en_gated (ireg_en_gated)
  );

  gated_sel_mux #(.W(W)) u_mux (
    .clk, .rst_n,
    .sel_en   (1'b1),
    .odc_next (odc_rbus_next),
    .sel_d    ({mux_sel_d, ~mux_sel_d}),
    .in0      (tbus),
    .in1      (ibus),
    .sel_q,
    .mux_out  (rbus)
  );

  assign mux_sel_lines = sel_q;

  csg_adder #(.W(W)) u_add (
    .a (rbus), .b (sbus), .sum, .carry (carry_unused)
  );

  gated_tristate_bus #(.W(W), .N(1)) u_out (
    .clk, .rst_n,
    .tri_en       (sum_en),
    .odc          (1'b0),            // primary output: ODC is zero
    .tri_in       (sum),
    .tri_en_gated (tri_en_gated_unused),
    .bus          (out_bus),
    .driven       (out_driven)
  );

endmodule
