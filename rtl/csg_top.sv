// csg_top: the two control-signal-gated example datapaths side by side.
//
// ex_*  : the TReg/IReg -> mux -> adder -> tri-state example datapath
//           (csg_example_datapath), whose gating is derived entirely from its
//           own control signals.
// fo_*  : the multiple-fanout bus example (csg_fanout_example), whose
//           output ODCs come from the environment.
// The two share only clock and reset; each keeps its own ports and timing,
// described in its module.  Internal buses are brought out so that their
// switching activity can be measured.
module csg_top
  import csg_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // example datapath
  input  logic         ex_treg_en,
  input  logic [W-1:0] ex_tdata,
  input  logic         ex_ireg_en,
  input  logic [W-1:0] ex_idata,
  input  logic         ex_mux_sel_d,
  input  logic         ex_sum_en_d,
  input  logic [W-1:0] ex_sbus,
  output logic [W-1:0] ex_out_bus,
  output logic         ex_out_driven,
  output logic [W-1:0] ex_tbus,
  output logic [W-1:0] ex_ibus,
  output logic [W-1:0] ex_rbus,
  output logic         ex_treg_en_gated,
  output logic         ex_ireg_en_gated,
  output logic [1:0]   ex_mux_sel_lines,
  // fanout example
  input  logic         fo_dreg_en,
  input  logic [W-1:0] fo_ddata,
  input  logic         fo_mreg_en,
  input  logic [W-1:0] fo_mdata,
  input  logic         fo_sel_en,
  input  logic [1:0]   fo_sel_d,
  input  logic [W-1:0] fo_addend,
  input  logic         fo_odc_muxout_next,
  input  logic         fo_odc_sum_next,
  input  logic         fo_odc_carry_next,
  output logic [W-1:0] fo_mux_out,
  output logic [W-1:0] fo_sum,
  output logic         fo_carry,
  output logic [W-1:0] fo_dbus,
  output logic [W-1:0] fo_mbus,
  output logic         fo_dreg_en_gated,
  output logic         fo_mreg_en_gated
);

  csg_example_datapath #(.W(W), .GATING(1'b1)) u_example (
    .clk, .rst_n,
    .treg_en       (ex_treg_en),   .tdata (ex_tdata),
    .ireg_en       (ex_ireg_en),   .idata (ex_idata),
    .mux_sel_d     (ex_mux_sel_d), .sum_en_d (ex_sum_en_d),
    .sbus          (ex_sbus),
    .out_bus       (ex_out_bus),   .out_driven (ex_out_driven),
    .tbus          (ex_tbus),      .ibus (ex_ibus), .rbus (ex_rbus),
    .treg_en_gated (ex_treg_en_gated),
    .ireg_en_gated (ex_ireg_en_gated),
    .mux_sel_lines (ex_mux_sel_lines)
  );

  csg_fanout_example #(.W(W), .GATING(1'b1)) u_fanout (
    .clk, .rst_n,
    .dreg_en (fo_dreg_en), .ddata (fo_ddata),
    .mreg_en (fo_mreg_en), .mdata (fo_mdata),
    .sel_en  (fo_sel_en),  .sel_d (fo_sel_d),
    .addend  (fo_addend),
    .odc_muxout_next (fo_odc_muxout_next),
    .odc_sum_next    (fo_odc_sum_next),
    .odc_carry_next  (fo_odc_carry_next),
    .mux_out (fo_mux_out), .sum (fo_sum), .carry (fo_carry),
    .dbus    (fo_dbus),    .mbus (fo_mbus),
    .dreg_en_gated (fo_dreg_en_gated),
    .mreg_en_gated (fo_mreg_en_gated)
  );

endmodule
