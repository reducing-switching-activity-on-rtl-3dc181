// csg_top_tb: end-to-end test of the top level at its default (64-bit) size.
// Both example datapaths run the same kind of random operation streams as in
// their own tests, in parallel, through the top's ports.  Ungated copies of
// each datapath run alongside as the activity baseline.  Every observed
// result is checked against a reference model; every gating mechanism
// (dropped register loads, held mux selects, kept output bus, DBus gating by
// the intersection of its two fanout ODCs) must occur, and the gated
// internal buses must toggle less than the ungated ones.
module csg_top_tb;
  import csg_pkg::*;
  localparam int unsigned W = DATA_W;
  localparam int NCYC = 5000;

  logic clk;
  logic rst_n;

  // example datapath stimulus and outputs
  logic         f1_treg_en, f1_ireg_en, f1_mux_sel_d, f1_sum_en_d;
  logic [W-1:0] f1_tdata, f1_idata, f1_sbus;
  logic [W-1:0] f1_out, f1_tbus, f1_ibus, f1_rbus;
  logic         f1_drv, f1_ten, f1_ien;
  logic [1:0]   f1_sel;
  logic [W-1:0] b1_out, b1_tbus, b1_ibus, b1_rbus;
  logic         b1_drv, b1_ten, b1_ien;
  logic [1:0]   b1_sel;
  // fanout example stimulus and outputs
  logic         f3_dreg_en, f3_mreg_en, f3_sel_en, f3_odc_mux, f3_odc_sum, f3_odc_carry;
  logic [1:0]   f3_sel_d;
  logic [W-1:0] f3_ddata, f3_mdata, f3_addend;
  logic [W-1:0] f3_mux, f3_sum, f3_dbus, f3_mbus;
  logic         f3_carry, f3_den, f3_men;
  logic [W-1:0] b3_mux, b3_sum, b3_dbus, b3_mbus;
  logic         b3_carry, b3_den, b3_men;

  // reference state
  logic [W-1:0] t_ref, i_ref, out_ref, d_ref, m_ref;
  logic         sum_ref, msel_ref, om_ref, os_ref, oc_ref;
  logic [1:0]   sel3_ref, gsel3;
  logic [W:0]   full;
  logic [W-1:0] p_t, p_i, p_r, p_d, q_t, q_i, q_r, q_d;
  longint       tg_t = 0, tg_i = 0, tg_r = 0, tg_d = 0, tu_t = 0, tu_i = 0, tu_r = 0, tu_d = 0;
  int checks = 0, failures = 0;
  int n_treg_drop = 0, n_ireg_drop = 0, n_msel_hold = 0, n_out_kept = 0, n_out_drv = 0;
  int n_d_drop = 0, n_d_keep_mux = 0, n_d_keep_add = 0, n_m_drop = 0, n_sel3_hold = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  csg_top dut (
    .clk, .rst_n,
    .ex_treg_en (f1_treg_en), .ex_tdata (f1_tdata),
    .ex_ireg_en (f1_ireg_en), .ex_idata (f1_idata),
    .ex_mux_sel_d (f1_mux_sel_d), .ex_sum_en_d (f1_sum_en_d), .ex_sbus (f1_sbus),
    .ex_out_bus (f1_out), .ex_out_driven (f1_drv),
    .ex_tbus (f1_tbus), .ex_ibus (f1_ibus), .ex_rbus (f1_rbus),
    .ex_treg_en_gated (f1_ten), .ex_ireg_en_gated (f1_ien), .ex_mux_sel_lines (f1_sel),
    .fo_dreg_en (f3_dreg_en), .fo_ddata (f3_ddata),
    .fo_mreg_en (f3_mreg_en), .fo_mdata (f3_mdata),
    .fo_sel_en (f3_sel_en), .fo_sel_d (f3_sel_d), .fo_addend (f3_addend),
    .fo_odc_muxout_next (f3_odc_mux), .fo_odc_sum_next (f3_odc_sum),
    .fo_odc_carry_next (f3_odc_carry),
    .fo_mux_out (f3_mux), .fo_sum (f3_sum), .fo_carry (f3_carry),
    .fo_dbus (f3_dbus), .fo_mbus (f3_mbus),
    .fo_dreg_en_gated (f3_den), .fo_mreg_en_gated (f3_men)
  );

  // Ungated baselines for the activity comparison.
  csg_example_datapath #(.W(W), .GATING(1'b0)) base1 (
    .clk, .rst_n, .treg_en (f1_treg_en), .tdata (f1_tdata), .ireg_en (f1_ireg_en),
    .idata (f1_idata), .mux_sel_d (f1_mux_sel_d), .sum_en_d (f1_sum_en_d), .sbus (f1_sbus),
    .out_bus (b1_out), .out_driven (b1_drv), .tbus (b1_tbus), .ibus (b1_ibus), .rbus (b1_rbus),
    .treg_en_gated (b1_ten), .ireg_en_gated (b1_ien), .mux_sel_lines (b1_sel));

  csg_fanout_example #(.W(W), .GATING(1'b0)) base3 (
    .clk, .rst_n, .dreg_en (f3_dreg_en), .ddata (f3_ddata), .mreg_en (f3_mreg_en),
    .mdata (f3_mdata), .sel_en (f3_sel_en), .sel_d (f3_sel_d), .addend (f3_addend),
    .odc_muxout_next (f3_odc_mux), .odc_sum_next (f3_odc_sum), .odc_carry_next (f3_odc_carry),
    .mux_out (b3_mux), .sum (b3_sum), .carry (b3_carry), .dbus (b3_dbus), .mbus (b3_mbus),
    .dreg_en_gated (b3_den), .mreg_en_gated (b3_men));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    f1_treg_en = 0; f1_ireg_en = 0; f1_mux_sel_d = 0; f1_sum_en_d = 0;
    f1_tdata = '0; f1_idata = '0; f1_sbus = '0;
    f3_dreg_en = 0; f3_mreg_en = 0; f3_sel_en = 0; f3_sel_d = 2'b01;
    f3_odc_mux = 0; f3_odc_sum = 0; f3_odc_carry = 0;
    f3_ddata = '0; f3_mdata = '0; f3_addend = '0;
    t_ref = '0; i_ref = '0; out_ref = '0; d_ref = '0; m_ref = '0;
    sel3_ref = '0; gsel3 = '0; msel_ref = 0; sum_ref = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    p_t = f1_tbus; p_i = f1_ibus; p_r = f1_rbus; p_d = f3_dbus;
    q_t = b1_tbus; q_i = b1_ibus; q_r = b1_rbus; q_d = b3_dbus;
    for (int c = 0; c < NCYC; c++) begin
      // ---- cycle T-1 ----
      f1_sum_en_d  = ($urandom % 10) < 4;
      f1_mux_sel_d = 1'($urandom);
      f1_treg_en   = 1'($urandom);
      f1_ireg_en   = 1'($urandom);
      if (f1_sum_en_d && !f1_mux_sel_d) f1_treg_en = 1'b1;
      if (f1_sum_en_d &&  f1_mux_sel_d) f1_ireg_en = 1'b1;
      f1_tdata = {$urandom, $urandom};
      f1_idata = {$urandom, $urandom};

      f3_odc_mux   = ($urandom % 3) != 0;
      f3_odc_sum   = ($urandom % 3) != 0;
      f3_odc_carry = ($urandom % 3) != 0;
      f3_sel_en    = 1'($urandom);
      f3_sel_d     = (($urandom % 2) != 0) ? 2'b10 : 2'b01;
      f3_dreg_en   = 1'($urandom);
      f3_mreg_en   = 1'($urandom);
      if (!f3_odc_mux) begin
        f3_sel_en = 1'b1;
        if (f3_sel_d[0]) f3_dreg_en = 1'b1; else f3_mreg_en = 1'b1;
      end
      if (!(f3_odc_sum && f3_odc_carry)) f3_dreg_en = 1'b1;
      f3_ddata = {$urandom, $urandom};
      f3_mdata = {$urandom, $urandom};
      #1;
      if (f1_treg_en && !f1_ten) n_treg_drop++;
      if (f1_ireg_en && !f1_ien) n_ireg_drop++;
      if (!f1_sum_en_d && f1_mux_sel_d != f1_sel[1]) n_msel_hold++;
      if (f3_dreg_en && !f3_den) n_d_drop++;
      if (f3_dreg_en && f3_den && f3_odc_sum && f3_odc_carry) n_d_keep_mux++;
      if (f3_dreg_en && f3_den && f3_odc_mux) n_d_keep_add++;
      if (f3_mreg_en && !f3_men) n_m_drop++;
      if (f3_sel_en && f3_odc_mux && f3_sel_d != gsel3) n_sel3_hold++;
      @(posedge clk);
      if (f1_treg_en) t_ref = f1_tdata;
      if (f1_ireg_en) i_ref = f1_idata;
      sum_ref  = f1_sum_en_d;
      msel_ref = f1_mux_sel_d;
      if (f3_dreg_en) d_ref = f3_ddata;
      if (f3_mreg_en) m_ref = f3_mdata;
      if (f3_sel_en) sel3_ref = f3_sel_d;
      if (f3_sel_en && !f3_odc_mux) gsel3 = f3_sel_d;
      om_ref = f3_odc_mux; os_ref = f3_odc_sum; oc_ref = f3_odc_carry;
      #1;
      // ---- cycle T ----
      f1_sbus   = {$urandom, $urandom};
      f3_addend = {$urandom, $urandom};
      #1;
      if (sum_ref) begin
        out_ref = (msel_ref ? i_ref : t_ref) + f1_sbus;
        n_out_drv++;
      end else begin
        n_out_kept++;
      end
      check(f1_drv == sum_ref, "example out_driven");
      check(f1_out == out_ref && b1_out == out_ref, "example out_bus");
      full = {1'b0, d_ref} + {1'b0, f3_addend};
      if (!om_ref) check(f3_mux == (sel3_ref[0] ? d_ref : m_ref), "fanout mux_out");
      if (!os_ref) check(f3_sum == full[W-1:0], "fanout sum");
      if (!oc_ref) check(f3_carry == full[W], "fanout carry");
      tg_t += $countones(f1_tbus ^ p_t); tu_t += $countones(b1_tbus ^ q_t);
      tg_i += $countones(f1_ibus ^ p_i); tu_i += $countones(b1_ibus ^ q_i);
      tg_r += $countones(f1_rbus ^ p_r); tu_r += $countones(b1_rbus ^ q_r);
      tg_d += $countones(f3_dbus ^ p_d); tu_d += $countones(b3_dbus ^ q_d);
      p_t = f1_tbus; p_i = f1_ibus; p_r = f1_rbus; p_d = f3_dbus;
      q_t = b1_tbus; q_i = b1_ibus; q_r = b1_rbus; q_d = b3_dbus;
      @(negedge clk);
    end
    $display("example events: treg_drop=%0d ireg_drop=%0d mux_sel_hold=%0d out_driven=%0d out_kept=%0d",
             n_treg_drop, n_ireg_drop, n_msel_hold, n_out_drv, n_out_kept);
    $display("fanout events: dbus_drop=%0d dbus_keep_mux_only=%0d dbus_keep_adder_only=%0d mbus_drop=%0d sel_hold=%0d",
             n_d_drop, n_d_keep_mux, n_d_keep_add, n_m_drop, n_sel3_hold);
    $display("toggles gated/ungated: TBus %0d/%0d IBus %0d/%0d RBus %0d/%0d DBus %0d/%0d",
             tg_t, tu_t, tg_i, tu_i, tg_r, tu_r, tg_d, tu_d);
    $display("internal-bus toggle reduction, example datapath: %0d%%",
             100 - (100 * (tg_t + tg_i + tg_r)) / (tu_t + tu_i + tu_r));
    check(n_treg_drop > 0, "TReg load dropped");
    check(n_ireg_drop > 0, "IReg load dropped");
    check(n_msel_hold > 0, "mux_sel held");
    check(n_out_drv > 0 && n_out_kept > 0, "output bus driven and kept");
    check(n_d_drop > 0, "DBus load dropped");
    check(n_d_keep_mux > 0 && n_d_keep_add > 0, "DBus kept by one fanout");
    check(n_m_drop > 0 && n_sel3_hold > 0, "fanout mux gated");
    check(tg_t < tu_t && tg_i < tu_i && tg_r < tu_r && tg_d < tu_d, "activity reduced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
