// csg_fanout_example_tb: test of the multiple-fanout bus example.
// A gated and an ungated copy receive the same random stream of ODCs, loads
// and selects.  The stream obeys the contract that whatever an observed
// output needs in cycle T (the select, the selected register, DBus for the
// adder) is loaded in cycle T-1.  Each output is checked against a reference
// in every cycle whose ODC was announced as 0.  The test counts DBus loads
// dropped (both fanouts unobserved), DBus loads kept because only one fanout
// was observed, dropped mux-input loads and held selects, and requires fewer
// DBus toggles in the gated copy.
module csg_fanout_example_tb;
  localparam int unsigned W = 64;
  localparam int NCYC = 3000;

  logic         clk;
  logic         rst_n;
  logic         dreg_en, mreg_en, sel_en, odc_mux, odc_sum, odc_carry;
  logic [1:0]   sel_d;
  logic [W-1:0] ddata, mdata, addend;
  logic [W-1:0] g_mux, u_mux, g_sum, u_sum, g_d, u_d, g_m, u_m;
  logic         g_carry, u_carry, g_den, u_den, g_men, u_men;

  logic [W-1:0] d_ref, m_ref, pg_d, pu_d;
  logic [1:0]   sel_ref, gsel;  // gsel: select lines the gated copy should hold
  logic         om_ref, os_ref, oc_ref;
  logic [W:0]   full;
  longint       tog_g = 0, tog_u = 0;
  int checks = 0, failures = 0;
  int n_d_drop = 0, n_d_keep_mux_only = 0, n_d_keep_add_only = 0, n_m_drop = 0, n_sel_hold = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  csg_fanout_example #(.W(W), .GATING(1'b1)) dut_g (
    .clk, .rst_n, .dreg_en, .ddata, .mreg_en, .mdata, .sel_en, .sel_d, .addend,
    .odc_muxout_next (odc_mux), .odc_sum_next (odc_sum), .odc_carry_next (odc_carry),
    .mux_out (g_mux), .sum (g_sum), .carry (g_carry), .dbus (g_d), .mbus (g_m),
    .dreg_en_gated (g_den), .mreg_en_gated (g_men));

  csg_fanout_example #(.W(W), .GATING(1'b0)) dut_u (
    .clk, .rst_n, .dreg_en, .ddata, .mreg_en, .mdata, .sel_en, .sel_d, .addend,
    .odc_muxout_next (odc_mux), .odc_sum_next (odc_sum), .odc_carry_next (odc_carry),
    .mux_out (u_mux), .sum (u_sum), .carry (u_carry), .dbus (u_d), .mbus (u_m),
    .dreg_en_gated (u_den), .mreg_en_gated (u_men));

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
    rst_n = 1'b0; dreg_en = 0; mreg_en = 0; sel_en = 0; sel_d = 2'b01;
    odc_mux = 0; odc_sum = 0; odc_carry = 0; ddata = '0; mdata = '0; addend = '0;
    d_ref = '0; m_ref = '0; sel_ref = '0; gsel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    pg_d = g_d; pu_d = u_d;
    for (int c = 0; c < NCYC; c++) begin
      odc_mux   = ($urandom % 3) != 0;
      odc_sum   = ($urandom % 3) != 0;
      odc_carry = ($urandom % 3) != 0;
      sel_en    = 1'($urandom);
      sel_d     = (($urandom % 2) != 0) ? 2'b10 : 2'b01;
      dreg_en   = 1'($urandom);
      mreg_en   = 1'($urandom);
      if (!odc_mux) begin
        sel_en = 1'b1;
        if (sel_d[0]) dreg_en = 1'b1; else mreg_en = 1'b1;
      end
      if (!(odc_sum && odc_carry)) dreg_en = 1'b1;
      ddata = {$urandom, $urandom};
      mdata = {$urandom, $urandom};
      #1;
      if (dreg_en && !g_den) n_d_drop++;
      if (dreg_en && g_den && odc_sum && odc_carry) n_d_keep_mux_only++;
      if (dreg_en && g_den && odc_mux) n_d_keep_add_only++;
      if (mreg_en && !g_men) n_m_drop++;
      if (sel_en && odc_mux && sel_d != gsel) n_sel_hold++;
      check(u_den == dreg_en && u_men == mreg_en, "ungated enables");
      // a dropped DBus load must be a don't-care on both fanouts
      if (dreg_en && !g_den)
        check((!sel_d[0] || odc_mux || !sel_en) && odc_sum && odc_carry, "DBus drop allowed");
      @(posedge clk);
      if (dreg_en) d_ref = ddata;
      if (mreg_en) m_ref = mdata;
      if (sel_en) sel_ref = sel_d;
      if (sel_en && !odc_mux) gsel = sel_d;
      om_ref = odc_mux; os_ref = odc_sum; oc_ref = odc_carry;
      #1;
      addend = {$urandom, $urandom};
      #1;
      full = {1'b0, d_ref} + {1'b0, addend};
      if (!om_ref) begin
        check(g_mux == (sel_ref[0] ? d_ref : m_ref), "gated mux_out");
        check(u_mux == (sel_ref[0] ? d_ref : m_ref), "ungated mux_out");
      end
      if (!os_ref) check(g_sum == full[W-1:0] && u_sum == full[W-1:0], "sum");
      if (!oc_ref) check(g_carry == full[W] && u_carry == full[W], "carry");
      tog_g += $countones(g_d ^ pg_d); tog_u += $countones(u_d ^ pu_d);
      pg_d = g_d; pu_d = u_d;
      @(negedge clk);
    end
    $display("events: dbus_drop=%0d dbus_keep_mux_only=%0d dbus_keep_adder_only=%0d mbus_drop=%0d sel_hold=%0d",
             n_d_drop, n_d_keep_mux_only, n_d_keep_add_only, n_m_drop, n_sel_hold);
    $display("DBus toggles gated/ungated: %0d/%0d", tog_g, tog_u);
    check(n_d_drop > 0 && n_d_keep_mux_only > 0 && n_d_keep_add_only > 0, "DBus gating events");
    check(n_m_drop > 0 && n_sel_hold > 0, "mux gating events");
    check(tog_g < tog_u, "DBus activity reduced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
