// csg_example_datapath_tb: end-to-end test of the example datapath.
// A gated and an ungated copy receive the same random operation stream.  The
// stream obeys the datapath's contract (an operand consumed in cycle T is
// loaded in cycle T-1) and otherwise loads registers and flips mux_sel at
// random.  Both copies are checked against a reference: while sum_en is 1 the
// output bus carries operand + SBus, otherwise it keeps its last value.  The
// test also counts the gating events (dropped TReg/IReg loads, held mux_sel)
// and requires the gated copy to toggle TBus, IBus and RBus less often than
// the ungated one.
module csg_example_datapath_tb;
  localparam int unsigned W = 64;
  localparam int NCYC = 3000;

  logic         clk;
  logic         rst_n;
  logic         treg_en, ireg_en, mux_sel_d, sum_en_d;
  logic [W-1:0] tdata, idata, sbus;
  logic [W-1:0] g_out, u_out, g_tbus, u_tbus, g_ibus, u_ibus, g_rbus, u_rbus;
  logic         g_drv, u_drv, g_ten, u_ten, g_ien, u_ien;
  logic [1:0]   g_sel, u_sel;

  // reference state
  logic [W-1:0] t_ref, i_ref, out_ref, op;
  logic         sum_ref, sel_ref;
  logic [W-1:0] pg_t, pg_i, pg_r, pu_t, pu_i, pu_r;
  longint       tog_g_t = 0, tog_g_i = 0, tog_g_r = 0, tog_u_t = 0, tog_u_i = 0, tog_u_r = 0;
  int checks = 0, failures = 0;
  int n_treg_drop = 0, n_ireg_drop = 0, n_sel_hold = 0, n_out_kept = 0, n_out_drv = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  csg_example_datapath #(.W(W), .GATING(1'b1)) dut_g (
    .clk, .rst_n, .treg_en, .tdata, .ireg_en, .idata, .mux_sel_d, .sum_en_d, .sbus,
    .out_bus (g_out), .out_driven (g_drv), .tbus (g_tbus), .ibus (g_ibus), .rbus (g_rbus),
    .treg_en_gated (g_ten), .ireg_en_gated (g_ien), .mux_sel_lines (g_sel));

  csg_example_datapath #(.W(W), .GATING(1'b0)) dut_u (
    .clk, .rst_n, .treg_en, .tdata, .ireg_en, .idata, .mux_sel_d, .sum_en_d, .sbus,
    .out_bus (u_out), .out_driven (u_drv), .tbus (u_tbus), .ibus (u_ibus), .rbus (u_rbus),
    .treg_en_gated (u_ten), .ireg_en_gated (u_ien), .mux_sel_lines (u_sel));

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
    rst_n = 1'b0; treg_en = 0; ireg_en = 0; mux_sel_d = 0; sum_en_d = 0;
    tdata = '0; idata = '0; sbus = '0;
    t_ref = '0; i_ref = '0; out_ref = '0; sum_ref = 0; sel_ref = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    pg_t = g_tbus; pg_i = g_ibus; pg_r = g_rbus; pu_t = u_tbus; pu_i = u_ibus; pu_r = u_rbus;
    for (int c = 0; c < NCYC; c++) begin
      // cycle T-1: loads and next-cycle control
      sum_en_d  = ($urandom % 10) < 4;
      mux_sel_d = 1'($urandom);
      treg_en   = 1'($urandom);
      ireg_en   = 1'($urandom);
      if (sum_en_d && !mux_sel_d) treg_en = 1'b1;
      if (sum_en_d &&  mux_sel_d) ireg_en = 1'b1;
      tdata = {$urandom, $urandom};
      idata = {$urandom, $urandom};
      #1;
      if (treg_en && !g_ten) n_treg_drop++;
      if (ireg_en && !g_ien) n_ireg_drop++;
      if (!sum_en_d && mux_sel_d != g_sel[1]) n_sel_hold++;
      check(u_ten == treg_en && u_ien == ireg_en, "ungated enables");
      @(posedge clk);
      if (treg_en) t_ref = tdata;
      if (ireg_en) i_ref = idata;
      sum_ref = sum_en_d;
      sel_ref = mux_sel_d;
      #1;
      // cycle T: SBus and the result
      sbus = {$urandom, $urandom};
      #1;
      op = sel_ref ? i_ref : t_ref;
      if (sum_ref) begin
        out_ref = op + sbus;
        n_out_drv++;
      end else begin
        n_out_kept++;
      end
      check(g_drv == sum_ref && u_drv == sum_ref, "out_driven");
      check(g_out == out_ref, "gated out_bus");
      check(u_out == out_ref, "ungated out_bus");
      if (sum_ref) check(g_sel == {sel_ref, !sel_ref}, "mux select when observed");
      tog_g_t += $countones(g_tbus ^ pg_t); tog_u_t += $countones(u_tbus ^ pu_t);
      tog_g_i += $countones(g_ibus ^ pg_i); tog_u_i += $countones(u_ibus ^ pu_i);
      tog_g_r += $countones(g_rbus ^ pg_r); tog_u_r += $countones(u_rbus ^ pu_r);
      pg_t = g_tbus; pg_i = g_ibus; pg_r = g_rbus; pu_t = u_tbus; pu_i = u_ibus; pu_r = u_rbus;
      @(negedge clk);
    end
    $display("events: treg_drop=%0d ireg_drop=%0d sel_hold=%0d out_driven=%0d out_kept=%0d",
             n_treg_drop, n_ireg_drop, n_sel_hold, n_out_drv, n_out_kept);
    $display("toggles gated/ungated: TBus %0d/%0d IBus %0d/%0d RBus %0d/%0d",
             tog_g_t, tog_u_t, tog_g_i, tog_u_i, tog_g_r, tog_u_r);
    check(n_treg_drop > 0 && n_ireg_drop > 0 && n_sel_hold > 0, "gating events seen");
    check(n_out_drv > 0 && n_out_kept > 0, "output driven and kept");
    check(tog_g_t < tog_u_t && tog_g_i < tog_u_i && tog_g_r < tog_u_r, "activity reduced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
