// example_gating_ctrl_tb: exhaustive check of the gating equations of the
// example datapath, for the gated and the ungated variant, plus the
// registered sum_en.
module example_gating_ctrl_tb;
  logic clk;
  logic rst_n;
  logic mux_sel_d, sum_en_d;
  logic g_sum_en_q, g_odc_t, g_odc_i, g_odc_r;
  logic u_sum_en_q, u_odc_t, u_odc_i, u_odc_r;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  example_gating_ctrl #(.GATING(1'b1)) dut_g (.clk, .rst_n, .mux_sel_d, .sum_en_d,
    .sum_en_q (g_sum_en_q), .odc_tbus_next (g_odc_t), .odc_ibus_next (g_odc_i), .odc_rbus_next (g_odc_r));
  example_gating_ctrl #(.GATING(1'b0)) dut_u (.clk, .rst_n, .mux_sel_d, .sum_en_d,
    .sum_en_q (u_sum_en_q), .odc_tbus_next (u_odc_t), .odc_ibus_next (u_odc_i), .odc_rbus_next (u_odc_r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; mux_sel_d = 1'b0; sum_en_d = 1'b1;
    @(posedge clk); #1 check(!g_sum_en_q, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 4; v++) begin
        {mux_sel_d, sum_en_d} = 2'(v);
        #1;
        // IBus is observed next cycle only when it is selected and the sum is driven.
        check(g_odc_i == !(mux_sel_d && sum_en_d), "odc_ibus");
        check(g_odc_t == !(!mux_sel_d && sum_en_d), "odc_tbus");
        check(g_odc_r == !sum_en_d, "odc_rbus");
        check(!u_odc_i && !u_odc_t && !u_odc_r, "ungated odcs");
        @(posedge clk); #1;
        check(g_sum_en_q == sum_en_d && u_sum_en_q == sum_en_d, "sum_en_q");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
