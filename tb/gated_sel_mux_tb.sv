// gated_sel_mux_tb: self-checking test of the mux with held selects.
// Random one-hot (or idle) next selects, select-load enables, ODCs and data.
// A reference select register is loaded only when sel_en & ~odc_next; the
// output is checked against an independent AND-OR of the inputs, and the
// test confirms that select changes requested while the output is a
// don't-care were held off.
module gated_sel_mux_tb;
  localparam int unsigned W = 64;
  localparam int NCYC = 2000;

  logic         clk;
  logic         rst_n;
  logic         sel_en, odc_next;
  logic [1:0]   sel_d, sel_q, sel_ref;
  logic [W-1:0] in0, in1, mux_out, exp_out;
  int checks = 0, failures = 0, held = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  gated_sel_mux #(.W(W)) dut (.clk, .rst_n, .sel_en, .odc_next, .sel_d, .in0, .in1, .sel_q, .mux_out);

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
    rst_n = 1'b0; sel_en = 1'b0; odc_next = 1'b0; sel_d = '0; in0 = '0; in1 = '0; sel_ref = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      sel_en   = ($urandom % 4) != 0;
      odc_next = 1'($urandom);
      case ($urandom % 3)
        0: sel_d = 2'b01;
        1: sel_d = 2'b10;
        default: sel_d = 2'b00;
      endcase
      if (sel_en && odc_next && sel_d != sel_ref) held++;
      @(posedge clk);
      if (sel_en && !odc_next) sel_ref = sel_d;
      #1;
      in0 = {$urandom, $urandom};
      in1 = {$urandom, $urandom};
      #1;
      case (sel_ref)
        2'b01:   exp_out = in0;
        2'b10:   exp_out = in1;
        default: exp_out = '0;
      endcase
      check(sel_q == sel_ref, "sel_q");
      check(mux_out == exp_out, "mux_out");
      @(negedge clk);
    end
    check(held > 0, "select changes held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
