// gated_reg_tb: self-checking test of the gated register.
// Drives random enables, one-cycle-early ODCs and data, and checks every
// cycle that the applied enable is en & ~odc_next and that q follows a
// reference register loaded only with that enable.  Also checks that a load
// requested while the output is a don't-care is really dropped.
module gated_reg_tb;
  localparam int unsigned W = 64;
  localparam int NCYC = 2000;

  logic         clk;
  logic         rst_n;
  logic         en, odc_next, en_gated;
  logic [W-1:0] d, q, q_ref;
  int checks = 0, failures = 0, dropped = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  gated_reg #(.W(W)) dut (.clk, .rst_n, .en, .odc_next, .d, .q, .en_gated);

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
    rst_n = 1'b0; en = 1'b0; odc_next = 1'b0; d = '0; q_ref = '0;
    repeat (2) @(posedge clk);
    #1 check(q == '0, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      en       = 1'($urandom);
      odc_next = 1'($urandom);
      d        = {$urandom, $urandom};
      #1 check(en_gated == (en && !odc_next), "en_gated");
      if (en && odc_next) dropped++;
      @(posedge clk);
      if (en && !odc_next) q_ref = d;
      #1 check(q == q_ref, "q");
      @(negedge clk);
    end
    check(dropped > 0, "some loads dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
