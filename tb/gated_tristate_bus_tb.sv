// gated_tristate_bus_tb: self-checking test of the gated tri-state bus.
// Four drivers, at most one enabled per cycle, with a random bus ODC.  The
// bus must carry the enabled driver's data when its enable survives the
// gating, and otherwise keep the last driven value.
module gated_tristate_bus_tb;
  localparam int unsigned W = 64;
  localparam int unsigned N = 4;
  localparam int NCYC = 2000;

  logic                clk;
  logic                rst_n;
  logic [N-1:0]        tri_en, tri_en_gated;
  logic                odc, driven;
  logic [N-1:0][W-1:0] tri_in;
  logic [W-1:0]        bus, last_ref;
  int checks = 0, failures = 0, kept = 0, drv = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  gated_tristate_bus #(.W(W), .N(N)) dut (.clk, .rst_n, .tri_en, .odc, .tri_in, .tri_en_gated, .bus, .driven);

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
    int k;
    rst_n = 1'b0; tri_en = '0; odc = 1'b0; tri_in = '0; last_ref = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      k = $urandom % (N + 1);
      tri_en = (k < N) ? (N'(1) << k) : '0;
      odc    = ($urandom % 3) == 0;
      for (int j = 0; j < N; j++) tri_in[j] = {$urandom, $urandom};
      #1;
      check(tri_en_gated == (odc ? '0 : tri_en), "tri_en_gated");
      if (k < N && !odc) begin
        drv++;
        check(driven && bus == tri_in[k], "driven bus");
        last_ref = tri_in[k];
      end else begin
        kept++;
        check(!driven && bus == last_ref, "kept bus");
      end
      @(negedge clk);
    end
    check(kept > 0 && drv > 0, "both cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
