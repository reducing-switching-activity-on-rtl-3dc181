// csg_adder_tb: self-checking test of the adder with carry out, with random
// and corner-case operands; the reference uses 128-bit arithmetic.
module csg_adder_tb;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, sum;
  logic         carry;
  logic [127:0] ref_full;
  int checks = 0, failures = 0;

  csg_adder #(.W(W)) dut (.a, .b, .sum, .carry);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin a = '1; b = 64'd1; end
        1: begin a = '1; b = '1; end
        2: begin a = '0; b = '0; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      #1;
      ref_full = 128'(a) + 128'(b);
      checks++;
      if ({carry, sum} != ref_full[64:0]) begin
        failures++;
        $display("FAIL %h + %h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
