// Self-checking testbench of rca2_0 (2-bit ripple carry adder, carry in 0):
// all 16 operand pairs against the arithmetic sum a + b.
module tb_rca2_0;
  logic [1:0] a, b, su;
  logic       c1;
  int checks = 0, failures = 0;

  rca2_0 dut (.a(a), .b(b), .su(su), .c1(c1));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if ({c1, su} != 3'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> c1=%b su=%0d", a, b, c1, su);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
