// Self-checking testbench of half_adder: all four input combinations,
// compared with the arithmetic sum a + b.
module tb_half_adder;
  logic a, b, s, ca;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .ca(ca));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({ca, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> ca=%b s=%b", a, b, ca, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
