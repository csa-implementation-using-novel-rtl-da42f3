// Self-checking testbench of oai_logic: all eight input combinations. The
// expected output is the inverse of "z and (x or y)", worked out with
// integer arithmetic rather than the same Boolean expression.
module tb_oai_logic;
  logic x, y, z, o;
  int checks = 0, failures = 0;

  oai_logic dut (.x(x), .y(y), .z(z), .o(o));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_o;
      {x, y, z} = 3'(v);
      #1;
      exp_o = !((int'(x) + int'(y)) > 0 && z == 1'b1);
      checks++;
      if (o != exp_o) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b -> o=%b (expected %b)", x, y, z, o, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
