// Self-checking testbench of full_adder: all eight input combinations,
// compared with the arithmetic sum x + y + cin.
module tb_full_adder;
  logic x, y, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b -> cout=%b s=%b", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
