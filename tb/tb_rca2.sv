// Self-checking testbench of rca2 (2-bit ripple carry adder with carry in).
// Applies the published example point first (cin = 1, A = 0, B = 1 gives
// sum = 2, Cout = 0), then all 32 input combinations against a + b + cin.
module tb_rca2;
  logic [1:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca2 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [1:0] ea, eb, input logic ec);
    a = ea; b = eb; cin = ec;
    #1;
    checks++;
    if ({cout, sum} != 3'(int'(ea) + int'(eb) + int'(ec))) begin
      failures++;
      $display("FAIL a=%0d b=%0d cin=%b -> cout=%b sum=%0d", ea, eb, ec, cout, sum);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example point from the design description's simulation.
    a = 2'd0; b = 2'd1; cin = 1'b1;
    #1;
    checks++;
    if (sum != 2'd2 || cout != 1'b0) begin
      failures++;
      $display("FAIL example point: sum=%0d cout=%b", sum, cout);
    end
    for (int v = 0; v < 32; v++) check(2'(v >> 3), 2'(v >> 1), v[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
