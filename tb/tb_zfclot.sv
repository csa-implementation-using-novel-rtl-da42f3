// Self-checking testbench of zfclot. It applies every input the block can
// receive from an RCA 0 ({c1, s1} from 0 to 6) with cp = 0 and 1, and checks
// {c, s} = {c1, s1} + cp. It also checks the published example point:
// S1(n-1) = 0, S1(n) = 1, CP = 0, C1 = 1 gives S(n-1) = 0, S(n) = 1, C = 1.
module tb_zfclot;
  logic [1:0] s1, s;
  logic       c1, cp, c;
  int checks = 0, failures = 0;

  zfclot dut (.s1(s1), .c1(c1), .cp(cp), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example point.
    s1 = 2'b10; c1 = 1'b1; cp = 1'b0;
    #1;
    checks++;
    if (s != 2'b10 || c != 1'b1) begin
      failures++;
      $display("FAIL example point: s=%b c=%b", s, c);
    end
    // Every value an RCA 0 can produce (0 .. 6), with both carries.
    for (int v = 0; v <= 6; v++) begin
      for (int k = 0; k < 2; k++) begin
        {c1, s1} = 3'(v);
        cp       = k[0];
        #1;
        checks++;
        if ({c, s} != 3'(v + k)) begin
          failures++;
          $display("FAIL c1s1=%0d cp=%0d -> c=%b s=%b", v, k, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
