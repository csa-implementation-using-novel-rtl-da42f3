// Self-checking testbench of mux2 at its default width: random data words
// with both select values.
module tb_mux2;
  localparam int W = 3;
  logic [W-1:0] d0, d1, y;
  logic         sel;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (y != (i[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL d0=%b d1=%b sel=%b -> y=%b", d0, d1, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
