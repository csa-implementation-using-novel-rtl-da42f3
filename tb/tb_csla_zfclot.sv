// End-to-end, self-checking testbench of the 16-bit ZFCLOT carry select
// adder at its default parameters. It compares {cout, sum} with a + b + cin
// for directed corner cases and a run of random operands, and counts how
// often each mechanism of the adder was exercised, using a reference model
// of the group carries worked out from the operands alone:
//   rca0_path     a group from Module 1 on received carry 0 (multiplexer
//                 passes the RCA 0 result)
//   zfclot_path   a group received carry 1 (multiplexer passes the ZFCLOT
//                 result)
//   zfc_carry     the ZFCLOT itself made the group carry: RCA 0 gave
//                 carry 0 and sum 3, and the incoming carry 1 pushed it over
//   full_ripple   a carry entered at cin travelled through every group to
//                 cout
//   carry_out     the adder's carry out was 1
// A mechanism that never occurs counts as a failure.
module tb_csla_zfclot;
  localparam int W  = 16;
  localparam int G  = W / 2;
  localparam int NRANDOM = 200000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_rca0 = 0, n_zfc = 0, n_zfc_carry = 0, n_ripple = 0, n_cout = 0;

  csla_zfclot dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand set, check the result and count mechanisms.
  task automatic apply(input logic [W-1:0] ta, tb, input logic tc);
    logic [W:0] expected;
    logic       gc;        // reference carry into the current group
    int         gsum;      // group a + b with carry 0
    bit         all_prop;
    a = ta; b = tb; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + (W+1)'(tc);
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h (expected %h)",
                 ta, tb, tc, cout, sum, expected);
    end
    // Mechanism counts from a reference model of the group carries.
    gc       = tc;
    all_prop = 1'b1;
    for (int k = 0; k < G; k++) begin
      gsum = int'(ta[2*k +: 2]) + int'(tb[2*k +: 2]);
      if (gsum != 3) all_prop = 1'b0;
      if (k > 0) begin
        if (gc) n_zfc++; else n_rca0++;
        if (gc && gsum == 3) n_zfc_carry++;
      end
      gc = (gsum + int'(gc)) > 3;
    end
    if (tc && all_prop) n_ripple++;
    if (expected[W]) n_cout++;
  endtask

  initial begin
    // Directed corner cases.
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);           // carry ripples through all groups
    apply('1, '1, 1'b1);
    apply('1, W'(1), 1'b0);
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h1234, 16'h4321, 1'b0);
    // Every value of the two lowest groups and the carry in, with random
    // upper bits, so that Module 0 and Module 1 see all their inputs.
    for (int v = 0; v < 512; v++)
      apply({W'($urandom) & ~W'(16'h000F)} | W'(v[3:0]),
            {W'($urandom) & ~W'(16'h000F)} | W'(v[7:4]), v[8]);
    // Random operands.
    for (int i = 0; i < NRANDOM; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));

    $display("mechanisms: rca0_path=%0d zfclot_path=%0d zfc_carry=%0d full_ripple=%0d carry_out=%0d",
             n_rca0, n_zfc, n_zfc_carry, n_ripple, n_cout);
    if (n_rca0 == 0)      begin failures++; $display("FAIL rca0_path never exercised");   end
    if (n_zfc == 0)       begin failures++; $display("FAIL zfclot_path never exercised"); end
    if (n_zfc_carry == 0) begin failures++; $display("FAIL zfc_carry never exercised");   end
    if (n_ripple == 0)    begin failures++; $display("FAIL full_ripple never exercised"); end
    if (n_cout == 0)      begin failures++; $display("FAIL carry_out never exercised");   end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
