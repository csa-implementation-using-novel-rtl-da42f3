// One-bit full adder.
//
// Adds x, y and the carry input cin; s is the sum bit and cout the carry
// out. Purely combinational, no clock. It is the basic cell of both
// 2-bit ripple carry adders of the CSLA (instances "FA_0" / "FA_n" in the
// design description). The description takes the full adder from the cell
// library and does not give its gates; the sum-of-products form below is
// this design's own.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end

endmodule
