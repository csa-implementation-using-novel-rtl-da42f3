// 2-bit ripple carry adder with carry input ("RCA", Module 0 of the CSLA).
//
// Two full adders in series: the first adds a[0], b[0] and cin and hands its
// carry to the second, which adds a[1] and b[1]. sum is the 2-bit result and
// cout the carry out. Combinational; the carry ripples through both cells.
// Structure and port names follow the design description; in the 16-bit
// adder this block takes the external carry input and forms bits 1:0.
module rca2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       cout
);

  logic c;  // carry between the two full adders

  full_adder fa_0 (.x(a[0]), .y(b[0]), .cin(cin), .s(sum[0]), .cout(c));
  full_adder fa_n (.x(a[1]), .y(b[1]), .cin(c),   .s(sum[1]), .cout(cout));

endmodule
