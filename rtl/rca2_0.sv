// 2-bit ripple carry adder with carry input 0 ("RCA 0").
//
// Because the carry input is fixed at 0, bit 0 needs only a half adder; its
// carry ca feeds a full adder that adds a[1] and b[1]. su is the 2-bit sum
// and c1 the carry out, both valid for a group carry input of 0. The ZFCLOT
// that follows derives the result for a carry input of 1 from these three
// bits. Combinational. Structure and port names (su, c1) follow the design
// description; this block forms the first half of Modules 1 to 7.
module rca2_0 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] su,
  output logic       c1
);

  logic ca;  // half adder carry into the full adder

  half_adder ha (.a(a[0]), .b(b[0]), .s(su[0]), .ca(ca));
  full_adder fa (.x(a[1]), .y(b[1]), .cin(ca), .s(su[1]), .cout(c1));

endmodule
