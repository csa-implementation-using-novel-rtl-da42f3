// One-bit half adder.
//
// Adds the two bits a and b: s is the sum bit and ca the carry out (port
// names as in the description's "ha" cell). Purely combinational. It is the
// first stage of the 2-bit RCA 0, whose carry input is fixed at 0, which is
// why a half adder is enough there. The XOR/AND form is the usual one; the
// description does not give the gates.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic ca
);

  always_comb begin
    s  = a ^ b;
    ca = a & b;
  end

endmodule
