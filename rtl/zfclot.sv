// 3-bit ZFCLOT: zero-finding logic built with logic optimisation.
//
// Takes the 3-bit result of an RCA 0 (carry c1, sums s1[1:0], all for a
// carry input of 0) and the carry cp from the group below, and returns that
// result plus cp: {c, s} = {c1, s1} + cp. The RCA 0 can never produce
// {c1, s1} = 3'b111 (at most 3 + 3 = 6), so the increment never overflows.
//
//   n1   = NAND(s1[0], cp)          low when the increment reaches bit 1
//   s[0] = s1[0] XOR cp
//   s[1] = OAI(s1[1], n1, NAND(s1[1], n1))        = s1[1] XOR ~n1
//   c    = OAI(NAND(s1[1]), n1, NAND(c1))         = c1 | (s1[1] & ~n1)
//
// (NAND(v) is a NAND with both inputs tied to v, i.e. an inverter.)
// The description states that the ZFCLOT is made of NAND gates and OAI cells,
// with an XOR on the low bit, and names the signals CP, S1(n-1), S1(n), C1,
// S(n-1), S(n) and C; the exact wiring of the gates above is this design's
// own, chosen to give the function. Combinational, no clock.
module zfclot (
  input  logic [1:0] s1,  // RCA 0 sum: s1[1] = S1(n), s1[0] = S1(n-1)
  input  logic       c1,  // RCA 0 carry C1
  input  logic       cp,  // carry from the previous group (CP)
  output logic [1:0] s,   // s[1] = S(n), s[0] = S(n-1)
  output logic       c    // group carry out C
);

  logic n1;      // NAND(s1[0], cp)
  logic t_hi;    // NAND(s1[1], n1), third input of the sum OAI
  logic ns1_hi;  // NAND(s1[1], s1[1])
  logic nc1;     // NAND(c1, c1)

  always_comb begin
    n1     = ~(s1[0] & cp);
    t_hi   = ~(s1[1] & n1);
    ns1_hi = ~(s1[1] & s1[1]);
    nc1    = ~(c1 & c1);
    s[0]   = s1[0] ^ cp;
  end

  oai_logic u_oai_sum   (.x(s1[1]),  .y(n1), .z(t_hi), .o(s[1]));
  oai_logic u_oai_carry (.x(ns1_hi), .y(n1), .z(nc1),  .o(c));

endmodule
