// 2:1 multiplexer of WIDTH bits.
//
// y = d1 when sel is 1, otherwise d0. Combinational. In the CSLA each group
// from Module 1 on has one, selected by the carry from the group below: it
// passes the RCA 0 result (sum and carry for carry-in 0) or the ZFCLOT result
// (the same plus one). The description only names the 2:1 multiplexer; its
// width of 3 (two sum bits and the carry) is this design's choice.
module mux2 #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
