// OR-AND-INVERT cell ("OAI Logic").
//
// o = ~((x | y) & z): x and y go through an OR, the result is ANDed with z
// and inverted. Combinational, one complex gate. Function and port order
// (x, y into the OR, z into the AND) follow the design description, whose
// schematic names the three inputs x(1), x(2), x(3). The ZFCLOT uses two of
// these cells per group.
module oai_logic (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic o
);

  always_comb o = ~((x | y) & z);

endmodule
