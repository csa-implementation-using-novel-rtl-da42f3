// Carry select adder (CSLA) built from ZFCLOT groups.
//
// Adds two WIDTH-bit operands and a carry input: {cout, sum} = a + b + cin.
// The operands are cut into 2-bit groups (WIDTH/2 of them, eight for the
// 16-bit adder):
//   * Module 0 (bits 1:0) is a 2-bit ripple carry adder that takes cin.
//   * Each of Modules 1 .. WIDTH/2-1 has an RCA 0, which adds its two bits
//     as though the carry in were 0, and a ZFCLOT, which adds the carry
//     from the group below to that result. A 2:1 multiplexer, selected by
//     that carry, passes the RCA 0 result (carry 0) or the ZFCLOT result
//     (carry 1) on as the group's sum and carry out.
// The RCA 0 additions of all groups run in parallel; only the group carry
// travels from group to group, through one ZFCLOT carry cell and one
// multiplexer per group. Purely combinational: no clock, no registers, the
// result is valid one propagation delay after the inputs.
//
// Group size, the module split and the block types follow the design
// description; the way the multiplexer is wired between RCA 0 and ZFCLOT is
// this design's reading of it. WIDTH must be an even number of at least 4;
// its default of 16 is the description's adder size.
module csla_zfclot
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NGROUPS = WIDTH / GROUP_W;

  // carry[k] is the carry into group k; carry[NGROUPS] is the adder's carry out.
  logic [NGROUPS:0] carry;

  initial begin
    assert (WIDTH % GROUP_W == 0 && WIDTH >= 2 * GROUP_W)
      else $error("csla_zfclot: WIDTH must be an even number of at least 4");
  end

  assign carry[0] = cin;

  // Module 0: ripple carry adder with the external carry input.
  rca2 u_module0 (
    .a   (a[GROUP_W-1:0]),
    .b   (b[GROUP_W-1:0]),
    .cin (carry[0]),
    .sum (sum[GROUP_W-1:0]),
    .cout(carry[1])
  );

  // Modules 1 .. NGROUPS-1: RCA 0 + ZFCLOT + 2:1 multiplexer.
  for (genvar k = 1; k < NGROUPS; k++) begin : g_module
    group_res_t rca0_res;  // result for a carry in of 0
    group_res_t zfc_res;   // result for the actual carry in
    group_res_t sel_res;   // multiplexer output

    rca2_0 u_rca0 (
      .a (a[k*GROUP_W +: GROUP_W]),
      .b (b[k*GROUP_W +: GROUP_W]),
      .su(rca0_res.s),
      .c1(rca0_res.c)
    );

    zfclot u_zfclot (
      .s1(rca0_res.s),
      .c1(rca0_res.c),
      .cp(carry[k]),
      .s (zfc_res.s),
      .c (zfc_res.c)
    );

    mux2 #(.WIDTH($bits(group_res_t))) u_mux (
      .d0 (rca0_res),
      .d1 (zfc_res),
      .sel(carry[k]),
      .y  (sel_res)
    );

    assign sum[k*GROUP_W +: GROUP_W] = sel_res.s;
    assign carry[k+1]                = sel_res.c;
  end

  assign cout = carry[NGROUPS];

endmodule
