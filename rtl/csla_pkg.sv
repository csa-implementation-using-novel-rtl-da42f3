// Shared constants and types of the 16-bit carry select adder built from
// ZFCLOT groups (zero-finding logic with logic optimisation).
//
// The adder is cut into groups of GROUP_W = 2 bits. Each group hands its
// result to the next as a group_res_t: the two sum bits and the carry out.
// The group size of two bits follows the design description ("each group
// has two information inputs"); the struct is this design's own packaging.
package csla_pkg;

  // Bits per CSLA group (Module 0 .. Module 7 of the 16-bit adder).
  localparam int unsigned GROUP_W = 2;

  // Result of one group: carry out in the top bit, sum bits below it.
  typedef struct packed {
    logic               c;
    logic [GROUP_W-1:0] s;
  } group_res_t;

endpackage
