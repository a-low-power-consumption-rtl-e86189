// Shared sizes of the 16-bit carry-maskable carry look-ahead adder.
//
// The adder is built from 4-bit groups: four groups of carry-maskable half
// adders prepare P and G, four 4-bit CLA units resolve the carries inside
// each group and a fifth 4-bit CLA unit resolves the carries between groups.
// The lower three groups each have a carry-mask input; the top group is
// always accurate. These numbers are those of the published 16-bit example;
// the two-level look-ahead with a 4-bit second level fixes WIDTH at
// GROUP_W * NUM_GROUPS = 16.
package clacsma_pkg;

  localparam int unsigned GROUP_W    = 4;
  localparam int unsigned NUM_GROUPS = 4;
  localparam int unsigned WIDTH      = GROUP_W * NUM_GROUPS;
  // Groups 0..NUM_MASKS-1 are maskable; group NUM_GROUPS-1 has no mask.
  localparam int unsigned NUM_MASKS  = NUM_GROUPS - 1;

  typedef logic [WIDTH-1:0]     word_t;
  typedef logic [NUM_MASKS-1:0] mask_t;

endpackage
