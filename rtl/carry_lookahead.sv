// Two-level carry look-ahead network of the 16-bit adder (Part 2).
//
// Four first-level 4-bit CLA units (units 0..3) each take one 4-bit slice
// of P and G. They produce the group propagate PG_k, the group generate GG_k
// and the three carries inside the group (C2-0, C6-4, C10-8, C14-12). The
// second-level unit 4 takes the four PG/GG pairs and produces the carries out
// of the groups, C3, C7, C11 and C15. C3, C7 and C11 are the carry-ins of
// units 1, 2 and 3. Unit 0 and unit 4 both take the adder's carry-in ci.
//
// The carry out of each first-level unit's top position (its c[3]) repeats
// what unit 4 computes and is left unused, as is the PG/GG of unit 4: only
// the connections of the published structure are made.
// c[i] is the carry out of bit i (C_i in the equations). Purely combinational.
module carry_lookahead
  import clacsma_pkg::*;
(
  input  word_t p,
  input  word_t g,
  input  logic  ci,
  output word_t c
);

  logic [NUM_GROUPS-1:0] grp_p;   // PG0..PG3
  logic [NUM_GROUPS-1:0] grp_g;   // GG0..GG3
  logic [NUM_GROUPS-1:0] grp_c;   // C3, C7, C11, C15
  logic [NUM_GROUPS-1:0] grp_ci;  // carry into units 0..3

  assign grp_ci = {grp_c[NUM_GROUPS-2:0], ci};

  for (genvar k = 0; k < NUM_GROUPS; k++) begin : g_unit
    logic [GROUP_W-1:0] c_local;

    cla4_unit u_cla (
      .p  (p[k*GROUP_W +: GROUP_W]),
      .g  (g[k*GROUP_W +: GROUP_W]),
      .ci (grp_ci[k]),
      .c  (c_local),
      .pg (grp_p[k]),
      .gg (grp_g[k])
    );

    assign c[k*GROUP_W +: GROUP_W-1] = c_local[GROUP_W-2:0];
    assign c[k*GROUP_W + GROUP_W-1]  = grp_c[k];
  end

  cla4_unit u_cla4 (
    .p  (grp_p),
    .g  (grp_g),
    .ci (ci),
    .c  (grp_c),
    .pg (),
    .gg ()
  );

endmodule
