// 4-bit carry look-ahead unit.
//
// From four propagate/generate pairs and a carry-in it computes, in two
// levels of logic, the carry out of every position,
//   c[i] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[0]&ci,
// together with the group propagate pg = p[3]&p[2]&p[1]&p[0] and the group
// generate gg = g[3] | p[3]g[2] | p[3]p[2]g[1] | p[3]p[2]p[1]g[0], so that
// c[3] = gg | pg&ci.
//
// The same unit is used at both levels of the adder: on bit P/G it yields
// the carries inside a 4-bit group plus that group's PG/GG, and on the four
// groups' PG/GG it yields the carries out of each group. P is the XOR form
// of propagate (or the OR form in masked positions); the equations hold for
// both. Purely combinational.
module cla4_unit (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       ci,
  output logic [3:0] c,
  output logic       pg,
  output logic       gg
);

  always_comb begin
    c[0] = g[0]
         | (p[0] & ci);
    c[1] = g[1]
         | (p[1] & g[0])
         | (p[1] & p[0] & ci);
    c[2] = g[2]
         | (p[2] & g[1])
         | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & ci);
    gg   = g[3]
         | (p[3] & g[2])
         | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[3] = gg | (pg & ci);
  end

endmodule
