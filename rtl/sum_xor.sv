// Sum generation of the 16-bit adder (Part 3).
//
// A row of 2-input XOR gates forms S_i = P_i XOR C_(i-1), with the
// carry-in taking the place of C_(-1) for bit 0, and the carry out of the
// top bit becomes the 17th sum bit, S16 = C15. The propagate bits are those
// of Part 1, reused here, so a masked position (P = A OR B, no carry in)
// gives the approximate sum bit A OR B. Purely combinational.
module sum_xor
  import clacsma_pkg::*;
(
  input  word_t            p,
  input  word_t            c,
  input  logic             ci,
  output logic [WIDTH:0]   s
);

  assign s = {c[WIDTH-1], p ^ {c[WIDTH-2:0], ci}};

endmodule
