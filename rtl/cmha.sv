// Carry-maskable half adder (CMHA).
//
// Prepares the propagate (P) and generate (G) bits of one bit position of a
// carry look-ahead adder, with a mask input that switches the position
// between an accurate and an approximate mode:
//   m_x = 1 : P = A XOR B, G = A AND B   (ordinary half adder)
//   m_x = 0 : P = A OR  B, G = 0         (carry generation masked)
// With G forced to 0 no carry is generated here, and P = A OR B makes the
// approximate sum bit wrong by 1 (not 2) when A = B = 1.
//
// The gate structure follows the published circuit: the XOR is built as
// (A OR B) AND NAND(...), and the NAND is widened to three inputs so that
// M_X can force it to 1; an inverter on the NAND output gives G.
// Purely combinational, no clock.
module cmha (
  input  logic m_x,
  input  logic a,
  input  logic b,
  output logic p,
  output logic g
);

  logic u;  // 3-input NAND, 1 whenever the carry is masked
  logic w;  // 2-input OR

  assign u = ~(m_x & a & b);
  assign w = a | b;
  assign p = w & u;
  assign g = ~u;

endmodule
