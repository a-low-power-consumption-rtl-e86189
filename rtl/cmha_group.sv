// Group of carry-maskable half adders sharing one carry mask.
//
// GROUP_W CMHAs (four in the published adder) take one slice of the two
// operands and produce the slice's propagate and generate vectors. All of
// them see the same mask m_x: 1 gives the accurate P = A XOR B and
// G = A AND B, 0 gives P = A OR B and G = 0 for the whole slice. A group
// that must always be accurate is this block with m_x tied to 1.
// Bit i of p/g belongs to bit i of a/b. Purely combinational.
module cmha_group #(
  parameter int unsigned GROUP_W = clacsma_pkg::GROUP_W
) (
  input  logic               m_x,
  input  logic [GROUP_W-1:0] a,
  input  logic [GROUP_W-1:0] b,
  output logic [GROUP_W-1:0] p,
  output logic [GROUP_W-1:0] g
);

  for (genvar i = 0; i < GROUP_W; i++) begin : g_cmha
    cmha u_cmha (
      .m_x (m_x),
      .a   (a[i]),
      .b   (b[i]),
      .p   (p[i]),
      .g   (g[i])
    );
  end

endmodule
