// 16-bit accuracy-configurable carry look-ahead adder with carry-maskable
// half adders.
//
// An ordinary CLA in three parts, where the half adders of Part 1 can mask
// carry generation at run time:
//   Part 1  four groups of four carry-maskable half adders (CMHAs) prepare
//           P and G. Groups 0..2 (bits 3-0, 7-4, 11-8) have the masks
//           m_x[0..2]; group 3 (bits 15-12) has none and is always accurate.
//   Part 2  a two-level look-ahead network of five 4-bit CLA units turns
//           P/G into the carries C15-0.
//   Part 3  XOR gates form S_i = P_i XOR C_(i-1); S16 = C15.
// With every mask at 1 the result is the exact a + b + cin. Clearing a mask
// makes its group generate no carry and put A OR B on its propagate bits.
// With cin = 0 and masks cleared from group 0 up to group k, no carry is
// produced below bit 4k+4, those sum bits read a OR b (off by at most 1 per
// bit where both operand bits are 1), and the upper part adds exactly.
//
// Ports: a, b (16 bits), cin, m_x (1 = accurate, one bit per maskable group),
// sum (17 bits, sum[16] = carry out) and carry (the carry out again).
// The published structure ties the carry-in to 0; here it is the cin
// input of the published port list, so cin = 0 gives that structure
// exactly. Three separate masks follow the structure drawing; a single mode
// input is obtained by driving all three from it.
// Purely combinational: the result is valid one adder delay after the inputs.
module clacsma16
  import clacsma_pkg::*;
(
  input  word_t          a,
  input  word_t          b,
  input  logic           cin,
  input  mask_t          m_x,
  output logic [WIDTH:0] sum,
  output logic           carry
);

  word_t p;   // P15-0
  word_t g;   // G15-0
  word_t c;   // C15-0

  // Part 1: P/G preparation. The top group's mask is tied to 1 (accurate).
  for (genvar k = 0; k < NUM_GROUPS; k++) begin : g_part1
    logic grp_mask;
    if (k < NUM_MASKS) begin : g_masked
      assign grp_mask = m_x[k];
    end else begin : g_accurate
      assign grp_mask = 1'b1;
    end

    cmha_group #(.GROUP_W(GROUP_W)) u_group (
      .m_x (grp_mask),
      .a   (a[k*GROUP_W +: GROUP_W]),
      .b   (b[k*GROUP_W +: GROUP_W]),
      .p   (p[k*GROUP_W +: GROUP_W]),
      .g   (g[k*GROUP_W +: GROUP_W])
    );
  end

  // Part 2: carry look-ahead.
  carry_lookahead u_part2 (
    .p  (p),
    .g  (g),
    .ci (cin),
    .c  (c)
  );

  // Part 3: sum generation.
  sum_xor u_part3 (
    .p  (p),
    .c  (c),
    .ci (cin),
    .s  (sum)
  );

  assign carry = c[WIDTH-1];

endmodule
