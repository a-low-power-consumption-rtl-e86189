// End-to-end self-checking testbench for the 16-bit carry-maskable CLA.
//
// Runs the adder at its only size (16 bits) and checks:
//  * three worked examples with all masks at 1 (exact mode), including the
//    internal P, G and carry words of the last one;
//  * exact mode against a + b + cin;
//  * any mask setting against a bit-serial model of the masked adder
//    (P = a XOR b or a OR b, G = a AND b or 0, c_i = G_i | P_i c_(i-1),
//    s_i = P_i XOR c_(i-1));
//  * any mask setting against the closed form a + b + cin - (a AND b AND
//    masked), where "masked" has ones on the bits of groups whose mask is 0
//    (a masked group adds a OR b to 0 instead of a to b);
//  * masks cleared from group 0 up to group k with cin = 0 against the
//    arithmetic form {exact sum of the upper groups, a OR b below}.
// It counts how often each mechanism occurs (exact mode, each group's mask
// changing the result, carry out, carry-in, a carry skipping two groups
// through the second-level unit) and fails if one never occurs.
module tb_clacsma16;
  import clacsma_pkg::*;

  word_t       a, b;
  logic        cin;
  mask_t       m_x;
  logic [16:0] sum;
  logic        carry;
  int          checks = 0, failures = 0;

  int n_exact = 0, n_cin = 0, n_cout = 0, n_skip = 0;
  int n_mask_effect [NUM_MASKS];

  clacsma16 dut (.a(a), .b(b), .cin(cin), .m_x(m_x), .sum(sum), .carry(carry));

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit-serial model of the masked adder.
  function automatic logic [16:0] model(word_t aa, word_t bb, logic cc, mask_t mm);
    logic [16:0] r;
    logic        carry_v = cc;
    logic        msk, pi, gi;
    for (int i = 0; i < 16; i++) begin
      msk     = (i / 4 < NUM_MASKS) ? mm[i/4] : 1'b1;
      pi      = msk ? (aa[i] ^ bb[i]) : (aa[i] | bb[i]);
      gi      = msk & aa[i] & bb[i];
      r[i]    = pi ^ carry_v;
      carry_v = gi | (pi & carry_v);
    end
    r[16] = carry_v;
    return r;
  endfunction

  function automatic word_t masked_bits(mask_t mm);
    word_t r = '0;
    for (int k = 0; k < NUM_MASKS; k++)
      if (!mm[k]) r[k*GROUP_W +: GROUP_W] = '1;
    return r;
  endfunction

  task automatic expect_eq(logic [16:0] exp_sum, string what);
    checks++;
    if (sum !== exp_sum || carry !== exp_sum[16]) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0b m_x=%b : sum=%0d carry=%0b expected %0d",
               what, a, b, cin, m_x, sum, carry, exp_sum);
    end
  endtask

  task automatic apply(word_t aa, word_t bb, logic cc, mask_t mm);
    logic [16:0] exact;
    a = aa; b = bb; cin = cc; m_x = mm;
    #1;
    exact = 17'(a) + 17'(b) + 17'(cin);
    if (&m_x) begin
      n_exact++;
      expect_eq(exact, "exact");
    end
    expect_eq(model(a, b, cin, m_x), "model");
    expect_eq(exact - {1'b0, a & b & masked_bits(m_x)}, "closed form");
    if (cin) n_cin++;
    if (carry) n_cout++;
    // carry out of group 0 travels through groups 1 and 2 into group 3
    if (dut.u_part2.grp_c[0] && dut.u_part2.grp_p[1] && dut.u_part2.grp_p[2] &&
        dut.u_part2.grp_c[2])
      n_skip++;
    for (int k = 0; k < NUM_MASKS; k++)
      if (!m_x[k] && model(a, b, cin, m_x | mask_t'(1 << k)) != sum)
        n_mask_effect[k]++;
  endtask

  initial begin
    logic [16:0] exp_s;
    for (int k = 0; k < NUM_MASKS; k++) n_mask_effect[k] = 0;

    // Worked examples, exact mode (single mode input m = 1 drives all masks).
    apply(16'd2223,  16'd15699, 1'b0, '1); expect_eq(17'd17922, "example 1");
    apply(16'd2223,  16'd15696, 1'b0, '1); expect_eq(17'd17919, "example 2");
    apply(16'd14511, 16'd15696, 1'b0, '1); expect_eq(17'd30207, "example 3");
    checks++;
    if (dut.g !== 16'b0011100000000000 || dut.p !== 16'b0000010111111111 ||
        dut.c[14:0] !== 15'b011100000000000 || sum[15:0] !== 16'b0111010111111111) begin
      failures++;
      $display("FAIL example 3 internals: g=%b p=%b c=%b", dut.g, dut.p, dut.c);
    end

    // Directed: long carry chains, carry out, every mask pattern.
    apply(16'hFFFF, 16'h0000, 1'b1, '1);
    apply(16'hFFFF, 16'h0001, 1'b0, '1);
    apply(16'h0FFF, 16'h0001, 1'b0, '1);
    apply(16'h8000, 16'h8000, 1'b0, '1);
    for (int mm = 0; mm < (1 << NUM_MASKS); mm++) begin
      apply(16'hFFFF, 16'hFFFF, 1'b0, mask_t'(mm));
      apply(16'h7FFF, 16'h0001, 1'b0, mask_t'(mm));
      apply(16'h0FFF, 16'h0FFF, 1'b1, mask_t'(mm));
    end

    // Random vectors, random modes.
    for (int n = 0; n < 300000; n++)
      apply(word_t'($urandom), word_t'($urandom), 1'($urandom), mask_t'($urandom));

    // Masks cleared from group 0 up to group k, cin = 0: lower bits are a|b,
    // upper groups add exactly with no carry coming in.
    for (int k = 0; k < NUM_MASKS; k++) begin
      for (int n = 0; n < 20000; n++) begin
        int lo;
        a   = word_t'($urandom);
        b   = word_t'($urandom);
        cin = 1'b0;
        lo  = 4 * (k + 1);
        m_x = ~mask_t'((1 << (k + 1)) - 1);
        #1;
        exp_s = (17'(a >> lo) + 17'(b >> lo)) << lo;
        exp_s = exp_s | {1'b0, (a | b) & word_t'((1 << lo) - 1)};
        expect_eq(exp_s, "masked prefix");
      end
    end

    $display("mechanisms: exact=%0d cin=%0d carry_out=%0d group_skip=%0d",
             n_exact, n_cin, n_cout, n_skip);
    if (n_exact == 0 || n_cin == 0 || n_cout == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int k = 0; k < NUM_MASKS; k++) begin
      $display("mechanisms: mask %0d changed the result %0d times", k, n_mask_effect[k]);
      if (n_mask_effect[k] == 0) begin
        failures++;
        $display("FAIL mask %0d never changed a result", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
