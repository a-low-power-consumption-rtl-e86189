// Self-checking testbench for the two-level 16-bit carry look-ahead network.
// Drives directed propagate chains (a carry generated at bit 0 or coming in
// at ci and travelling through every group) and random P/G words. The
// expected carries come from a bit-serial ripple c_i = g_i | p_i & c_(i-1).
module tb_carry_lookahead;
  logic [15:0] p, g, c;
  logic        ci;
  int          checks = 0, failures = 0;

  carry_lookahead dut (.p(p), .g(g), .ci(ci), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ripple(logic [15:0] pp, logic [15:0] gg, logic cc);
    logic [15:0] r;
    logic        carry = cc;
    for (int i = 0; i < 16; i++) begin
      carry = gg[i] | (pp[i] & carry);
      r[i]  = carry;
    end
    return r;
  endfunction

  task automatic check();
    logic [15:0] exp_c;
    #1;
    exp_c = ripple(p, g, ci);
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL p=%h g=%h ci=%0b : c=%h expected %h", p, g, ci, c, exp_c);
    end
  endtask

  initial begin
    // Full-length propagate chains from ci and from each generate position.
    p = 16'hFFFF; g = 16'h0000; ci = 1'b1; check();
    p = 16'hFFFF; g = 16'h0000; ci = 1'b0; check();
    for (int i = 0; i < 16; i++) begin
      p = 16'hFFFF; g = 16'(1) << i; ci = 1'b0; check();
      p = ~(16'(1) << i); g = 16'h0000; ci = 1'b1; check();
    end
    for (int n = 0; n < 200000; n++) begin
      p  = 16'($urandom);
      g  = 16'($urandom) & ~(16'($urandom) & p);
      ci = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
