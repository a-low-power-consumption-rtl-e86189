// Self-checking testbench for the 4-bit carry look-ahead unit.
// Exhaustive over p, g and ci (512 cases). The expected carries come from
// rippling c = g | p & c_prev bit by bit; the expected group signals from
// running the same ripple with carry-in 0 (gg) and checking all-propagate (pg).
module tb_cla4_unit;
  logic [3:0] p, g, c;
  logic       ci, pg, gg;
  int         checks = 0, failures = 0;

  cla4_unit dut (.p(p), .g(g), .ci(ci), .c(c), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_c;
    logic       carry, carry0, exp_pg;
    for (int v = 0; v < 512; v++) begin
      {p, g, ci} = 9'(v);
      #1;
      carry  = ci;
      carry0 = 1'b0;
      exp_pg = 1'b1;
      for (int i = 0; i < 4; i++) begin
        carry    = g[i] | (p[i] & carry);
        carry0   = g[i] | (p[i] & carry0);
        exp_c[i] = carry;
        exp_pg   = exp_pg & p[i];
      end
      checks++;
      if (c !== exp_c || pg !== exp_pg || gg !== carry0) begin
        failures++;
        $display("FAIL p=%b g=%b ci=%0b : c=%b pg=%0b gg=%0b expected c=%b pg=%0b gg=%0b",
                 p, g, ci, c, pg, gg, exp_c, exp_pg, carry0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
