// Self-checking testbench for the carry-maskable half adder.
// Walks all eight combinations of (m_x, a, b). The expected values are the
// half-adder truth table for m_x = 1 (sum = a XOR b, carry = a AND b) and
// the masked behaviour for m_x = 0 (P = a OR b, G = 0).
module tb_cmha;
  logic m_x, a, b, p, g;
  int   checks = 0, failures = 0;

  cmha dut (.m_x(m_x), .a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_p, exp_g;
    for (int v = 0; v < 8; v++) begin
      {m_x, a, b} = 3'(v);
      #1;
      exp_p = m_x ? (a != b) : (a || b);
      exp_g = m_x && a && b;
      checks++;
      if (p !== exp_p || g !== exp_g) begin
        failures++;
        $display("FAIL m_x=%0b a=%0b b=%0b : p=%0b g=%0b expected p=%0b g=%0b",
                 m_x, a, b, p, g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
