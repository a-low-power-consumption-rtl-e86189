// Self-checking testbench for a group of four carry-maskable half adders.
// Exhaustive over the mask and both 4-bit operand slices (512 cases); the
// expected P/G vectors are formed with whole-word operators.
module tb_cmha_group;
  logic       m_x;
  logic [3:0] a, b, p, g;
  int         checks = 0, failures = 0;

  cmha_group #(.GROUP_W(4)) dut (.m_x(m_x), .a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_p, exp_g;
    for (int v = 0; v < 512; v++) begin
      {m_x, a, b} = 9'(v);
      #1;
      exp_p = m_x ? (a ^ b) : (a | b);
      exp_g = m_x ? (a & b) : 4'b0000;
      checks++;
      if (p !== exp_p || g !== exp_g) begin
        failures++;
        $display("FAIL m_x=%0b a=%b b=%b : p=%b g=%b expected p=%b g=%b",
                 m_x, a, b, p, g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
