// Self-checking testbench for the sum generation XOR row.
// Random P/C words and carry-ins; each expected sum bit is built one bit
// at a time as P_i XOR C_(i-1), with ci for bit 0 and C15 as bit 16.
module tb_sum_xor;
  logic [15:0] p, c;
  logic        ci;
  logic [16:0] s;
  int          checks = 0, failures = 0;

  sum_xor dut (.p(p), .c(c), .ci(ci), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] exp_s;
    for (int n = 0; n < 20000; n++) begin
      p  = 16'($urandom);
      c  = 16'($urandom);
      ci = 1'($urandom);
      #1;
      for (int i = 0; i < 16; i++)
        exp_s[i] = p[i] ^ ((i == 0) ? ci : c[i-1]);
      exp_s[16] = c[15];
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL p=%h c=%h ci=%0b : s=%h expected %h", p, c, ci, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
