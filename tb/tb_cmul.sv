// Self-checking test of the complex multiplier: random and extreme operands
// compared with an integer model of (a_re + j a_im)(b_re + j b_im).
module tb_cmul;
  logic signed [8:0]  a_re, a_im;
  logic signed [11:0] b_re, b_im;
  logic signed [21:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int er, ei;
      if (n < 4) begin
        a_re = (n & 1) ? -9'sd256 : 9'sd255; a_im = (n & 2) ? -9'sd256 : 9'sd255;
        b_re = -12'sd2048; b_im = -12'sd2048;
      end else begin
        a_re = 9'($urandom); a_im = 9'($urandom); b_re = 12'($urandom); b_im = 12'($urandom);
      end
      #1;
      er = int'(a_re)*int'(b_re) - int'(a_im)*int'(b_im);
      ei = int'(a_re)*int'(b_im) + int'(a_im)*int'(b_re);
      checks++;
      if (int'(p_re) != er || int'(p_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d %0d * %0d %0d = %0d %0d, expected %0d %0d", a_re, a_im, b_re, b_im, p_re, p_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
