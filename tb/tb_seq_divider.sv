// Self-checking test of the sequential divider at the sizes the filter
// calculation uses (40-bit signed numerator, 37-bit denominator, 18-bit
// quotient): random numerators of both signs, quotients inside and
// outside the 18-bit range (saturation), and division by zero. The result
// must be trunc(num/den) saturated, delivered 42 cycles after start (NUMW + 2).
module tb_seq_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic start, busy, done;
  logic signed [39:0] num;
  logic [36:0] den;
  logic signed [17:0] quo;
  int checks = 0, failures = 0;

  seq_divider dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; num = '0; den = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      longint e, lat;
      num = 40'(signed'({$urandom, $urandom})) >>> $urandom_range(30);
      den = 37'({$urandom, $urandom}) >> $urandom_range(36);
      if (n == 1) den = '0;
      if (n == 2) num = -40'sd549755813888;
      if (den == 0) e = (num < 0) ? -131072 : 131071;
      else begin
        e = longint'(num) / longint'(den);
        if (e > 131071) e = 131071;
        if (e < -131072) e = -131072;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (longint'(quo) != e || lat != 42) begin
        failures++; if (failures < 10) $display("FAIL: %0d / %0d = %0d exp %0d (lat %0d)", num, den, quo, e, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
