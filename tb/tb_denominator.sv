// Self-checking test of the denominator unit: random and extreme 18-bit
// complex inputs and 24-bit sigma2; den must equal re^2 + im^2 + sigma2 one
// cycle after in_valid, with out_valid following in_valid.
module tb_denominator;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic in_valid, out_valid;
  fft_t h;
  logic [23:0] sigma2;
  logic [2*FW:0] den;
  int checks = 0, failures = 0;

  denominator dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; h = '0; sigma2 = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      longint e;
      @(negedge clk);
      in_valid = 1;
      h = fft_t'({$urandom, $urandom});
      if (n == 0) begin h.re = -18'sd131072; h.im = -18'sd131072; end
      sigma2 = 24'($urandom);
      if (n == 0) sigma2 = '1;
      e = longint'(h.re)*h.re + longint'(h.im)*h.im + longint'(sigma2);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || longint'(den) != e) begin
        failures++; if (failures < 10) $display("FAIL: den %0d exp %0d", den, e);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
