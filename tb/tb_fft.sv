// Self-checking test of the FFT/IFFT unit. Random 10-bit inputs are
// transformed forward and compared with a double-precision DFT
// (tolerance 4 LSB); random 14-bit inputs are transformed inverse and
// compared with IDFT/128 (tolerance 3 LSB, one rounding per stage). Done must come 577 cycles
// after start (128 reordering cycles + 7 stages x 64 butterflies + 1).
// The shared complex multiplier is modelled here.
module tb_fft;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic start, inverse, busy, done, ld_we;
  logic [6:0] ld_addr, rd_addr;
  fft_t ld_data, rd_data;
  logic signed [FW-1:0]    mul_a_re, mul_a_im;
  logic signed [TWW-1:0]   mul_b_re, mul_b_im;
  logic signed [FW+TWW:0]  mul_p_re, mul_p_im;
  assign mul_p_re = mul_a_re * mul_b_re - mul_a_im * mul_b_im;
  assign mul_p_im = mul_a_re * mul_b_im + mul_a_im * mul_b_re;

  fft dut (.*);

  int checks = 0, failures = 0;
  real xr [FFT_N], xi [FFT_N];
  localparam real PI = 3.14159265358979323846;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit inv, input int amp, input real tol);
    int lat;
    real maxerr;
    for (int i = 0; i < FFT_N; i++) begin
      int a, b;
      a = $urandom_range(2*amp) - amp; b = $urandom_range(2*amp) - amp;
      if (inv == 0 && i >= 16) begin a = 0; b = 0; end   // channel-like: few taps
      xr[i] = a; xi[i] = b;
      @(negedge clk); ld_we = 1; ld_addr = 7'(i); ld_data.re = FW'(a); ld_data.im = FW'(b);
    end
    @(negedge clk); ld_we = 0; start = 1; inverse = inv;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 577) begin failures++; $display("FAIL: latency %0d", lat); end
    maxerr = 0;
    for (int k = 0; k < FFT_N; k++) begin
      real er, ei, s;
      er = 0; ei = 0;
      s = inv ? 1.0 : -1.0;
      for (int n = 0; n < FFT_N; n++) begin
        real ang;
        ang = s * 2.0 * PI * real'(k * n) / real'(FFT_N);
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      if (inv) begin er /= FFT_N; ei /= FFT_N; end
      rd_addr = 7'(k); #0.1;
      checks++;
      if ((er - real'(rd_data.re)) > tol || (real'(rd_data.re) - er) > tol ||
          (ei - real'(rd_data.im)) > tol || (real'(rd_data.im) - ei) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL: inv=%0d bin %0d got %0d %0d exp %f %f", inv, k, rd_data.re, rd_data.im, er, ei);
      end
    end
  endtask

  initial begin
    start = 0; inverse = 0; ld_we = 0; ld_addr = '0; rd_addr = '0; ld_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 511, 4.0);
    run(1, 16000, 3.0);
    run(0, 300, 4.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
