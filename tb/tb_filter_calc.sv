// Self-checking test of the filter calculation: for three random channels
// (4 to 16 taps, 8 fractional bits) and noise variances, the 64 LE taps
// must match a double-precision evaluation of
//   w = IDFT128( conj(H) / (|H|^2 + sigma^2) ),  H = DFT128(h),
// taken at t = -32..31, in 10 fractional bits (tolerance 3 LSB for the
// fixed-point FFT, divider and rounding). The whole calculation must finish
// within 13,000 cycles. The shared complex multiplier is modelled here.
module tb_filter_calc;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic start, busy, done;
  tap_t cir [CIR_W];
  logic [23:0] sigma2;
  coef_t coef [LE_TAPS];
  logic signed [FW-1:0]   mul_a_re, mul_a_im;
  logic signed [TWW-1:0]  mul_b_re, mul_b_im;
  logic signed [FW+TWW:0] mul_p_re, mul_p_im;
  assign mul_p_re = mul_a_re * mul_b_re - mul_a_im * mul_b_im;
  assign mul_p_im = mul_a_re * mul_b_im + mul_a_im * mul_b_re;

  filter_calc dut (.*);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run(input int ntaps, input int s2);
    real hr [FFT_N], hi [FFT_N], Wr [FFT_N], Wi [FFT_N];
    int lat;
    for (int w = 0; w < CIR_W; w++) begin
      cir[w] = '0;
      if (w < ntaps) begin
        cir[w].re = HW'($urandom_range(160)) - HW'(80);
        cir[w].im = HW'($urandom_range(160)) - HW'(80);
      end
    end
    cir[0].re = 10'sd240;
    sigma2 = 24'(s2);
    for (int k = 0; k < FFT_N; k++) begin
      real ar, ai, den;
      ar = 0; ai = 0;
      for (int n = 0; n < CIR_W; n++) begin
        ar += (cir[n].re * $cos(2.0*PI*k*n/FFT_N) + cir[n].im * $sin(2.0*PI*k*n/FFT_N)) / 256.0;
        ai += (cir[n].im * $cos(2.0*PI*k*n/FFT_N) - cir[n].re * $sin(2.0*PI*k*n/FFT_N)) / 256.0;
      end
      den = ar*ar + ai*ai + real'(s2) / 65536.0;
      Wr[k] = ar / den; Wi[k] = -ai / den;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat > 13000) begin failures++; $display("FAIL: latency %0d", lat); end
    for (int j = 0; j < LE_TAPS; j++) begin
      int t;
      real er, ei;
      t = (j - LE_PRE + FFT_N) % FFT_N;
      er = 0; ei = 0;
      for (int k = 0; k < FFT_N; k++) begin
        er += (Wr[k] * $cos(2.0*PI*k*t/FFT_N) - Wi[k] * $sin(2.0*PI*k*t/FFT_N)) / FFT_N;
        ei += (Wi[k] * $cos(2.0*PI*k*t/FFT_N) + Wr[k] * $sin(2.0*PI*k*t/FFT_N)) / FFT_N;
      end
      er *= 1024.0; ei *= 1024.0;
      checks++;
      if (absr(er - coef[j].re) > 3.0 || absr(ei - coef[j].im) > 3.0) begin
        failures++;
        if (failures < 10) $display("FAIL: tap %0d got %0d %0d exp %f %f", j, coef[j].re, coef[j].im, er, ei);
      end
    end
  endtask

  initial begin
    start = 0; sigma2 = '0;
    for (int w = 0; w < CIR_W; w++) cir[w] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(4, 3277);
    run(8, 6554);
    run(16, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
