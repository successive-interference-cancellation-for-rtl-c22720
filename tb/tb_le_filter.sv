// Self-checking test of the LE filter: random 12-bit coefficients and 9-bit
// samples; after every shifted-in sample one output is computed and
// compared with a model of round(sum coef[j]*dl[j] / 2^10), saturated to
// 12 bits. Outputs are requested back to back, so each must come exactly
// 16 cycles after the previous one (64 taps on 4 multipliers). The shared
// multiplier of lane 0 is modelled here.
module tb_le_filter;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  coef_t coef [LE_TAPS];
  logic clear, shift, start, busy, ready, out_valid;
  sample_t din;
  chip_t dout;
  logic signed [SW-1:0]  sh_a_re, sh_a_im;
  logic signed [CW-1:0]  sh_b_re, sh_b_im;
  logic signed [SW+CW:0] sh_p_re, sh_p_im;
  assign sh_p_re = sh_a_re * sh_b_re - sh_a_im * sh_b_im;
  assign sh_p_im = sh_a_re * sh_b_im + sh_a_im * sh_b_re;

  le_filter dut (.*);

  int checks = 0, failures = 0;
  sample_t hist [LE_TAPS];
  int exp_re [$], exp_im [$];
  int last_t = -1, nout = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sat12(input longint v);
    longint r;
    r = (v + 512) >>> 10;
    return r > 2047 ? 2047 : (r < -2048 ? -2048 : int'(r));
  endfunction

  always @(negedge clk) if (out_valid) begin
    int er, ei, t;
    t = int'($time);
    er = exp_re.pop_front(); ei = exp_im.pop_front();
    checks++;
    if (int'(dout.re) != er || int'(dout.im) != ei) begin
      failures++; if (failures < 10) $display("FAIL: out %0d got %0d %0d exp %0d %0d", nout, dout.re, dout.im, er, ei);
    end
    if (last_t >= 0) begin
      checks++;
      if (t - last_t != 32) begin failures++; $display("FAIL: output spacing %0d cycles", (t - last_t)/2); end
    end
    last_t = t; nout++;
  end

  initial begin
    clear = 0; shift = 0; start = 0; din = '0;
    for (int j = 0; j < LE_TAPS; j++) begin
      coef[j] = coef_t'($urandom);
      if (j == 5) begin coef[j].re = 12'sd2047; coef[j].im = -12'sd2048; end
      hist[j] = '0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    // prime with 70 samples, large values first to exercise saturation
    for (int n = 0; n < 70; n++) begin
      @(negedge clk);
      din = (n < 64) ? sample_t'({9'sd255, -9'sd256}) : sample_t'($urandom);
      shift = 1;
      for (int j = LE_TAPS-1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = din;
    end
    @(negedge clk); shift = 0;
    // 40 back-to-back outputs
    for (int n = 0; n < 40; n++) begin
      longint ar, ai;
      while (!ready) @(negedge clk);
      din = sample_t'($urandom); shift = 1; start = 1;
      for (int j = LE_TAPS-1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = din;
      ar = 0; ai = 0;
      for (int j = 0; j < LE_TAPS; j++) begin
        ar += longint'(hist[j].re)*coef[j].re - longint'(hist[j].im)*coef[j].im;
        ai += longint'(hist[j].re)*coef[j].im + longint'(hist[j].im)*coef[j].re;
      end
      exp_re.push_back(sat12(ar)); exp_im.push_back(sat12(ai));
      @(negedge clk); shift = 0; start = 0;
    end
    repeat (40) @(negedge clk);
    checks++; if (nout != 40) begin failures++; $display("FAIL: %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
