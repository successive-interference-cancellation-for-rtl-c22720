// Workload test: fully loaded bursts (16 codes) over the two multipath
// channels used to evaluate the detector, with white Gaussian noise.
//   Case 1: two paths, 0 dB at delay 0 and -10 dB at about 2.9 us,
//   Case 2: three 0 dB paths at delays 0, about 2.9 us and 12 us;
// delays rounded to whole chips (0, 4 and 15 chips at 1.28 Mcps), each
// path with an independent Rayleigh-distributed complex gain per burst
// (block fading). The testbench computes the channel
// taps and sigma^2 it gives the detector from these values (perfect channel
// knowledge).
// For each burst it counts the symbol errors of the plain MMSE equalizer
// (the first iteration's despread estimates of all codes, observed inside
// the design) and of the SIC-MUD's hard decisions. On Case 2, where the
// strong echoes cause much interference, the SIC-MUD must make fewer errors
// than the MMSE equalizer. On Case 1 the weak echo leaves little to cancel;
// with few errors per run the difference swings with the fading draw, so
// there the SIC-MUD may be at most 25 % (plus 5 errors) worse. Every
// (symbol, code) pair must be output once, and each burst must finish in
// 87,000 cycles.
module tb_sic_mud_channels;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic start, in_valid, busy, done, out_valid;
  sample_t in_sample, dbg_data;
  logic [K-1:0] codes [K];
  logic [K-1:0] active;
  logic [7:0] chip_amp;
  tap_t cir [CIR_W];
  logic [23:0] sigma2;
  logic [2:0] iter;
  logic [5:0] out_sym;
  sel_t out_grp [M_SIC];
  logic [ADDR_W-1:0] dbg_addr;

  sic_mud_top dut (.*);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  localparam int  NBURST = 20;
  localparam real NOISE_SD = 4.5;   // per I/Q component, sample units

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit d_re [N_SYM][K], d_im [N_SYM][K];
  int seen [N_SYM][K];
  int mmse_err, sic_err;

  function automatic real gauss();
    real s;
    s = 0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(1000000)) / 1000000.0;
    return s - 6.0;
  endfunction
  function automatic int clip9(input real v);
    int r;
    r = $rtoi(v + (v < 0 ? -0.5 : 0.5));
    return r > 255 ? 255 : (r < -256 ? -256 : r);
  endfunction

  // MMSE decisions: despread estimates of the first iteration
  always @(negedge clk) if (rst_n && dut.desp_valid && iter == 0) begin
    int n;
    n = (dut.blk ? BLK_SYM : 0) + int'(dut.sym_cnt);
    for (int k = 0; k < K; k++)
      if ((dut.desp_sym[k].re < 0) != d_re[n][k] || (dut.desp_sym[k].im < 0) != d_im[n][k]) mmse_err++;
  end

  task automatic burst(input int case_no);
    real xr [BURST_LEN], xi [BURST_LEN];
    real hr [3], hi [3], pw [3];
    int  hd [3], np, a;
    longint t0;
    a = 6;
    chip_amp = 8'(a);
    if (case_no == 1) begin np = 2; hd = '{0, 4, 0}; pw = '{1.0, 0.1, 0.0}; end
    else              begin np = 3; hd = '{0, 4, 15}; pw = '{1.0, 1.0, 1.0}; end
    begin
      real tot;
      tot = 0; for (int p = 0; p < np; p++) tot += pw[p];
      for (int w = 0; w < CIR_W; w++) cir[w] = '0;
      for (int p = 0; p < np; p++) begin
        real g;
        // Rayleigh block fading: complex Gaussian gain of mean power pw/tot
        g = $sqrt(pw[p] / tot / 2.0);
        hr[p] = g * gauss(); hi[p] = g * gauss();
        cir[hd[p]].re = HW'($rtoi(hr[p] * 256.0));
        cir[hd[p]].im = HW'($rtoi(hi[p] * 256.0));
        hr[p] = real'(cir[hd[p]].re) / 256.0; hi[p] = real'(cir[hd[p]].im) / 256.0;
      end
    end
    // noise variance relative to the chip power 16 * 2a^2, 16 fractional bits
    sigma2 = 24'($rtoi(2.0 * NOISE_SD * NOISE_SD / (32.0 * a * a) * 65536.0));
    for (int p = 0; p < BURST_LEN; p++) begin xr[p] = 0; xi[p] = 0; end
    for (int n = 0; n < N_SYM; n++)
      for (int k = 0; k < K; k++) begin
        d_re[n][k] = 1'($urandom); d_im[n][k] = 1'($urandom); seen[n][k] = 0;
        for (int i = 0; i < K; i++) begin
          int pos;
          pos = (n < BLK_SYM ? 0 : MIDAMBLE) + n*K + i;
          xr[pos] += ((d_re[n][k] ^ codes[k][i]) ? -a : a);
          xi[pos] += ((d_im[n][k] ^ codes[k][i]) ? -a : a);
        end
      end
    mmse_err = 0; sic_err = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < BURST_LEN; p++) begin
      real sr, si;
      sr = NOISE_SD * gauss(); si = NOISE_SD * gauss();
      for (int q = 0; q < np; q++)
        if (p - hd[q] >= 0) begin
          sr += hr[q]*xr[p-hd[q]] - hi[q]*xi[p-hd[q]];
          si += hr[q]*xi[p-hd[q]] + hi[q]*xr[p-hd[q]];
        end
      in_valid = 1; in_sample.re = 9'(clip9(sr)); in_sample.im = 9'(clip9(si));
      @(negedge clk);
    end
    in_valid = 0;
    t0 = $time;
    while (!done) begin
      @(negedge clk);
      if (out_valid)
        for (int m = 0; m < M_SIC; m++) if (out_grp[m].valid) begin
          seen[out_sym][out_grp[m].code]++;
          if (out_grp[m].hd_re != d_re[out_sym][out_grp[m].code] ||
              out_grp[m].hd_im != d_im[out_sym][out_grp[m].code]) sic_err++;
        end
    end
    checks++;
    if (($time - t0) / 2 > 87000) begin failures++; $display("FAIL: burst took %0d cycles", ($time - t0) / 2); end
    for (int n = 0; n < N_SYM; n++)
      for (int k = 0; k < K; k++) begin
        checks++;
        if (seen[n][k] != 1) failures++;
      end
  endtask

  initial begin
    int tot_mmse [2], tot_sic [2];
    start = 0; in_valid = 0; in_sample = '0; dbg_addr = '0; active = '1; chip_amp = '0; sigma2 = '0;
    for (int w = 0; w < CIR_W; w++) cir[w] = '0;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < K; i++) codes[k][i] = ^(4'(k) & 4'(i));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      tot_mmse[c] = 0; tot_sic[c] = 0;
      for (int b = 0; b < NBURST; b++) begin
        burst(c + 1);
        tot_mmse[c] += mmse_err; tot_sic[c] += sic_err;
      end
      $display("Case %0d: %0d symbols, MMSE errors %0d, SIC-MUD errors %0d",
               c + 1, NBURST * N_SYM * K, tot_mmse[c], tot_sic[c]);
      checks++;
      if (c == 1 && tot_sic[c] >= tot_mmse[c]) begin
        failures++; $display("FAIL: no SIC-MUD gain on case 2");
      end
      if (c == 0 && 4 * tot_sic[c] > 5 * tot_mmse[c] + 20) begin
        failures++; $display("FAIL: SIC-MUD clearly worse than MMSE on case 1");
      end
    end
    checks++;
    if (tot_mmse[0] + tot_mmse[1] == 0) begin failures++; $display("FAIL: noise too weak to compare"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
