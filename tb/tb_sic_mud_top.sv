// End-to-end test of the SIC-MUD at its default sizes: one full burst of
// 864 samples, all 16 Walsh codes active (6 iterations of 3+3+3+3+3+1).
// The testbench builds the received burst itself: random QPSK symbols on
// every code, spread with 16-chip Walsh codes at chip amplitude 8, passed
// through a 4-path complex channel and rounded to 9-bit samples. Without
// noise every hard decision must equal the transmitted symbol, every
// (symbol, code) pair must come out exactly once, and after the last
// iteration the residual must have lost almost all of its energy.
// Also checked: the processing time from the end of loading to done fits
// in 435 us at 200 MHz (87,000 cycles), and each mechanism happened:
// full and partial groups, skipping of cancelled codes, both users of the
// shared multiplier, forward and inverse FFT, real and imaginary division.
module tb_sic_mud_top;
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
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitted data
  bit d_re [N_SYM][K], d_im [N_SYM][K];
  int x_re [BURST_LEN], x_im [BURST_LEN];
  int r_re [BURST_LEN], r_im [BURST_LEN];
  int seen [N_SYM][K];
  real e_in, e_out;

  function automatic int rnd_div(input int v, input int sh);
    return (v + (1 << (sh-1))) >>> sh;
  endfunction
  function automatic int clip9(input int v);
    return v > 255 ? 255 : (v < -256 ? -256 : v);
  endfunction

  // mechanism counters
  int n_grp3 = 0, n_grp_part = 0, n_skip = 0, n_sh_fft = 0, n_sh_le = 0;
  int n_fft_fwd = 0, n_fft_inv = 0, n_div = 0, n_fifo_max = 0, n_iter_max = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.sel_skip) n_skip++;
    if (dut.fc_busy && dut.u_fc.u_fft.state == dut.u_fc.u_fft.S_BFLY) n_sh_fft++;
    if (!dut.fc_busy && dut.le_busy) n_sh_le++;
    if (dut.u_fc.u_fft.done && dut.u_fc.u_fft.inv) n_fft_inv++;
    if (dut.u_fc.u_fft.done && !dut.u_fc.u_fft.inv) n_fft_fwd++;
    if (dut.u_fc.div_done) n_div++;
    if (int'(dut.fifo_count) > n_fifo_max) n_fifo_max = int'(dut.fifo_count);
    if (int'(iter) > n_iter_max) n_iter_max = int'(iter);
  end

  initial begin
    longint t_load_end, t_done;
    int a, h_re[4], h_im[4], h_pos[4], pos;
    start = 0; in_valid = 0; in_sample = '0; dbg_addr = '0;
    chip_amp = 8'd8; sigma2 = 24'd3277;   // sigma^2 = 0.05
    active = '1;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < K; i++) codes[k][i] = ^(4'(k) & 4'(i));
    h_pos = '{0, 1, 3, 6};
    h_re  = '{230, 60, -30, 15};
    h_im  = '{0, -40, 20, 10};
    for (int w = 0; w < CIR_W; w++) cir[w] = '0;
    for (int p = 0; p < 4; p++) begin cir[h_pos[p]].re = 10'(h_re[p]); cir[h_pos[p]].im = 10'(h_im[p]); end

    // burst: chips of both data blocks, zero midamble and guard
    a = 8;
    for (int p = 0; p < BURST_LEN; p++) begin x_re[p] = 0; x_im[p] = 0; end
    for (int n = 0; n < N_SYM; n++)
      for (int k = 0; k < K; k++) begin
        d_re[n][k] = 1'($urandom); d_im[n][k] = 1'($urandom); seen[n][k] = 0;
        for (int i = 0; i < K; i++) begin
          pos = (n < BLK_SYM ? 0 : MIDAMBLE) + n*K + i;
          x_re[pos] += ((d_re[n][k] ^ codes[k][i]) ? -a : a);
          x_im[pos] += ((d_im[n][k] ^ codes[k][i]) ? -a : a);
        end
      end
    e_in = 0;
    for (int p = 0; p < BURST_LEN; p++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int q = 0; q < 4; q++)
        if (p - h_pos[q] >= 0) begin
          sr += h_re[q]*x_re[p-h_pos[q]] - h_im[q]*x_im[p-h_pos[q]];
          si += h_re[q]*x_im[p-h_pos[q]] + h_im[q]*x_re[p-h_pos[q]];
        end
      r_re[p] = clip9(rnd_div(sr, 8)); r_im[p] = clip9(rnd_div(si, 8));
      e_in += real'(r_re[p]*r_re[p] + r_im[p]*r_im[p]);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    for (int p = 0; p < BURST_LEN; p++) begin
      in_valid <= 1; in_sample.re <= 9'(r_re[p]); in_sample.im <= 9'(r_im[p]);
      @(posedge clk);
    end
    in_valid <= 0;
    t_load_end = $time;
    while (!done) begin
      @(negedge clk);
      if (out_valid) begin
        int nv;
        nv = 0;
        for (int m = 0; m < M_SIC; m++) if (out_grp[m].valid) begin
          nv++;
          seen[out_sym][out_grp[m].code]++;
          check(out_grp[m].hd_re == d_re[out_sym][out_grp[m].code] &&
                out_grp[m].hd_im == d_im[out_sym][out_grp[m].code],
                $sformatf("HD sym %0d code %0d", out_sym, out_grp[m].code));
        end
        if (nv == 3) n_grp3++; else n_grp_part++;
      end
    end
    t_done = $time;
    $display("processing cycles after load: %0d", (t_done - t_load_end) / 2);
    check((t_done - t_load_end) / 2 <= 87000, "throughput: processing exceeds 87000 cycles");
    for (int n = 0; n < N_SYM; n++)
      for (int k = 0; k < K; k++)
        check(seen[n][k] == 1, $sformatf("sym %0d code %0d output %0d times", n, k, seen[n][k]));

    // residual read-back
    @(posedge clk);
    e_out = 0;
    for (int p = 0; p < BURST_LEN; p++) begin
      dbg_addr <= ADDR_W'(p); @(posedge clk); #0.1;
      @(negedge clk);
      e_out += real'(int'(dbg_data.re)**2 + int'(dbg_data.im)**2);
    end
    $display("residual energy %f of input %f", e_out, e_in);
    check(e_out < 0.01 * e_in, "residual energy not cancelled");

    $display("groups of 3: %0d, partial: %0d, skips: %0d, shared mult FFT/LE cycles: %0d/%0d, FFT fwd/inv: %0d/%0d, divisions: %0d, max FIFO: %0d, last iter: %0d",
             n_grp3, n_grp_part, n_skip, n_sh_fft, n_sh_le, n_fft_fwd, n_fft_inv, n_div, n_fifo_max, n_iter_max);
    check(n_grp3 == 5*N_SYM, "full groups of three");
    check(n_grp_part == N_SYM, "partial group in last iteration");
    check(n_skip > 0, "cancelled-code skip never happened");
    check(n_sh_fft > 0 && n_sh_le > 0, "shared multiplier not used by both");
    check(n_fft_fwd == 1 && n_fft_inv == 1, "FFT and IFFT each once");
    check(n_div == 2*FFT_N, "real and imaginary division per bin");
    check(n_fifo_max > 0, "FIFO never used");
    check(n_iter_max == 5, "six iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
