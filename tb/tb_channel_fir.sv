// Self-checking test of the channel filter and residual update. The test
// bench plays both the chip FIFO (a queue) and the main memory (one-cycle
// read latency). A 40-chip block at base address 100 is filtered with 16
// random channel taps; every address base..base+54 must end up holding
// sat9(old - round(sum h_w x_{q-w} / 2^8)) and nothing else may change.
// With the FIFO never empty the writes must come every 16 cycles (one
// multiplier, 16 taps). A second block starts with an empty FIFO that is
// filled slowly, so the filter has to wait for chips.
module tb_channel_fir;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  tap_t taps [CIR_W];
  logic [9:0] blk_chips;
  logic blk_start, busy, done, in_empty, in_pop, we;
  logic [ADDR_W-1:0] base, rd_addr, waddr;
  rchip_t in_chip;
  sample_t rd_data, wdata;

  channel_fir dut (.*);

  sample_t mem [BURST_LEN], expm [BURST_LEN];
  rchip_t xs [64];
  int rp = 0, avail = 0;
  int checks = 0, failures = 0, nw = 0, last_w = -1, gaps_bad = 0;
  bit slow;

  assign in_empty = (rp >= avail);
  assign in_chip  = xs[rp];
  always @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (we && rst_n) begin
      mem[waddr] <= wdata;
      if (!slow && last_w >= 0 && int'($time) - last_w != 32) gaps_bad++;
      last_w = int'($time);
      nw++;
    end
    if (in_pop) rp <= rp + 1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sat9(input int v);
    return v > 255 ? 255 : (v < -256 ? -256 : v);
  endfunction

  task automatic block(input int b, input int nchips, input bit slow_fill);
    rp = 0; avail = 0;
    for (int i = 0; i < nchips; i++) begin
      xs[i].re = RW'($urandom_range(96)) - RW'(48);
      xs[i].im = RW'($urandom_range(96)) - RW'(48);
    end
    for (int i = 0; i < BURST_LEN; i++) expm[i] = mem[i];
    for (int p = 0; p < nchips + CIR_W - 1; p++) begin
      int ar, ai, yr, yi;
      ar = 0; ai = 0;
      for (int w = 0; w < CIR_W; w++)
        if (p - w >= 0 && p - w < nchips) begin
          ar += int'(taps[w].re)*int'(xs[p-w].re) - int'(taps[w].im)*int'(xs[p-w].im);
          ai += int'(taps[w].re)*int'(xs[p-w].im) + int'(taps[w].im)*int'(xs[p-w].re);
        end
      yr = (ar + 128) >>> 8; yi = (ai + 128) >>> 8;
      expm[b+p].re = SW'(sat9(int'(mem[b+p].re) - yr));
      expm[b+p].im = SW'(sat9(int'(mem[b+p].im) - yi));
    end
    slow = slow_fill; last_w = -1;
    if (!slow_fill) avail = nchips;
    @(negedge clk); blk_chips = 10'(nchips); base = ADDR_W'(b); blk_start = 1;
    @(negedge clk); blk_start = 0;
    if (slow_fill) for (int i = 0; i < nchips; i++) begin repeat (25) @(negedge clk); avail++; end
    while (!done) @(negedge clk);
    for (int i = 0; i < BURST_LEN; i++) begin
      checks++;
      if (mem[i] != expm[i]) begin
        failures++; if (failures < 10) $display("FAIL: addr %0d got %0d %0d exp %0d %0d", i, mem[i].re, mem[i].im, expm[i].re, expm[i].im);
      end
    end
  endtask

  initial begin
    blk_start = 0; base = '0; blk_chips = 10'd40;
    for (int i = 0; i < BURST_LEN; i++) mem[i] = sample_t'($urandom);
    for (int w = 0; w < CIR_W; w++) begin
      taps[w].re = HW'($urandom_range(400)) - HW'(200);
      taps[w].im = HW'($urandom_range(400)) - HW'(200);
    end
    taps[0].re = 10'sd511;
    repeat (2) @(posedge clk); rst_n = 1;
    block(100, 40, 0);
    checks++;
    if (nw != 40 + CIR_W - 1 || gaps_bad != 0) begin failures++; $display("FAIL: %0d writes, %0d bad spacings", nw, gaps_bad); end
    block(600, 30, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
