// Self-checking test of the selection unit. For random symbol estimates
// and a random active mask it checks that the published group holds the
// M_SIC eligible codes with the smallest squared distance to their QPSK
// hard decision, in increasing order (ties to the lower code), with the
// right soft values and HDs, 18 cycles after sym_valid. Each symbol index is
// searched repeatedly until all active codes are used up, which checks the
// cancelled-code buffer (no code chosen twice, partial last group, empty
// group afterwards) and that clear_buf empties it.
module tb_selection;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic clear_buf, sym_valid, busy, grp_valid, skip;
  logic [K-1:0] active;
  logic [DW-1:0] amp;
  sym_t sym [K];
  logic [5:0] sym_idx, grp_sym;
  sel_t grp [M_SIC];
  int checks = 0, failures = 0;

  selection dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit used [N_SYM][K];

  function automatic longint sqd(input sym_t s, input int a);
    longint dr, di;
    dr = (s.re < 0 ? -longint'(s.re) : longint'(s.re)) - a;
    di = (s.im < 0 ? -longint'(s.im) : longint'(s.im)) - a;
    return dr*dr + di*di;
  endfunction

  task automatic run(input int idx);
    int exp_code [M_SIC];
    int nexp, lat;
    bit taken [K];
    for (int k = 0; k < K; k++) begin
      sym[k].re = DW'($urandom_range(400)) - DW'(200);
      sym[k].im = DW'($urandom_range(400)) - DW'(200);
      taken[k] = 0;
    end
    // model: repeatedly take the smallest eligible distance
    nexp = 0;
    for (int m = 0; m < M_SIC; m++) begin
      int best = -1;
      for (int k = 0; k < K; k++)
        if (active[k] && !used[idx][k] && !taken[k])
          if (best < 0 || sqd(sym[k], int'(amp)) < sqd(sym[best], int'(amp))) best = k;
      exp_code[m] = best;
      if (best >= 0) begin taken[best] = 1; nexp++; end
    end
    @(negedge clk); sym_valid = 1; sym_idx = 6'(idx);
    @(negedge clk); sym_valid = 0;
    lat = 1;
    while (!grp_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != K + 2) begin failures++; $display("FAIL: latency %0d", lat); end
    checks++;
    if (grp_sym != 6'(idx)) begin failures++; $display("FAIL: grp_sym"); end
    for (int m = 0; m < M_SIC; m++) begin
      checks++;
      if (exp_code[m] < 0) begin
        if (grp[m].valid) begin failures++; $display("FAIL: lane %0d should be empty", m); end
      end else if (!grp[m].valid || int'(grp[m].code) != exp_code[m] ||
                   grp[m].est_sym != sym[exp_code[m]] ||
                   grp[m].hd_re != (sym[exp_code[m]].re < 0) || grp[m].hd_im != (sym[exp_code[m]].im < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: sym %0d lane %0d got v%0d code %0d exp %0d", idx, m, grp[m].valid, grp[m].code, exp_code[m]);
      end
      if (exp_code[m] >= 0) used[idx][exp_code[m]] = 1;
    end
  endtask

  initial begin
    int nact;
    clear_buf = 0; sym_valid = 0; sym_idx = '0; amp = 16'd128;
    for (int k = 0; k < K; k++) sym[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      active = K'($urandom) | 16'h0101;
      nact = $countones(active);
      @(negedge clk); clear_buf = 1; @(negedge clk); clear_buf = 0;
      for (int s = 0; s < N_SYM; s++) for (int k = 0; k < K; k++) used[s][k] = 0;
      for (int it = 0; it < (nact + 2) / 3 + 1; it++)
        for (int s = 0; s < N_SYM; s += 7) run(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
