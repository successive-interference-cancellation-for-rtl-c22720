// Self-checking test of the despreader: random +-1 codes and 12-bit chips
// for 30 symbols, with idle cycles between chips; every symbol of all 16
// codes is compared with a model correlation, and sym_valid must pulse once
// per 16 chips, one cycle after the 16th. A 'clear' in the middle of a
// symbol must restart the chip count.
module tb_despreader;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic [K-1:0] codes [K];
  logic clear, in_valid, sym_valid;
  chip_t chip;
  sym_t sym [K];
  int checks = 0, failures = 0, nsym = 0;
  int er [K], ei [K];

  despreader dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; in_valid = 0; chip = '0;
    for (int k = 0; k < K; k++) codes[k] = K'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    // partial symbol then clear
    for (int i = 0; i < 5; i++) begin @(negedge clk); in_valid = 1; chip = chip_t'($urandom); end
    @(negedge clk); in_valid = 0; clear = 1;
    @(negedge clk); clear = 0;
    for (int n = 0; n < 30; n++) begin
      for (int k = 0; k < K; k++) begin er[k] = 0; ei[k] = 0; end
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        in_valid = 1; chip = chip_t'($urandom);
        for (int k = 0; k < K; k++) begin
          er[k] += codes[k][i] ? -int'(chip.re) : int'(chip.re);
          ei[k] += codes[k][i] ? -int'(chip.im) : int'(chip.im);
        end
        checks++;
        if (sym_valid) begin failures++; $display("FAIL: early sym_valid"); end
        if (i < K-1 && $urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (!sym_valid) begin failures++; $display("FAIL: no sym_valid at symbol %0d", n); end
      for (int k = 0; k < K; k++) begin
        checks++;
        if (int'(sym[k].re) != er[k] || int'(sym[k].im) != ei[k]) begin
          failures++; if (failures < 10) $display("FAIL: sym %0d code %0d", n, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
