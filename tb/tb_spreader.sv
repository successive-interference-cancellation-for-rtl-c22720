// Self-checking test of the spreading unit: random groups of 0..3 selected
// codes with random HDs are re-spread; each of the 16 output chips must be
// the sum over the group of HD * chip amplitude * code chip. out_ready is
// toggled at random and a chip may only advance when it is high.
module tb_spreader;
  import sic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic [K-1:0] codes [K];
  logic [7:0] chip_amp;
  logic grp_valid, busy, out_valid, out_ready;
  sel_t grp [M_SIC];
  rchip_t out_chip;
  int checks = 0, failures = 0;

  spreader dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    grp_valid = 0; out_ready = 0; chip_amp = 8'd8;
    for (int m = 0; m < M_SIC; m++) grp[m] = '0;
    for (int k = 0; k < K; k++) codes[k] = K'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      int i;
      chip_amp = 8'($urandom_range(1, 100));
      for (int m = 0; m < M_SIC; m++) begin
        grp[m] = sel_t'($urandom);
        grp[m].valid = ($urandom_range(3) != 0);
      end
      @(negedge clk); grp_valid = 1;
      @(negedge clk); grp_valid = 0;
      i = 0;
      while (i < K) begin
        int er, ei;
        out_ready = $urandom_range(1);
        er = 0; ei = 0;
        for (int m = 0; m < M_SIC; m++) if (grp[m].valid) begin
          er += (grp[m].hd_re ^ codes[grp[m].code][i]) ? -int'(chip_amp) : int'(chip_amp);
          ei += (grp[m].hd_im ^ codes[grp[m].code][i]) ? -int'(chip_amp) : int'(chip_amp);
        end
        #0.5;
        checks++;
        if (!out_valid || int'(out_chip.re) != er || int'(out_chip.im) != ei) begin
          failures++; if (failures < 10) $display("FAIL: group %0d chip %0d got %0d %0d exp %0d %0d", g, i, out_chip.re, out_chip.im, er, ei);
        end
        @(negedge clk);
        if (out_ready) i++;
      end
      out_ready = 0;
      #0.5;
      checks++;
      if (busy) begin failures++; $display("FAIL: still busy after 16 chips"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
