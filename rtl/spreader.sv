// Spreading unit: regenerates the transmitted chips of the selected group.
// Each selected hard decision (+-amp +-j amp, amp = chip amplitude of one
// code) is multiplied by the chips of its code and the up to M_SIC results
// are summed, giving one regenerated chip per cycle, K chips per symbol.
//
// Interface: grp_valid latches a group (ignored while busy; an assertion
// flags a group arriving while busy); chips are then offered on out_valid /
// out_chip and advance only when out_ready is high (FIFO not full).
// busy stays high until the K-th chip is accepted.
module spreader
  import sic_pkg::*;
#(
  parameter int KC = K,
  parameter int M  = M_SIC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KC-1:0] codes [KC],
  input  logic [7:0]    chip_amp,
  input  logic          grp_valid,
  input  sel_t          grp [M],
  output logic          busy,
  output logic          out_valid,
  output rchip_t        out_chip,
  input  logic          out_ready
);
  sel_t g [M];
  logic [$clog2(KC)-1:0] i;

  always_comb begin
    logic signed [RW-1:0] sre, sim, a;
    sre = '0; sim = '0;
    a = RW'(chip_amp);
    for (int m = 0; m < M; m++) begin
      if (g[m].valid) begin
        sre += (g[m].hd_re ^ codes[g[m].code][i]) ? -a : a;
        sim += (g[m].hd_im ^ codes[g[m].code][i]) ? -a : a;
      end
    end
    out_chip.re = sre;
    out_chip.im = sim;
  end

  assign out_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; i <= '0;
      for (int m = 0; m < M; m++) g[m] <= '0;
    end else if (!busy) begin
      if (grp_valid) begin
        busy <= 1'b1; i <= '0;
        for (int m = 0; m < M; m++) g[m] <= grp[m];
      end
    end else if (out_ready) begin
      i <= i + 1'b1;
      if (i == $bits(i)'(KC-1)) busy <= 1'b0;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(busy && grp_valid))
    else $error("spreader: group arrived while previous group still being spread");
endmodule
