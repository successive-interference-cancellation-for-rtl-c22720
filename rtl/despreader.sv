// Despreader: correlates the equalized chip stream with all K spreading
// codes at once. K accumulators each add +chip or -chip (code bit 1 means
// chip value -1) for the K chips of one symbol, so one symbol period yields K
// symbol estimates in parallel, as in the document. The codes are real +-1
// sequences supplied by the host (this design's simplification of the
// TD-SCDMA channelisation and scrambling).
//
// Interface: 'clear' restarts the chip count (at the start of a data block);
// each in_valid chip is accumulated; after the K-th chip of a symbol,
// sym_valid pulses for one cycle with the K estimates in sym (held until the
// next symbol completes).
module despreader
  import sic_pkg::*;
#(
  parameter int KC = K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KC-1:0] codes [KC],
  input  logic          clear,
  input  logic          in_valid,
  input  chip_t         chip,
  output logic          sym_valid,
  output sym_t          sym [KC]
);
  logic [$clog2(KC)-1:0] idx;
  sym_t acc [KC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; sym_valid <= 1'b0;
      for (int k = 0; k < KC; k++) begin acc[k] <= '0; sym[k] <= '0; end
    end else begin
      sym_valid <= 1'b0;
      if (clear) begin
        idx <= '0;
      end else if (in_valid) begin
        for (int k = 0; k < KC; k++) begin
          logic signed [DW-1:0] cr, ci, base_re, base_im;
          cr = codes[k][idx] ? -DW'(chip.re) : DW'(chip.re);
          ci = codes[k][idx] ? -DW'(chip.im) : DW'(chip.im);
          base_re = (idx == '0) ? '0 : acc[k].re;
          base_im = (idx == '0) ? '0 : acc[k].im;
          acc[k].re <= base_re + cr;
          acc[k].im <= base_im + ci;
          if (idx == $bits(idx)'(KC-1)) begin
            sym[k].re <= base_re + cr;
            sym[k].im <= base_im + ci;
          end
        end
        if (idx == $bits(idx)'(KC-1)) sym_valid <= 1'b1;
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
