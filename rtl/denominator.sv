// Denominator unit of the MMSE coefficient formula
//   W_i = conj(H_i) / (|H_i|^2 + sigma^2):
// den = re^2 + im^2 + sigma2, registered (result one cycle after in_valid).
// H is the 18-bit FFT word of the channel taps (8 fractional bits), so
// |H|^2 carries 16 fractional bits and sigma2 is given in the same units.
module denominator
  import sic_pkg::*;
#(
  parameter int S2W  = 24,
  parameter int DENW = 2*FW + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  fft_t            h,
  input  logic [S2W-1:0]  sigma2,
  output logic            out_valid,
  output logic [DENW-1:0] den
);
  logic signed [2*FW-1:0] sq_re, sq_im;
  assign sq_re = h.re * h.re;
  assign sq_im = h.im * h.im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; den <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        den <= DENW'(unsigned'(sq_re)) + DENW'(unsigned'(sq_im)) + DENW'(sigma2);
    end
  end
endmodule
