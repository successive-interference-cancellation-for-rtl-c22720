// Complex multiplier, full precision, purely combinational.
// p = a * b with p_re = a_re*b_re - a_im*b_im and p_im = a_re*b_im + a_im*b_re,
// using four real multipliers. The detector uses it three times inside the
// LE filter, once in the channel filter and once as the multiplier shared by
// the LE filter and the FFT butterfly. Widths are parameters; the output is
// AW+BW+1 bits so that no sum can overflow.
module cmul #(
  parameter int AW = 9,
  parameter int BW = 12
) (
  input  logic signed [AW-1:0]    a_re, a_im,
  input  logic signed [BW-1:0]    b_re, b_im,
  output logic signed [AW+BW:0]   p_re, p_im
);
  logic signed [AW+BW-1:0] rr, ii, ri, ir;
  always_comb begin
    rr = a_re * b_re;
    ii = a_im * b_im;
    ri = a_re * b_im;
    ir = a_im * b_re;
    p_re = (AW+BW+1)'(rr) - (AW+BW+1)'(ii);
    p_im = (AW+BW+1)'(ri) + (AW+BW+1)'(ir);
  end
endmodule
