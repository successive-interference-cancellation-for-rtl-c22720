// Filter calculation: computes the 64 time-domain MMSE equalizer taps from
// the channel impulse response once per burst, in the frequency domain:
//   H = FFT128(h),  W_i = conj(H_i) / (|H_i|^2 + sigma^2),  w = IFFT128(W)
// and keeps the taps w_t, t = -LE_PRE .. LE_TAPS-1-LE_PRE (index taken
// modulo 128) as coefficient j = t + LE_PRE of the LE filter. This is the
// circulant-channel MMSE solution the document derives; the same FFT unit
// computes the forward and the inverse transform, the denominator unit forms
// |H_i|^2 + sigma^2, and one sequential divider computes first the real and
// then the imaginary part of each quotient.
//
// Fixed point (this design's choice): h has 8 fractional bits, so H does;
// sigma2 has 16 fractional bits; the divider forms W = (H << 22) / den,
// i.e. W with 14 fractional bits (saturating at +-8); after the scaled
// inverse FFT the taps are rounded to 12 bits with 10 fractional bits
// (saturating at +-2).
//
// Interface: start begins a calculation (cir and sigma2 must be stable
// until done); done pulses when coef holds the new taps. The shared complex
// multiplier ports (mul_*) are driven by the FFT butterfly and are only
// meaningful while busy. Takes about 128 + 577 + 128*88 + 577 + 64 cycles.
module filter_calc
  import sic_pkg::*;
#(
  parameter int S2W = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  tap_t                   cir [CIR_W],
  input  logic [S2W-1:0]         sigma2,
  output logic                   busy,
  output logic                   done,
  output coef_t                  coef [LE_TAPS],
  output logic signed [FW-1:0]   mul_a_re, mul_a_im,
  output logic signed [TWW-1:0]  mul_b_re, mul_b_im,
  input  logic signed [FW+TWW:0] mul_p_re, mul_p_im
);
  localparam int LN    = $clog2(FFT_N);
  localparam int DENW  = 2*FW + 1;
  localparam int NUMW  = FW + 22;
  localparam int SHIFT = 4;   // 14 -> 10 fractional bits

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_FFT_GO, S_FFT_WAIT, S_BIN_DEN, S_BIN_DENW,
    S_DIV_RE, S_DIV_RE_W, S_DIV_IM, S_DIV_IM_W, S_IFFT_GO, S_IFFT_WAIT, S_EXTRACT
  } state_t;
  state_t state;

  logic [LN-1:0] i;
  logic          fft_start, fft_inv, fft_busy, fft_done, ld_we;
  logic [LN-1:0] ld_addr, rd_addr;
  fft_t          ld_data, rd_data;
  logic          den_v, den_ov;
  logic [DENW-1:0] den;
  logic          div_start, div_busy, div_done;
  logic signed [NUMW-1:0] div_num;
  logic signed [FW-1:0]   div_quo, w_re;

  fft u_fft (
    .clk, .rst_n, .start(fft_start), .inverse(fft_inv), .busy(fft_busy), .done(fft_done),
    .ld_we, .ld_addr, .ld_data, .rd_addr, .rd_data,
    .mul_a_re, .mul_a_im, .mul_b_re, .mul_b_im, .mul_p_re, .mul_p_im);

  denominator #(.S2W(S2W), .DENW(DENW)) u_den (
    .clk, .rst_n, .in_valid(den_v), .h(rd_data), .sigma2, .out_valid(den_ov), .den);

  seq_divider #(.NUMW(NUMW), .DENW(DENW), .QW(FW)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den, .busy(div_busy),
    .done(div_done), .quo(div_quo));

  // extraction index: coefficient j holds w_{j-LE_PRE}
  logic [LN-1:0] ext_addr;
  assign ext_addr = LN'(int'(i) - LE_PRE);

  always_comb begin
    fft_start = (state == S_FFT_GO) || (state == S_IFFT_GO);
    fft_inv   = (state == S_IFFT_GO);
    ld_we     = (state == S_LOAD) || (state == S_DIV_IM_W && div_done);
    ld_addr   = i;
    ld_data   = '0;
    if (state == S_LOAD) begin
      if (int'(i) < CIR_W) begin
        ld_data.re = FW'(cir[i[$clog2(CIR_W)-1:0]].re);
        ld_data.im = FW'(cir[i[$clog2(CIR_W)-1:0]].im);
      end
    end else begin
      ld_data.re = w_re;
      ld_data.im = div_quo;
    end
    rd_addr   = (state == S_EXTRACT) ? ext_addr : i;
    den_v     = (state == S_BIN_DEN);
    div_start = (state == S_DIV_RE) || (state == S_DIV_IM);
    // real part: Re(H)/den, imaginary part: -Im(H)/den (conjugate)
    div_num   = (state == S_DIV_IM) ? -(NUMW'(rd_data.im) <<< 22) : (NUMW'(rd_data.re) <<< 22);
  end

  function automatic logic signed [CW-1:0] to_coef(input logic signed [FW-1:0] v);
    logic signed [FW:0] r;
    r = ((FW+1)'(v) + (FW+1)'(1 <<< (SHIFT-1))) >>> SHIFT;
    if (r > (FW+1)'((1 <<< (CW-1)) - 1)) return CW'((1 <<< (CW-1)) - 1);
    if (r < -(FW+1)'(1 <<< (CW-1)))      return CW'(-(1 <<< (CW-1)));
    return r[CW-1:0];
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; done <= 1'b0; w_re <= '0;
      for (int j = 0; j < LE_TAPS; j++) coef[j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:      if (start) begin state <= S_LOAD; i <= '0; end
        S_LOAD:      begin i <= i + 1'b1; if (i == LN'(FFT_N-1)) state <= S_FFT_GO; end
        S_FFT_GO:    state <= S_FFT_WAIT;
        S_FFT_WAIT:  if (fft_done) begin state <= S_BIN_DEN; i <= '0; end
        S_BIN_DEN:   state <= S_BIN_DENW;
        S_BIN_DENW:  if (den_ov) state <= S_DIV_RE;
        S_DIV_RE:    state <= S_DIV_RE_W;
        S_DIV_RE_W:  if (div_done) begin w_re <= div_quo; state <= S_DIV_IM; end
        S_DIV_IM:    state <= S_DIV_IM_W;
        S_DIV_IM_W:  if (div_done) begin
                       i <= i + 1'b1;
                       state <= (i == LN'(FFT_N-1)) ? S_IFFT_GO : S_BIN_DEN;
                     end
        S_IFFT_GO:   state <= S_IFFT_WAIT;
        S_IFFT_WAIT: if (fft_done) begin state <= S_EXTRACT; i <= '0; end
        S_EXTRACT: begin
          coef[i[$clog2(LE_TAPS)-1:0]].re <= to_coef(rd_data.re);
          coef[i[$clog2(LE_TAPS)-1:0]].im <= to_coef(rd_data.im);
          i <= i + 1'b1;
          if (i == LN'(LE_TAPS-1)) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  a_fft_idle:  assert property (@(posedge clk) disable iff (!rst_n) fft_start |-> !fft_busy);
  a_div_idle:  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
endmodule
