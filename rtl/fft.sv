// FFT/IFFT unit: N-point (128) radix-2 decimation-in-time transform with a
// single butterfly, used for both directions as in the document. The data
// sit in an N-word register file. A transform first reorders the words into
// bit-reversed order (one index per cycle, swapping pairs), then runs log2(N)
// stages of N/2 butterflies, one butterfly per cycle:
//   t = X[j] * tw,  X[i] = a + t,  X[j] = a - t
// The butterfly's complex multiplier is not inside this module: it is the
// multiplier shared with the LE filter (mul_* ports), combinational.
// Forward: tw = exp(-j2pi k/N), no scaling (18-bit words leave room for the
// growth of a 10-bit input). Inverse: conjugated twiddles and a rounded
// halving after every stage, which gives the 1/N of the inverse transform.
// Twiddles are Q1.14, computed at elaboration from cos/sin.
//
// Interface: while idle, ld_we/ld_addr/ld_data write word ld_addr (natural
// order) and rd_addr reads word rd_addr combinationally. start (with
// inverse) runs a transform; done pulses at its end, results in natural
// order. Latency N + (N/2)*log2(N) + 1 cycles (577 for N = 128).
module fft
  import sic_pkg::*;
#(
  parameter int N = FFT_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 inverse,
  output logic                 busy,
  output logic                 done,
  input  logic                 ld_we,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  fft_t                 ld_data,
  input  logic [$clog2(N)-1:0] rd_addr,
  output fft_t                 rd_data,
  // shared complex multiplier
  output logic signed [FW-1:0]    mul_a_re, mul_a_im,
  output logic signed [TWW-1:0]   mul_b_re, mul_b_im,
  input  logic signed [FW+TWW:0]  mul_p_re, mul_p_im
);
  localparam int LN = $clog2(N);
  localparam int TF = TWW - 2;   // twiddle fractional bits

  localparam real PI = 3.14159265358979323846;
  tw_t TW [N/2];
  for (genvar k = 0; k < N/2; k++) begin : g_tw
    localparam int C = $rtoi($floor($cos(2.0*PI*k/N) * (1 << TF) + 0.5));
    localparam int S = $rtoi($floor(-$sin(2.0*PI*k/N) * (1 << TF) + 0.5));
    assign TW[k].re = TWW'(C);
    assign TW[k].im = TWW'(S);
  end

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] v);
    for (int b = 0; b < LN; b++) bitrev[b] = v[LN-1-b];
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_PERM, S_BFLY} state_t;
  state_t state;
  fft_t x [N];
  logic inv;
  logic [LN-1:0]            pi;      // permutation index
  logic [$clog2(LN)-1:0]    stage;
  logic [LN-2:0]            bf;      // butterfly within stage

  // butterfly addressing
  logic [LN-1:0] ia, ib, pos, grp, span;
  logic [LN-2:0] tk;
  tw_t tw;
  always_comb begin
    span = LN'(1) << stage;
    pos  = LN'(bf) & (span - 1'b1);
    grp  = LN'(bf) >> stage;
    ia   = (grp << (stage + 1)) | pos;
    ib   = ia + span;
    tk   = (LN-1)'(pos << (LN'(LN - 1) - LN'(stage)));
    tw   = TW[tk];
    if (inv) tw.im = -tw.im;
  end

  assign mul_a_re = x[ib].re;
  assign mul_a_im = x[ib].im;
  assign mul_b_re = tw.re;
  assign mul_b_im = tw.im;

  function automatic logic signed [FW-1:0] sat(input logic signed [FW+1:0] v);
    if (v > (FW+2)'((1 <<< (FW-1)) - 1)) return FW'((1 <<< (FW-1)) - 1);
    if (v < -(FW+2)'(1 <<< (FW-1)))      return FW'(-(1 <<< (FW-1)));
    return v[FW-1:0];
  endfunction

  logic signed [FW+1:0] t_re, t_im, s0_re, s0_im, s1_re, s1_im;
  always_comb begin
    t_re  = (FW+2)'((mul_p_re + (FW+TWW+1)'(1 <<< (TF-1))) >>> TF);
    t_im  = (FW+2)'((mul_p_im + (FW+TWW+1)'(1 <<< (TF-1))) >>> TF);
    s0_re = (FW+2)'(x[ia].re) + t_re;
    s0_im = (FW+2)'(x[ia].im) + t_im;
    s1_re = (FW+2)'(x[ia].re) - t_re;
    s1_im = (FW+2)'(x[ia].im) - t_im;
    if (inv) begin
      s0_re = (s0_re + 1) >>> 1; s0_im = (s0_im + 1) >>> 1;
      s1_re = (s1_re + 1) >>> 1; s1_im = (s1_im + 1) >>> 1;
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_data = x[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; inv <= 1'b0; pi <= '0; stage <= '0; bf <= '0;
      for (int i = 0; i < N; i++) x[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (ld_we) x[ld_addr] <= ld_data;
          if (start) begin
            state <= S_PERM; inv <= inverse; pi <= '0;
          end
        end
        S_PERM: begin
          if (pi < bitrev(pi)) begin
            x[pi] <= x[bitrev(pi)];
            x[bitrev(pi)] <= x[pi];
          end
          pi <= pi + 1'b1;
          if (pi == LN'(N-1)) begin
            state <= S_BFLY; stage <= '0; bf <= '0;
          end
        end
        S_BFLY: begin
          x[ia].re <= sat(s0_re); x[ia].im <= sat(s0_im);
          x[ib].re <= sat(s1_re); x[ib].im <= sat(s1_im);
          bf <= bf + 1'b1;
          if (bf == (LN-1)'(N/2-1)) begin
            if (stage == $bits(stage)'(LN-1)) begin
              state <= S_IDLE; done <= 1'b1;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
