// LE filter: the chip-level MMSE linear equalizer as a 64-tap complex FIR.
//
// The delay line holds dl[j] = r[p+LE_PRE-j], j = 0..TAPS-1, so one output
// is s[p] = sum_j coef[j] * dl[j], where coef[j] is the MMSE filter tap
// w_{j-LE_PRE} produced by the filter calculation. NMUL complex multipliers
// (4, as in the document) work through the taps in TAPS/NMUL = 16 cycles
// per output chip. Lane 0 does not own its multiplier: it drives the shared
// multiplier (sh_*), which the FFT butterfly uses during filter calculation.
//
// Interface: 'clear' zeroes the delay line, 'shift' pushes din in as the
// newest sample, 'start' begins one output; both are accepted while 'ready'
// (idle, or in the last multiply cycle, so back-to-back outputs take
// exactly 16 cycles each). out_valid pulses with dout one cycle after the
// 16th multiply cycle.
// dout = round(acc / 2^10) saturated to 12 bits (coefficients have 10
// fractional bits). Tap count and multiplier count follow the document;
// widths, rounding and the delay-line placement are this design's choice.
module le_filter
  import sic_pkg::*;
#(
  parameter int TAPS = LE_TAPS,
  parameter int NMUL = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  coef_t                 coef [TAPS],
  input  logic                  clear,
  input  logic                  shift,
  input  sample_t               din,
  input  logic                  start,
  output logic                  busy,
  output logic                  ready,
  output logic                  out_valid,
  output chip_t                 dout,
  // shared complex multiplier (lane 0)
  output logic signed [SW-1:0]  sh_a_re, sh_a_im,
  output logic signed [CW-1:0]  sh_b_re, sh_b_im,
  input  logic signed [SW+CW:0] sh_p_re, sh_p_im
);
  localparam int CYC  = TAPS / NMUL;
  localparam int PW   = SW + CW + 1;
  localparam int ACCW = PW + $clog2(TAPS);
  localparam int FRAC = CW - 2;

  sample_t dl [TAPS];
  logic [$clog2(CYC)-1:0] cnt;
  logic signed [ACCW-1:0] acc_re, acc_im;
  logic signed [PW-1:0]   p_re [NMUL];
  logic signed [PW-1:0]   p_im [NMUL];
  logic last;

  // operands of this cycle
  sample_t op_a [NMUL];
  coef_t   op_b [NMUL];
  always_comb begin
    for (int m = 0; m < NMUL; m++) begin
      op_a[m] = dl[int'(cnt)*NMUL + m];
      op_b[m] = coef[int'(cnt)*NMUL + m];
    end
  end

  assign sh_a_re = op_a[0].re;
  assign sh_a_im = op_a[0].im;
  assign sh_b_re = op_b[0].re;
  assign sh_b_im = op_b[0].im;
  assign p_re[0] = sh_p_re;
  assign p_im[0] = sh_p_im;

  for (genvar m = 1; m < NMUL; m++) begin : g_mul
    cmul #(.AW(SW), .BW(CW)) u_mul (
      .a_re(op_a[m].re), .a_im(op_a[m].im),
      .b_re(op_b[m].re), .b_im(op_b[m].im),
      .p_re(p_re[m]), .p_im(p_im[m]));
  end

  logic signed [ACCW-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int m = 0; m < NMUL; m++) begin
      sum_re += ACCW'(p_re[m]);
      sum_im += ACCW'(p_im[m]);
    end
  end

  assign last  = (cnt == $bits(cnt)'(CYC-1));
  assign ready = !busy || last;

  function automatic logic signed [EW-1:0] round_sat(input logic signed [ACCW-1:0] v);
    logic signed [ACCW-1:0] r;
    r = (v + (ACCW'(1) <<< (FRAC-1))) >>> FRAC;
    if (r > ACCW'((1 <<< (EW-1)) - 1))       return EW'((1 <<< (EW-1)) - 1);
    else if (r < -ACCW'(1 <<< (EW-1)))      return EW'(-(1 <<< (EW-1)));
    else                                    return r[EW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; out_valid <= 1'b0;
      acc_re <= '0; acc_im <= '0; dout <= '0;
      for (int j = 0; j < TAPS; j++) dl[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        for (int j = 0; j < TAPS; j++) dl[j] <= '0;
      end else if (shift && ready) begin
        dl[0] <= din;
        for (int j = 1; j < TAPS; j++) dl[j] <= dl[j-1];
      end
      if (busy) begin
        if (cnt == '0) begin
          acc_re <= sum_re; acc_im <= sum_im;
        end else begin
          acc_re <= acc_re + sum_re; acc_im <= acc_im + sum_im;
        end
        if (last) begin
          busy <= start;
          out_valid <= 1'b1;
          dout.re <= round_sat(acc_re + sum_re);
          dout.im <= round_sat(acc_im + sum_im);
        end
        cnt <= cnt + 1'b1;
      end else if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end
endmodule
