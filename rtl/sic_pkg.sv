// Shared constants and word formats of the group-wise hard-decision SIC
// multiuser detector for the TD-SCDMA downlink.
//
// Burst geometry (two 352-chip data blocks around a 144-chip midamble,
// 16-chip guard, spreading factor 16, 44 QPSK symbols per code) and the
// 9-bit I/Q sample width follow the TD-SCDMA burst format. All other word
// widths are this design's choice:
//   sample_t  9-bit I/Q received / residual sample (integer units)
//   tap_t    10-bit I/Q channel tap, 8 fractional bits
//   coef_t   12-bit I/Q LE coefficient, 10 fractional bits
//   chip_t   12-bit I/Q equalized chip (same units as samples)
//   sym_t    16-bit I/Q despread symbol estimate (sum of 16 chips)
//   rchip_t  11-bit I/Q regenerated chip (sum of up to 3 re-spread HDs)
//   fft_t    18-bit I/Q FFT word
package sic_pkg;
  localparam int K         = 16;   // spreading factor = max number of codes
  localparam int N_SYM     = 44;   // symbols per code and burst
  localparam int BLK_SYM   = 22;   // symbols per data block
  localparam int BLK_CHIPS = 352;  // chips per data block
  localparam int MIDAMBLE  = 144;
  localparam int GUARD     = 16;
  localparam int BURST_LEN = 2*BLK_CHIPS + MIDAMBLE + GUARD;  // 864
  localparam int M_SIC     = 3;    // codes cancelled per iteration and symbol
  localparam int LE_TAPS   = 64;
  localparam int FFT_N     = 128;
  localparam int CIR_W     = 16;   // channel taps
  localparam int LE_PRE    = 32;   // anticausal LE taps (coefficient index j=0 is w_{-32})

  localparam int SW  = 9;
  localparam int HW  = 10;
  localparam int CW  = 12;
  localparam int EW  = 12;
  localparam int DW  = 16;
  localparam int RW  = 11;
  localparam int FW  = 18;
  localparam int TWW = 16;         // twiddle width, 14 fractional bits
  localparam int ADDR_W = $clog2(BURST_LEN);

  typedef struct packed { logic signed [SW-1:0]  re, im; } sample_t;
  typedef struct packed { logic signed [HW-1:0]  re, im; } tap_t;
  typedef struct packed { logic signed [CW-1:0]  re, im; } coef_t;
  typedef struct packed { logic signed [EW-1:0]  re, im; } chip_t;
  typedef struct packed { logic signed [DW-1:0]  re, im; } sym_t;
  typedef struct packed { logic signed [RW-1:0]  re, im; } rchip_t;
  typedef struct packed { logic signed [FW-1:0]  re, im; } fft_t;
  typedef struct packed { logic signed [TWW-1:0] re, im; } tw_t;

  // one entry of a selected group: code, est_sym estimate and QPSK hard decision
  // (hd_re/hd_im = 1 means the negative constellation coordinate)
  typedef struct packed {
    logic                 valid;
    logic [3:0]           code;
    sym_t                 est_sym;
    logic                 hd_re;
    logic                 hd_im;
  } sel_t;
endpackage
