// Selection unit: picks, for one symbol, the M_SIC most reliable codes that
// have not been cancelled yet.
//
// For each code the QPSK hard decision (HD) is the sign of the real and
// imaginary part, and the reliability measure is the squared distance
// between the estimate and its HD point (+-amp +-j amp). As in the document
// the K estimates are visited one per cycle and compared with M_SIC
// registers holding the smallest distances so far; a smaller distance is
// stored there together with its est_sym estimate and HD (kept sorted, ties go
// to the lower code number). Inactive codes and codes whose bit is set in
// the cancelled-code buffer (16 bits for each of the 44 symbols of the
// burst) are skipped, so no code is cancelled twice. At the end the chosen
// codes are marked in that buffer.
//
// Interface: sym_valid with sym/sym_idx starts a search (ignored while
// busy); K cycles later grp_valid pulses for one cycle with grp (valid bits
// show how many of the M_SIC lanes hold a code, fewer than M_SIC in the last
// iteration) and grp_sym. clear_buf empties the cancelled-code buffer.
module selection
  import sic_pkg::*;
#(
  parameter int KC   = K,
  parameter int M    = M_SIC,
  parameter int NSYM = N_SYM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_buf,
  input  logic [KC-1:0]           active,
  input  logic [DW-1:0]           amp,
  input  logic                    sym_valid,
  input  sym_t                    sym [KC],
  input  logic [$clog2(NSYM)-1:0] sym_idx,
  output logic                    busy,
  output logic                    grp_valid,
  output sel_t                    grp [M],
  output logic [$clog2(NSYM)-1:0] grp_sym,
  output logic                    skip    // a code was skipped as already cancelled
);
  localparam int DISTW = 2*(DW+2) + 1;

  logic [KC-1:0]          canc [NSYM];
  sym_t                   est [KC];
  logic [$clog2(KC)-1:0]  k;
  logic [$clog2(NSYM)-1:0] cur_sym;
  sel_t                   best [M];
  logic [DISTW-1:0]       bdist [M];

  // distance of the code visited this cycle
  sym_t                   e;
  logic signed [DW+1:0]   dre, dim;
  logic [DISTW-1:0]       sqd;
  logic                   eligible;
  logic                   pub;
  always_comb begin
    e   = est[k];
    dre = (e.re < 0 ? -(DW+2)'(e.re) : (DW+2)'(e.re)) - (DW+2)'({1'b0, amp});
    dim = (e.im < 0 ? -(DW+2)'(e.im) : (DW+2)'(e.im)) - (DW+2)'({1'b0, amp});
    sqd = DISTW'(dre * dre) + DISTW'(dim * dim);
    eligible = active[k] && !canc[cur_sym][k];
  end

  assign skip = busy && active[k] && canc[cur_sym][k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; k <= '0; cur_sym <= '0; grp_valid <= 1'b0; grp_sym <= '0;
      for (int s = 0; s < NSYM; s++) canc[s] <= '0;
      for (int i = 0; i < KC; i++) est[i] <= '0;
      for (int m = 0; m < M; m++) begin best[m] <= '0; bdist[m] <= '0; grp[m] <= '0; end
    end else begin
      grp_valid <= 1'b0;
      if (clear_buf) begin
        for (int s = 0; s < NSYM; s++) canc[s] <= '0;
      end
      if (!busy) begin
        if (sym_valid && !pub) begin
          busy <= 1'b1; k <= '0; cur_sym <= sym_idx;
          for (int i = 0; i < KC; i++) est[i] <= sym[i];
          for (int m = 0; m < M; m++) begin best[m] <= '0; bdist[m] <= '0; end
        end
      end else begin
        if (eligible) begin
          sel_t cand;
          int   pos;
          cand.valid = 1'b1;
          cand.code  = 4'(k);
          cand.est_sym  = e;
          cand.hd_re = e.re < 0;
          cand.hd_im = e.im < 0;
          pos = M;
          for (int m = M-1; m >= 0; m--)
            if (!best[m].valid || sqd < bdist[m]) pos = m;
          for (int m = 0; m < M; m++) begin
            if (m == pos) begin
              best[m] <= cand; bdist[m] <= sqd;
            end else if (m > pos) begin
              best[m] <= best[m-1]; bdist[m] <= bdist[m-1];
            end
          end
        end
        k <= k + 1'b1;
        if (k == $bits(k)'(KC-1)) begin
          busy <= 1'b0;
        end
      end
      // one cycle after the last code: publish the group and mark it
      if (pub) begin
        grp_valid <= 1'b1;
        grp_sym   <= cur_sym;
        for (int m = 0; m < M; m++) begin
          grp[m] <= best[m];
          if (best[m].valid) canc[cur_sym][best[m].code] <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pub <= 1'b0;
    else        pub <= busy && (k == $bits(k)'(KC-1));
  end
endmodule
