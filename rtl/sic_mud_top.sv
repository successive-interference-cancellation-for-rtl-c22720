// Group-wise hard-decision successive interference cancellation multiuser
// detector (SIC-MUD) for one TD-SCDMA downlink burst.
//
// Data path (all blocks instantiated here):
//   main_memory -> le_filter (64-tap MMSE FIR) -> despreader (16 codes)
//   -> selection (3 most reliable uncancelled codes per symbol)
//   -> spreader (re-spread HDs) -> chip_fifo -> channel_fir, which subtracts
//   the regenerated interference from the residual in main_memory.
//   filter_calc (FFT / denominator / divider / IFFT) computes the LE taps
//   once per burst; its FFT butterfly and lane 0 of the LE filter share one
//   complex multiplier (the FFT holds it while filter_calc is busy, which is
//   only while the burst is being loaded and before the first iteration).
//
// Operation: 'start' clears the cancelled-code buffer, starts the filter
// calculation and accepts BURST_LEN samples on in_valid/in_sample. Then
// ceil(Q/3) iterations run (Q = number of set bits in 'active'). Each
// iteration processes both data blocks: the LE delay line is primed with
// 63 samples, then every chip takes 16 cycles (64 taps on 4 multipliers;
// the next sample is read while the current chip is computed), every 16
// chips give one symbol of all codes,
// and for each symbol the selected group is presented on out_valid /
// out_sym / out_grp (soft estimate and HD per lane) and cancelled. Because
// the equalizer reads the memory at least 32 chips ahead of where the
// channel filter writes, each iteration equalizes the residual of the
// previous iteration only. done pulses at the end; busy is high from start
// to done. dbg_addr/dbg_data read the residual back while idle (one cycle
// latency).
//
// The block structure, tap count, multiplier count, FFT size, group size,
// cancelled-code buffer and multiplier sharing follow the document; the
// sequencing, handshakes, word widths and the real-valued +-1 codes are
// this design's choices.
module sic_mud_top
  import sic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              in_valid,
  input  sample_t           in_sample,
  input  logic [K-1:0]      codes [K],
  input  logic [K-1:0]      active,
  input  logic [7:0]        chip_amp,
  input  tap_t              cir [CIR_W],
  input  logic [23:0]       sigma2,
  output logic              busy,
  output logic              done,
  output logic [2:0]        iter,
  output logic              out_valid,
  output logic [5:0]        out_sym,
  output sel_t              out_grp [M_SIC],
  input  logic [ADDR_W-1:0] dbg_addr,
  output sample_t           dbg_data
);
  localparam int PRE_N = LE_TAPS - 1;          // samples primed per block
  localparam int BACK  = LE_TAPS - 1 - LE_PRE; // causal taps (15)

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_WAIT_FC, S_BLK, S_PRE, S_RUN, S_BLK_END, S_DONE
  } state_t;
  state_t state;

  // ---------------------------------------------------------------- control regs
  logic [ADDR_W-1:0] ld_cnt;
  logic [2:0]        niter;
  logic              blk;
  logic [ADDR_W-1:0] base;
  logic [6:0]        pre_cnt;
  logic [8:0]        chip_cnt;
  logic [4:0]        sym_cnt;
  logic              fc_ready, cf_finished;
  logic              rd_v, rd_zero, settled, le_go, le_ready;
  logic signed [ADDR_W+1:0] rd_pos;

  // ---------------------------------------------------------------- memory
  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr_a, mem_raddr_b;
  sample_t           mem_wdata, mem_rdata_a, mem_rdata_b;
  logic              cf_we;
  logic [ADDR_W-1:0] cf_waddr;
  sample_t           cf_wdata;

  main_memory u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr_a(mem_raddr_a), .rdata_a(mem_rdata_a),
    .raddr_b(mem_raddr_b), .rdata_b(mem_rdata_b));

  assign mem_we    = (state == S_LOAD) ? in_valid  : cf_we;
  assign mem_waddr = (state == S_LOAD) ? ld_cnt    : cf_waddr;
  assign mem_wdata = (state == S_LOAD) ? in_sample : cf_wdata;
  assign dbg_data  = mem_rdata_a;

  // ---------------------------------------------------------------- filter calculation
  logic fc_start, fc_busy, fc_done;
  coef_t coef [LE_TAPS];
  logic signed [FW-1:0]   fc_a_re, fc_a_im;
  logic signed [TWW-1:0]  fc_b_re, fc_b_im;
  logic signed [FW+TWW:0] sh_p_re, sh_p_im;

  filter_calc u_fc (
    .clk, .rst_n, .start(fc_start), .cir, .sigma2, .busy(fc_busy), .done(fc_done), .coef,
    .mul_a_re(fc_a_re), .mul_a_im(fc_a_im), .mul_b_re(fc_b_re), .mul_b_im(fc_b_im),
    .mul_p_re(sh_p_re), .mul_p_im(sh_p_im));

  // ---------------------------------------------------------------- shared multiplier
  logic signed [SW-1:0] le_a_re, le_a_im;
  logic signed [CW-1:0] le_b_re, le_b_im;
  logic signed [FW-1:0]  sh_a_re, sh_a_im;
  logic signed [TWW-1:0] sh_b_re, sh_b_im;
  always_comb begin
    if (fc_busy) begin
      sh_a_re = fc_a_re; sh_a_im = fc_a_im; sh_b_re = fc_b_re; sh_b_im = fc_b_im;
    end else begin
      sh_a_re = FW'(le_a_re);  sh_a_im = FW'(le_a_im);
      sh_b_re = TWW'(le_b_re); sh_b_im = TWW'(le_b_im);
    end
  end
  cmul #(.AW(FW), .BW(TWW)) u_shared_mul (
    .a_re(sh_a_re), .a_im(sh_a_im), .b_re(sh_b_re), .b_im(sh_b_im),
    .p_re(sh_p_re), .p_im(sh_p_im));

  // ---------------------------------------------------------------- LE filter
  logic le_clear, le_start, le_busy, le_valid;
  chip_t le_out;
  le_filter u_le (
    .clk, .rst_n, .coef, .clear(le_clear), .shift(rd_v || le_go),
    .din(rd_zero ? sample_t'('0) : mem_rdata_a),
    .start(le_start), .busy(le_busy), .ready(le_ready), .out_valid(le_valid), .dout(le_out),
    .sh_a_re(le_a_re), .sh_a_im(le_a_im), .sh_b_re(le_b_re), .sh_b_im(le_b_im),
    .sh_p_re(sh_p_re[SW+CW:0]), .sh_p_im(sh_p_im[SW+CW:0]));

  // ---------------------------------------------------------------- despreader
  logic desp_clear, desp_valid;
  sym_t desp_sym [K];
  despreader u_desp (
    .clk, .rst_n, .codes, .clear(desp_clear), .in_valid(le_valid), .chip(le_out),
    .sym_valid(desp_valid), .sym(desp_sym));

  // ---------------------------------------------------------------- selection
  logic sel_clear, sel_busy, sel_valid, sel_skip;
  sel_t sel_grp [M_SIC];
  logic [5:0] sel_sym;
  selection u_sel (
    .clk, .rst_n, .clear_buf(sel_clear), .active, .amp(DW'({chip_amp, 4'b0})),
    .sym_valid(desp_valid), .sym(desp_sym),
    .sym_idx(blk ? 6'(BLK_SYM) + 6'(sym_cnt) : 6'(sym_cnt)),
    .busy(sel_busy), .grp_valid(sel_valid), .grp(sel_grp), .grp_sym(sel_sym), .skip(sel_skip));

  assign out_valid = sel_valid;
  assign out_sym   = sel_sym;
  assign out_grp   = sel_grp;

  // ---------------------------------------------------------------- spreader + FIFO
  logic sp_busy, sp_valid, fifo_full, fifo_empty, fifo_pop;
  rchip_t sp_chip, fifo_chip;
  logic [5:0] fifo_count;
  spreader u_sp (
    .clk, .rst_n, .codes, .chip_amp, .grp_valid(sel_valid), .grp(sel_grp),
    .busy(sp_busy), .out_valid(sp_valid), .out_chip(sp_chip), .out_ready(!fifo_full));

  chip_fifo #(.WIDTH(2*RW), .DEPTH(32)) u_fifo (
    .clk, .rst_n, .push(sp_valid), .din(sp_chip), .pop(fifo_pop), .dout(fifo_chip),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count));

  // ---------------------------------------------------------------- channel filter
  logic cf_start, cf_busy, cf_done;
  channel_fir u_cf (
    .clk, .rst_n, .taps(cir), .blk_chips(10'(BLK_CHIPS)), .blk_start(cf_start), .base,
    .busy(cf_busy), .done(cf_done), .in_empty(fifo_empty), .in_chip(fifo_chip),
    .in_pop(fifo_pop), .rd_addr(mem_raddr_b), .rd_data(mem_rdata_b),
    .we(cf_we), .waddr(cf_waddr), .wdata(cf_wdata));

  // ---------------------------------------------------------------- sequencing
  logic [4:0] q_act;
  always_comb begin
    q_act = '0;
    for (int k = 0; k < K; k++) q_act += 5'(active[k]);
  end

  // memory port A address: priming / chip reads, else debug
  always_comb begin
    rd_pos = '0;
    if (state == S_PRE)     rd_pos = $signed({2'b0, base}) - (ADDR_W+2)'(BACK) + (ADDR_W+2)'(pre_cnt);
    if (state == S_RUN) rd_pos = $signed({2'b0, base}) + (ADDR_W+2)'(chip_cnt) + (ADDR_W+2)'(LE_PRE);
    if (state == S_PRE || state == S_RUN) mem_raddr_a = rd_pos[ADDR_W-1:0];
    else                                      mem_raddr_a = dbg_addr;
  end

  assign fc_start   = (state == S_IDLE) && start;
  assign sel_clear  = (state == S_IDLE) && start;
  assign cf_start   = (state == S_BLK);
  assign le_clear   = (state == S_BLK);
  assign desp_clear = (state == S_BLK);
  // a chip starts once its newest sample has been read and the LE is ready
  assign le_go      = (state == S_RUN) && settled && le_ready && !rd_v;
  assign le_start   = le_go;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ld_cnt <= '0; niter <= '0; iter <= '0; blk <= 1'b0; base <= '0;
      pre_cnt <= '0; chip_cnt <= '0; sym_cnt <= '0; fc_ready <= 1'b0; cf_finished <= 1'b0;
      rd_v <= 1'b0; rd_zero <= 1'b0; done <= 1'b0; settled <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_v    <= (state == S_PRE);
      settled <= (state == S_RUN) && !le_go;
      rd_zero <= (rd_pos < 0) || (rd_pos >= (ADDR_W+2)'(BURST_LEN));
      if (fc_done) fc_ready <= 1'b1;
      if (cf_done) cf_finished <= 1'b1;
      if (desp_valid) sym_cnt <= sym_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD; ld_cnt <= '0; fc_ready <= 1'b0; iter <= '0;
          niter <= 3'((q_act + 5'd2) / 5'd3);
        end
        S_LOAD: if (in_valid) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == ADDR_W'(BURST_LEN-1)) state <= S_WAIT_FC;
        end
        S_WAIT_FC: if (fc_ready || fc_done) begin
          blk <= 1'b0; base <= '0;
          state <= (niter == '0) ? S_DONE : S_BLK;
        end
        S_BLK: begin
          pre_cnt <= '0; chip_cnt <= '0; sym_cnt <= '0; cf_finished <= 1'b0;
          state <= S_PRE;
        end
        S_PRE: begin
          pre_cnt <= pre_cnt + 1'b1;
          if (pre_cnt == 7'(PRE_N-1)) state <= S_RUN;
        end
        S_RUN: if (le_go) begin
          chip_cnt <= chip_cnt + 1'b1;
          if (chip_cnt == 9'(BLK_CHIPS-1)) state <= S_BLK_END;
        end
        S_BLK_END: if (cf_finished || cf_done) begin
          if (!blk) begin
            blk <= 1'b1; base <= ADDR_W'(BLK_CHIPS + MIDAMBLE); state <= S_BLK;
          end else if (iter == niter - 1'b1) begin
            state <= S_DONE;
          end else begin
            iter <= iter + 1'b1; blk <= 1'b0; base <= '0; state <= S_BLK;
          end
        end
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the LE filter must not be asked to shift while it computes
  a_no_shift_busy: assert property (@(posedge clk) disable iff (!rst_n) !(rd_v && !le_ready));
  // a block ends only when the whole cancellation path has drained
  a_drained:   assert property (@(posedge clk) disable iff (!rst_n)
                 cf_done |-> !sel_busy && !sp_busy && fifo_count == '0);
  a_le_idle:   assert property (@(posedge clk) disable iff (!rst_n) state == S_BLK |-> !le_busy);
  a_cf_idle:   assert property (@(posedge clk) disable iff (!rst_n) cf_start |-> !cf_busy);
  // nothing is cancelled before the first iteration, so no code is skipped then
  a_skip_iter: assert property (@(posedge clk) disable iff (!rst_n) sel_skip |-> iter != '0);
endmodule
