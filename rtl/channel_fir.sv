// Channel filter and cancellation: passes the regenerated chip stream of
// one data block through an FIR whose coefficients are the estimated
// channel taps, and subtracts the result from the residual held in the main
// memory, so that r(l) = r(l-1) - h * x(l) is written back in place.
//
// As in the document a single complex multiplier is used: each output takes
// W multiply-accumulate cycles; the next chip is fetched in the last of
// them when the FIFO has one, so a steady stream costs W cycles per chip. The
// block's chip stream is followed by W-1 zero chips so that the channel tail
// reaching into the midamble (or guard) is also cancelled.
// y = round(sum h_w x_{q-w} / 2^8) (taps have 8 fractional bits).
// The memory update is a read-modify-write pipelined behind the MAC: the
// address is presented one cycle, the old value returns the next, and
// sat9(old - y) is written in that same cycle.
//
// Interface: blk_start (with base = memory address of the block's first
// chip) starts a block; chips are popped from the FIFO (in_pop when
// !in_empty) for the first blk_chips outputs; done pulses after the last
// write. taps must be stable while busy.
module channel_fir
  import sic_pkg::*;
#(
  parameter int W = CIR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tap_t              taps [W],
  input  logic [9:0]        blk_chips,
  input  logic              blk_start,
  input  logic [ADDR_W-1:0] base,
  output logic              busy,
  output logic              done,
  input  logic              in_empty,
  input  rchip_t            in_chip,
  output logic              in_pop,
  output logic [ADDR_W-1:0] rd_addr,
  input  sample_t           rd_data,
  output logic              we,
  output logic [ADDR_W-1:0] waddr,
  output sample_t           wdata
);
  localparam int PW   = HW + RW + 1;
  localparam int ACCW = PW + $clog2(W);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_MAC, S_DRAIN} state_t;
  state_t state;

  rchip_t dl [W];
  logic [$clog2(W)-1:0] cnt;
  logic [9:0] q;
  logic [ADDR_W-1:0] b;
  logic signed [ACCW-1:0] acc_re, acc_im;
  logic signed [PW-1:0] p_re, p_im;
  logic rmw_v1, rmw_v2;
  logic [ADDR_W-1:0] rmw_addr;
  logic signed [ACCW-1:0] y_re, y_im;

  cmul #(.AW(RW), .BW(HW)) u_mul (
    .a_re(dl[cnt].re), .a_im(dl[cnt].im),
    .b_re(taps[cnt].re), .b_im(taps[cnt].im),
    .p_re(p_re), .p_im(p_im));

  function automatic logic signed [SW-1:0] sat_sub(input logic signed [SW-1:0] a,
                                                   input logic signed [ACCW-1:0] y);
    logic signed [ACCW:0] d;
    d = (ACCW+1)'(a) - (ACCW+1)'(y);
    if (d > (ACCW+1)'((1 <<< (SW-1)) - 1)) return SW'((1 <<< (SW-1)) - 1);
    if (d < -(ACCW+1)'(1 <<< (SW-1)))      return SW'(-(1 <<< (SW-1)));
    return d[SW-1:0];
  endfunction

  // fetch of chip fq: in S_FETCH, or overlapped with the last MAC cycle
  logic [9:0] fq;
  logic       fetching, fetch_ok, last_mac;
  assign last_mac = (state == S_MAC) && (cnt == $bits(cnt)'(W-1));
  assign fq       = (state == S_FETCH) ? q : q + 1'b1;
  assign fetch_ok = (fq >= blk_chips) || !in_empty;
  assign fetching = ((state == S_FETCH) || (last_mac && q != blk_chips + 10'(W) - 10'd2)) && fetch_ok;
  assign in_pop   = fetching && (fq < blk_chips);
  assign rd_addr = rmw_addr;
  assign we      = rmw_v2;
  assign waddr   = rmw_addr;
  assign wdata.re = sat_sub(rd_data.re, y_re);
  assign wdata.im = sat_sub(rd_data.im, y_im);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; q <= '0; b <= '0; done <= 1'b0;
      acc_re <= '0; acc_im <= '0; y_re <= '0; y_im <= '0;
      rmw_v1 <= 1'b0; rmw_v2 <= 1'b0; rmw_addr <= '0;
      for (int w = 0; w < W; w++) dl[w] <= '0;
    end else begin
      done   <= 1'b0;
      rmw_v1 <= 1'b0;
      rmw_v2 <= rmw_v1;
      if (fetching) begin
        dl[0] <= (fq < blk_chips) ? in_chip : '0;
        for (int w = 1; w < W; w++) dl[w] <= dl[w-1];
      end
      unique case (state)
        S_IDLE: if (blk_start) begin
          state <= S_FETCH; q <= '0; b <= base;
          for (int w = 0; w < W; w++) dl[w] <= '0;
        end
        S_FETCH: begin
          if (fetching) begin
            cnt <= '0; acc_re <= '0; acc_im <= '0;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          acc_re <= acc_re + ACCW'(p_re);
          acc_im <= acc_im + ACCW'(p_im);
          cnt <= cnt + 1'b1;
          if (last_mac) begin
            acc_re <= '0; acc_im <= '0; cnt <= '0;
            y_re <= (acc_re + ACCW'(p_re) + ACCW'(1 <<< (HW-3))) >>> (HW-2);
            y_im <= (acc_im + ACCW'(p_im) + ACCW'(1 <<< (HW-3))) >>> (HW-2);
            rmw_v1 <= 1'b1;
            rmw_addr <= b + ADDR_W'(q);
            q <= q + 1'b1;
            if (q == blk_chips + 10'(W) - 10'd2) state <= S_DRAIN;
            else if (!fetching)                  state <= S_FETCH;
          end
        end
        S_DRAIN: if (rmw_v2) begin
          state <= S_IDLE; done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
