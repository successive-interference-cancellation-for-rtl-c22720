// Sequential divider: signed numerator / unsigned denominator, one quotient
// bit per cycle by restoring division of the numerator's magnitude, sign
// applied at the end, result truncated toward zero and saturated to QW bits.
// A division by zero gives the saturated value of the numerator's sign.
// The filter calculation time-shares it: first the real, then the
// imaginary part of each coefficient quotient.
//
// Interface: start latches num and den (ignored while busy); done pulses
// with quo valid NUMW+2 cycles after the start cycle (42 at the defaults).
module seq_divider #(
  parameter int NUMW = 40,
  parameter int DENW = 37,
  parameter int QW   = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [NUMW-1:0] num,
  input  logic [DENW-1:0]        den,
  output logic                   busy,
  output logic                   done,
  output logic signed [QW-1:0]   quo
);
  logic [NUMW-1:0] mag, q;
  logic [DENW-1:0] rem;
  logic [DENW-1:0] d;
  logic            neg;
  logic [$clog2(NUMW+1)-1:0] i;

  logic [DENW:0] trial;
  assign trial = {rem, mag[NUMW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quo <= '0;
      mag <= '0; q <= '0; rem <= '0; d <= '0; neg <= 1'b0; i <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          neg  <= num[NUMW-1];
          mag  <= num[NUMW-1] ? NUMW'(-num) : NUMW'(num);
          d    <= den;
          rem  <= '0;
          q    <= '0;
          i    <= '0;
        end
      end else if (i < $bits(i)'(NUMW)) begin
        if (trial >= {1'b0, d}) begin
          rem <= DENW'(trial - {1'b0, d});
          q   <= {q[NUMW-2:0], 1'b1};
        end else begin
          rem <= DENW'(trial);
          q   <= {q[NUMW-2:0], 1'b0};
        end
        mag <= mag << 1;
        i   <= i + 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (q > NUMW'((1 << (QW-1)) - 1))
          quo <= neg ? QW'(-(1 << (QW-1))) : QW'((1 << (QW-1)) - 1);
        else
          quo <= neg ? -QW'(q) : QW'(q);
      end
    end
  end
endmodule
