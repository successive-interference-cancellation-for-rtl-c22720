// Chip FIFO: synchronous first-in first-out buffer between the spreading
// unit and the channel filter, decoupling the bursty chips of a selected
// group (K chips in K cycles) from the channel filter, which takes one chip
// every W cycles. Depth and width are this design's choice.
//
// Interface: push writes din when not full; pop removes the head when not
// empty; dout shows the head combinationally. count gives the fill level.
// Assertions flag a push into a full or a pop from an empty FIFO.
module chip_fifo #(
  parameter int WIDTH = 22,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= din;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop && !empty)
        rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH)+1)'(push && !full) - ($clog2(DEPTH)+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("chip_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("chip_fifo: pop while empty");
endmodule
