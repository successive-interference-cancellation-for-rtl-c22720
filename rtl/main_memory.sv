// Main memory: holds one received burst of 9-bit I/Q samples. After every
// cancellation iteration the entries hold the residual signal r(l).
// One write port (burst loading, or the residual update of the channel
// filter) and two synchronous read ports: port A feeds the LE filter delay
// line, port B is the read half of the channel filter's read-modify-write.
// Read data appear one clock after the address. A read of the address being
// written returns the old contents. Depth and sample width follow the burst
// format (864 chips of 9-bit I/Q); port arrangement is this design's choice.
module main_memory
  import sic_pkg::*;
#(
  parameter int DEPTH = BURST_LEN,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sample_t       wdata,
  input  logic [AW-1:0] raddr_a,
  output sample_t       rdata_a,
  input  logic [AW-1:0] raddr_b,
  output sample_t       rdata_b
);
  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    rdata_a <= (raddr_a < AW'(DEPTH)) ? mem[raddr_a] : '0;
    rdata_b <= (raddr_b < AW'(DEPTH)) ? mem[raddr_b] : '0;
  end
endmodule
