// Self-checking test of the chip FIFO against a queue model: random pushes
// and pops (never into a full or out of an empty FIFO), checking head data,
// count, full and empty every cycle; the FIFO is driven to full and back to
// empty at least once.
module tb_chip_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic push, pop, full, empty;
  logic [21:0] din, dout;
  logic [5:0] count;
  logic [21:0] q [$];
  int checks = 0, failures = 0, nfull = 0;

  chip_fifo dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = ((n / 500) % 2 == 0) ? 3 : 1;   // phases of filling and draining
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || full != (q.size() == 32) || empty != (q.size() == 0) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++; if (failures < 10) $display("FAIL: cycle %0d count %0d model %0d", n, count, q.size());
      end
      if (full) nfull++;
      push = ($urandom_range(3) < bias) && !full;
      pop  = ($urandom_range(3) >= bias) && !empty;
      din  = 22'($urandom);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
