// Self-checking test of the main memory: fills all 864 words with random
// samples, then reads them back on both ports (one-cycle read latency),
// including a read of the word being written in the same cycle (returns
// the old value), and checks against a model array.
module tb_main_memory;
  import sic_pkg::*;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic we;
  logic [ADDR_W-1:0] waddr, raddr_a, raddr_b;
  sample_t wdata, rdata_a, rdata_b;
  sample_t model [BURST_LEN];
  int checks = 0, failures = 0;

  main_memory dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr_a = '0; raddr_b = '0; wdata = '0;
    for (int i = 0; i < BURST_LEN; i++) begin
      model[i] = sample_t'($urandom);
      @(negedge clk); we = 1; waddr = ADDR_W'(i); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < BURST_LEN; i++) begin
      raddr_a = ADDR_W'(i); raddr_b = ADDR_W'(BURST_LEN-1-i);
      @(negedge clk);
      checks++;
      if (rdata_a != model[i] || rdata_b != model[BURST_LEN-1-i]) begin
        failures++; if (failures < 10) $display("FAIL: read %0d", i);
      end
    end
    // read-during-write returns the old word, new word visible next cycle
    raddr_a = 10'd100; we = 1; waddr = 10'd100; wdata = ~model[100];
    @(negedge clk); we = 0;
    checks++; if (rdata_a != model[100]) begin failures++; $display("FAIL: read during write"); end
    @(negedge clk);
    checks++; if (rdata_a != ~model[100]) begin failures++; $display("FAIL: write not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
