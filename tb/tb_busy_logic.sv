`timescale 1ns/1ps
// tb_busy_logic: random busy inputs and mask; checks the masked OR one clock
// later, the per-input busy counters, and interrupt pending/enable/clear.
module tb_busy_logic;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] busy_in = 0, mask_m = 0;
  logic [7:0] irq_in = 0;
  logic busy_out, irq_out;
  logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  busy_logic dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = 32'(d); @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a); @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask
  int cnt [4]; logic [31:0] d;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wr(4, 1);
    for (int blk = 0; blk < 8; blk++) begin
      mask_m = 4'($urandom); wr(0, mask_m);
      for (int n = 0; n < 200; n++) begin
        logic exp;
        @(negedge clk);
        busy_in = 4'($urandom);
        exp = |(busy_in & ~mask_m);
        for (int i = 0; i < 4; i++) cnt[i] += busy_in[i];
        @(negedge clk);
        checks++; if (busy_out != exp) failures++;
        for (int i = 0; i < 4; i++) cnt[i] += busy_in[i];
      end
      @(negedge clk); busy_in = 0;
    end
    for (int i = 0; i < 4; i++) begin rd(8 + i, d); checks++; if (d != 32'(cnt[i])) begin failures++; $display("cnt %0d %0d %0d", i, d, cnt[i]); end end
    // interrupts
    wr(1, 8'h0F);
    @(negedge clk); irq_in = 8'h24; @(negedge clk); irq_in = 0; repeat (2) @(negedge clk);
    checks++; if (!irq_out) failures++;          // bit 2 enabled
    rd(2, d); checks++; if (d[7:0] != 8'h24) failures++;
    wr(2, 4); repeat (2) @(negedge clk);
    checks++; if (irq_out) failures++;           // bit 5 pending but masked
    rd(2, d); checks++; if (d[7:0] != 8'h20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
