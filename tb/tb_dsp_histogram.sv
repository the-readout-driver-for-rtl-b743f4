`timescale 1ns/1ps
// tb_dsp_histogram: random updates are mirrored in a reference array and
// every bin touched is read back through the host port.
module tb_dsp_histogram;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, upd = 0, ready, rd_en = 0;
  logic [6:0] upd_ch = 0;
  logic [ADC_W-1:0] upd_s0 = 0;
  logic [15:0] upd_qf = 0, rd_data;
  logic [13:0] rd_addr = 0;
  dsp_histogram dut (.*);
  int ref_s [96][64], ref_q [96][64];
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check_bin(int kind, int ch, int b, int expv);
    @(negedge clk); rd_en = 1; rd_addr = {kind[0], 7'(ch), 6'(b)};
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data != 16'(expv)) begin failures++; $display("bin %0d %0d %0d: %0d exp %0d", kind, ch, b, rd_data, expv); end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    while (!ready) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int ch, s0, q, qb;
      ch = $urandom_range(0, 5); s0 = $urandom_range(0, 1023); q = $urandom_range(0, 6000);
      qb = (q >> 6) > 63 ? 63 : (q >> 6);
      upd = 1; upd_ch = 7'(ch); upd_s0 = 10'(s0); upd_qf = 16'(q);
      @(negedge clk); upd = 0; @(negedge clk);
      ref_s[ch][s0 >> 4]++; ref_q[ch][qb]++;
    end
    for (int ch = 0; ch < 6; ch++) for (int b = 0; b < 64; b++) begin
      check_bin(0, ch, b, ref_s[ch][b]); check_bin(1, ch, b, ref_q[ch][b]);
    end
    // clear
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    @(negedge clk); while (!ready) @(negedge clk);
    check_bin(0, 2, 10, 0); check_bin(1, 3, 63, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
