`timescale 1ns/1ps
// tb_output_controller: FIFO A and B (sync_fifo instances) are filled with
// random event blocks of random odd/even 16-bit length, XOFF toggles at
// random. The S-Link output is compared word by word with the expected
// fragment (BOF, joined words with padding, status, trailer, EOF); then the
// same is done in SDRAM mode, checking the consecutive addresses.
module tb_output_controller;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic fa_rd, fb_rd, fa_empty, fb_empty, fa_full, fb_full, xoff = 0;
  logic [16:0] fa_data, fb_data, wa = 0, wb = 0;
  logic wea = 0, web = 0;
  logic sl_valid, sl_ctrl, sd_we;
  logic [31:0] sl_data, sd_data;
  logic [23:0] sd_addr;
  logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  logic [8:0] ca, cb;
  sync_fifo #(.DW(17), .AW(8)) u_fa (.clk, .rst_n, .wr_en(wea), .wdata(wa), .full(fa_full),
    .rd_en(fa_rd), .rdata(fa_data), .empty(fa_empty), .count(ca));
  sync_fifo #(.DW(17), .AW(8)) u_fb (.clk, .rst_n, .wr_en(web), .wdata(wb), .full(fb_full),
    .rd_en(fb_rd), .rdata(fb_data), .empty(fb_empty), .count(cb));
  output_controller #(.SD_AW(24)) dut (.*);
  // expected output: {ctrl, data}
  logic [32:0] expq [$];
  int n_odd = 0, n_xoff_stall = 0, sd_exp_addr = 0;
  bit sdm = 0;
  always @(posedge clk) begin
    if (xoff && !fa_empty) n_xoff_stall++;
    if (sl_valid || sd_we) begin
      logic [32:0] got;
      got = sl_valid ? {sl_ctrl, sl_data} : {1'b0, sd_data};
      checks++;
      if (sdm != sd_we || (sl_valid && sd_we)) failures++;
      if (sd_we) begin checks++; if (int'(sd_addr) != sd_exp_addr) failures++; sd_exp_addr++; end
      if (expq.size() == 0) begin failures++; $display("unexpected %h", got); end
      else begin
        if (got != expq[0]) begin failures++; if (failures < 10) $display("got %h exp %h", got, expq[0]); end
        void'(expq.pop_front());
      end
    end
  end
  always @(negedge clk) xoff = ($urandom_range(0, 9) < 3);
  initial begin #20_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic event_blocks();
    int la, lb; logic [15:0] a [$], b [$]; int nw; bit odd;
    la = $urandom_range(18, 80); lb = $urandom_range(4, 80);
    for (int i = 0; i < la; i++) a.push_back(16'($urandom));
    for (int i = 0; i < lb; i++) b.push_back(16'($urandom));
    odd = (la % 2) || (lb % 2);
    n_odd += odd;
    if (!sdm) expq.push_back({1'b1, SLINK_BOF});
    for (int i = 0; i < la; i += 2) expq.push_back({1'b0, a[i], (i + 1 < la) ? a[i+1] : 16'h0});
    for (int i = 0; i < lb; i += 2) expq.push_back({1'b0, b[i], (i + 1 < lb) ? b[i+1] : 16'h0});
    nw = (la + 1) / 2 + (lb + 1) / 2;
    expq.push_back({1'b0, 31'h0, odd});
    expq.push_back({1'b0, 32'd1}); expq.push_back({1'b0, 32'(nw - 9)}); expq.push_back({1'b0, 32'd1});
    if (!sdm) expq.push_back({1'b1, SLINK_EOF});
    fork
      for (int i = 0; i < la; i++) begin
        @(negedge clk); while (fa_full) @(negedge clk);
        wea = 1; wa = {i == la - 1, a[i]}; @(negedge clk); wea = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      for (int i = 0; i < lb; i++) begin
        @(negedge clk); while (fb_full) @(negedge clk);
        web = 1; wb = {i == lb - 1, b[i]}; @(negedge clk); web = 0;
      end
    join
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int e = 0; e < 40; e++) event_blocks();
    repeat (2000) @(negedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("missing %0d words", expq.size()); end
    if (n_odd == 0 || n_xoff_stall == 0) failures++;
    // SDRAM mode
    @(negedge clk); reg_we = 1; reg_addr = 2; reg_wdata = 32'd100; @(negedge clk); reg_addr = 0; reg_wdata = 32'h3;
    @(negedge clk); reg_we = 0;
    sdm = 1; sd_exp_addr = 100;
    for (int e = 0; e < 10; e++) event_blocks();
    repeat (2000) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    @(negedge clk); reg_re = 1; reg_addr = 1; @(negedge clk); reg_re = 0;
    checks++; if (reg_rdata != 32'd50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
