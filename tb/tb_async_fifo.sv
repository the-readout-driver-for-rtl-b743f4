`timescale 1ns/1ps
// tb_async_fifo: writes a counting sequence in one clock and reads it in an
// unrelated clock with random stalls on both sides; checks order, full
// (no more than 2**AW words held) and that nothing is lost.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #12.5 wclk = ~wclk;
  always #6.1 rclk = ~rclk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [16:0] wdata = 0, rdata;
  async_fifo #(.DW(17), .AW(4)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full,
    .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty);
  int nw = 0, nr = 0, nfull = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge wclk) begin
    if (wr_en && !full) nw <= nw + 1;
    if (full) nfull <= nfull + 1;
  end
  always @(negedge wclk) begin
    wr_en = rst_n && (nw < 2000) && ($urandom_range(0, 3) != 0);
    wdata = 17'(nw);
  end
  always @(posedge rclk) if (rd_en && !empty) begin
    if (rdata != 17'(nr)) failures <= failures + 1;
    checks <= checks + 1;
    nr <= nr + 1;
  end
  always @(negedge rclk)
    rd_en = rst_n && ((nr < 1000) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) == 0));
  initial begin
    repeat (3) @(negedge wclk); rst_n = 1;
    wait (nr == 2000);
    checks++;
    if (nfull == 0) failures++;    // the slow-reader phase must fill it
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
