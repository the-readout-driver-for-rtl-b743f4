`timescale 1ns/1ps
// tb_tm_buffer: a source that obeys XOFF and a link that asserts LFF at
// random; checks order, that XOFF toggled, and that nothing overflowed.
module tb_tm_buffer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ctrl = 0, xoff, lsc_uctrl, lsc_uwen, lsc_lff = 0;
  logic [31:0] in_data = 0, lsc_ud; logic [15:0] overflow;
  tm_buffer #(.AW(6), .XOFF_ON(48), .XOFF_OFF(32)) dut (.*);
  int nw = 0, nr = 0, nxoff = 0; logic xoff_q = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n) begin
    if (in_valid) nw <= nw + 1;
    if (lsc_uwen) begin
      checks <= checks + 1;
      if (lsc_ud != 32'(nr * 7) || lsc_uctrl != (nr % 10 == 0)) failures <= failures + 1;
      nr <= nr + 1;
    end
    xoff_q <= xoff;
    if (xoff && !xoff_q) nxoff <= nxoff + 1;
  end
  always @(negedge clk) begin
    in_valid = rst_n && !xoff && nw < 3000 && $urandom_range(0, 3) != 0;
    in_data = 32'(nw * 7); in_ctrl = (nw % 10 == 0);
    lsc_lff = (nr < 1500) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 9) == 0);
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (nr == 3000);
    repeat (5) @(negedge clk);
    checks += 2;
    if (nxoff == 0) failures++;
    if (overflow != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
