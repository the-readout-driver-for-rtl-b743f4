`timescale 1ns/1ps
// tb_serial_link: serial_tx to serial_rx with random words; checks every
// word and the frame length (valid W clocks after the load).
module tb_serial_link;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load = 0, busy, fs, sd, valid;
  logic [51:0] data = 0, rdata;
  serial_tx #(.W(52)) u_tx (.clk, .rst_n, .load, .data, .busy, .fs, .sd);
  serial_rx #(.W(52)) u_rx (.clk, .rst_n, .fs, .sd, .valid, .data(rdata));
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [51:0] w; int lat;
      w = {$urandom, $urandom};
      @(negedge clk); load = 1; data = w; @(negedge clk); load = 0; lat = 1;
      while (!valid) begin @(negedge clk); lat++; end
      checks += 2;
      if (rdata != w) failures++;
      if (lat != 53) begin failures++; $display("lat %0d", lat); end
      if ($urandom_range(0,1)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
