`timescale 1ns/1ps
// tb_jtag_master: a 32-bit shift register stands in for the scan chain;
// random TMS/TDI vectors and lengths, TDO compared with the chain contents.
module tb_jtag_master;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tck, tms, tdi, tdo;
  logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  jtag_master dut (.*);
  logic [31:0] chain = 0, got_tms = 0, got_tdi = 0; int nb = 0;
  assign tdo = chain[0];
  always @(posedge tck) begin
    chain <= {tdi, chain[31:1]}; got_tms[nb] <= tms; got_tdi[nb] <= tdi; nb <= nb + 1;
  end
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = d; @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a); @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask
  initial begin
    logic [31:0] d, vt, vd, init; int len;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      len = $urandom_range(1, 32); vt = $urandom; vd = $urandom;
      init = $urandom; chain = init; nb = 0;
      wr(1, vt); wr(2, vd); wr(0, 32'h100 | 32'(len - 1));
      do rd(0, d); while (d[8]);
      rd(3, d);
      for (int i = 0; i < len; i++) begin
        checks += 3;
        if (d[i] != init[i]) failures++;
        if (got_tms[i] != vt[i]) failures++;
        if (got_tdi[i] != vd[i]) failures++;
      end
      checks++; if (nb != len) begin failures++; $display("nb %0d len %0d", nb, len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
