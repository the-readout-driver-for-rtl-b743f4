`timescale 1ns/1ps
// tb_local_bus: one lbus_master and three lbus_slave devices on a wired-OR
// bus; random writes and reads to register files held by the testbench.
module tb_local_bus;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req = 0, rd = 0, busy, done;
  logic [4:0] dev = 0; logic [25:0] addr = 0; logic [31:0] wdata = 0, rdata;
  logic lb_ctl, lb_oe; logic [3:0] lb_do, lb_di;
  logic [3:0] s_do [3]; logic s_oe [3];
  logic [25:0] s_addr [3]; logic [31:0] s_wd [3], s_rd [3]; logic s_we [3], s_re [3];
  logic [31:0] mem [3][16];
  lbus_master u_m (.*);
  for (genvar i = 0; i < 3; i++) begin : g_s
    lbus_slave #(.DEV_ID(5'(2 * i + 1))) u_s (.clk, .rst_n, .lb_ctl, .lb_di(lb_do),
      .lb_do(s_do[i]), .lb_oe(s_oe[i]), .reg_addr(s_addr[i]), .reg_wdata(s_wd[i]),
      .reg_we(s_we[i]), .reg_re(s_re[i]), .reg_rdata(s_rd[i]));
    always_ff @(posedge clk) begin
      if (s_we[i]) mem[i][s_addr[i][3:0]] <= s_wd[i];
      if (s_re[i]) s_rd[i] <= mem[i][s_addr[i][3:0]];
    end
  end
  always_comb begin
    lb_di = 0;
    for (int i = 0; i < 3; i++) if (s_oe[i]) lb_di |= s_do[i];
  end
  logic [31:0] ref_m [3][16];
  int n_oe_clash = 0;
  always @(posedge clk) if (lb_oe && (s_oe[0] || s_oe[1] || s_oe[2])) n_oe_clash++;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 3; i++) for (int a = 0; a < 16; a++) begin mem[i][a] = 0; ref_m[i][a] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int s, a; bit r;
      s = $urandom_range(0, 2); a = $urandom_range(0, 15); r = (n > 20) && $urandom_range(0, 1);
      @(negedge clk); req = 1; rd = r; dev = 5'(2 * s + 1); addr = 26'(a) | 26'($urandom_range(0, 3) << 20);
      wdata = $urandom;
      @(negedge clk); req = 0;
      while (!done) @(negedge clk);
      if (r) begin checks++; if (rdata != ref_m[s][a]) begin failures++; $display("rd %0d %0d %h %h", s, a, rdata, ref_m[s][a]); end end
      else ref_m[s][a] = wdata;
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < 3; i++) for (int a = 0; a < 16; a++) begin checks++; if (mem[i][a] != ref_m[i][a]) failures++; end
    checks++; if (n_oe_clash != 0) begin failures++; $display("clash %0d", n_oe_clash); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
