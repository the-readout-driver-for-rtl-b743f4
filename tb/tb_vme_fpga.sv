`timescale 1ns/1ps
// tb_vme_fpga: VME cycles reach the busy logic, the JTAG master and, through
// the address/data register pair, two local-bus slave devices (register
// files in the testbench), including address auto-increment.
module tb_vme_fpga;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #6.25 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] ga = 5'd3;
  logic as_n = 1, write_n = 1, d_oe, dtack_n;
  logic [1:0] ds_n = 2'b11; logic [5:0] am = 0; logic [31:2] a = 0;
  logic [31:0] d_in = 0, d_out;
  logic [3:0] busy_in = 0; logic busy_out; logic [7:0] irq_in = 0; logic irq_out;
  logic lb_ctl, lb_oe; logic [3:0] lb_do, lb_di;
  logic tck, tms, tdi, tdo;
  vme_fpga dut (.*);
  logic [3:0] s_do [2]; logic s_oe [2]; logic [25:0] s_addr [2]; logic [31:0] s_wd [2], s_rd [2]; logic s_we [2], s_re [2];
  logic [31:0] mem [2][64];
  initial for (int i = 0; i < 2; i++) for (int k = 0; k < 64; k++) mem[i][k] = 0;
  for (genvar i = 0; i < 2; i++) begin : g_s
    lbus_slave #(.DEV_ID(5'(4 + i))) u_s (.clk, .rst_n, .lb_ctl, .lb_di(lb_do), .lb_do(s_do[i]),
      .lb_oe(s_oe[i]), .reg_addr(s_addr[i]), .reg_wdata(s_wd[i]), .reg_we(s_we[i]), .reg_re(s_re[i]),
      .reg_rdata(s_rd[i]));
    always @(posedge clk) begin
      if (s_we[i]) mem[i][s_addr[i][5:0]] <= s_wd[i];
      if (s_re[i]) s_rd[i] <= mem[i][s_addr[i][5:0]];
    end
  end
  assign lb_di = (s_oe[0] ? s_do[0] : 4'h0) | (s_oe[1] ? s_do[1] : 4'h0);
  logic [7:0] chain = 8'hA5;                         // 8-bit scan chain
  assign tdo = chain[0];
  always @(posedge tck) chain <= {tdi, chain[7:1]};
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic cycle(input logic [5:0] m, input logic [31:0] ad, input logic w, input logic [31:0] wd,
                       output logic [31:0] rd);
    int t = 0;
    am = m; a = ad[31:2]; write_n = !w; d_in = wd; #20 as_n = 0; #20 ds_n = 2'b00;
    while (dtack_n && t < 500) begin #10; t++; end
    checks++; if (dtack_n) begin failures++; $display("no dtack %h", ad); end
    rd = d_out;
    #10 ds_n = 2'b11; t = 0; while (!dtack_n && t < 200) begin #10; t++; end
    #10 as_n = 1; #40;
  endtask
  task automatic vw(input logic [23:0] off, input logic [31:0] v);
    logic [31:0] rd; cycle(6'h09, {8'h55, off}, 1'b1, v, rd);
  endtask
  task automatic vr(input logic [23:0] off, output logic [31:0] rd);
    cycle(6'h09, {8'h55, off}, 1'b0, 0, rd);
  endtask
  initial begin
    logic [31:0] rd; logic [31:0] rf [2][64];
    for (int i = 0; i < 2; i++) for (int k = 0; k < 64; k++) rf[i][k] = 0;
    #100 rst_n = 1; #100;
    cycle(6'h2F, {8'h0, 5'd3, 19'h7FF60}, 1'b1, 32'h55, rd);
    // busy logic
    vw(24'h0, 32'h5); vr(24'h0, rd); checks++; if (rd[3:0] != 4'h5) failures++;
    busy_in = 4'b0010; #100; checks++; if (!busy_out) failures++;
    busy_in = 4'b0101; #100; checks++; if (busy_out) failures++;
    busy_in = 0;
    vw(24'h4, 32'h2); irq_in = 8'h02; #20 irq_in = 0; #100; checks++; if (!irq_out) failures++;
    vw(24'h8, 32'h2); #100; checks++; if (irq_out) failures++;
    // local bus single accesses
    for (int n = 0; n < 30; n++) begin
      int s, k; bit w; logic [31:0] v;
      s = $urandom_range(0, 1); k = $urandom_range(0, 63); w = $urandom_range(0, 1); v = $urandom;
      vw(24'h100, {1'b0, 5'(4 + s), 26'(k)});
      if (w) begin vw(24'h104, v); rf[s][k] = v; end
      else begin vr(24'h104, rd); checks++; if (rd != rf[s][k]) begin failures++; $display("lb %0d %0d %h %h", s, k, rd, rf[s][k]); end end
    end
    // auto-increment block
    vw(24'h100, {1'b1, 5'd5, 26'd10});
    for (int k = 0; k < 8; k++) begin vw(24'h104, 32'(k * 3 + 1)); rf[1][10 + k] = 32'(k * 3 + 1); end
    vw(24'h100, {1'b1, 5'd5, 26'd10});
    for (int k = 0; k < 8; k++) begin vr(24'h104, rd); checks++; if (rd != rf[1][10 + k]) failures++; end
    // JTAG: shift 8 bits through the chain
    vw(24'h204, 32'h0); vw(24'h208, 32'h3C); vw(24'h200, 32'h107);
    #2000; vr(24'h20C, rd); checks++; if (rd[7:0] != 8'hA5) begin failures++; $display("tdo %h", rd); end
    checks++; if (chain != 8'h3C) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
