`timescale 1ns/1ps
// tb_out_fpga: TTC words sent back to back on the serial input must appear
// on the two McBSP lines ({BCID, EVID} and trigger type); register writes
// reach the right DSP host port or the Input FPGA configuration line; reads
// return DSP data or the OutFPGA's own counters and Input FPGA status.
module tb_out_fpga;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic t_load = 0, t_busy, ttc_fs, ttc_sd;
  logic [TTC_W-1:0] t_data = 0;
  logic mcbsp0_fs, mcbsp0_sd, mcbsp1_fs, mcbsp1_sd, cfg_fs, cfg_sd;
  logic [15:0] in_status [2] = '{16'h1234, 16'h0055};
  logic [23:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  logic [19:0] hpi_addr [2]; logic [15:0] hpi_wdata [2], hpi_rdata [2]; logic hpi_we [2], hpi_re [2];
  serial_tx #(.W(TTC_W)) u_tx (.clk, .rst_n, .load(t_load), .data(t_data), .busy(t_busy), .fs(ttc_fs), .sd(ttc_sd));
  out_fpga dut (.*);
  logic v0, v1, vc; logic [43:0] d0; logic [7:0] d1; logic [15:0] dc;
  serial_rx #(.W(44)) u_r0 (.clk, .rst_n, .fs(mcbsp0_fs), .sd(mcbsp0_sd), .valid(v0), .data(d0));
  serial_rx #(.W(8))  u_r1 (.clk, .rst_n, .fs(mcbsp1_fs), .sd(mcbsp1_sd), .valid(v1), .data(d1));
  serial_rx #(.W(16)) u_rc (.clk, .rst_n, .fs(cfg_fs), .sd(cfg_sd), .valid(vc), .data(dc));
  logic [15:0] hmem [2][16];
  for (genvar d = 0; d < 2; d++) begin : g_h
    always @(posedge clk) begin
      if (hpi_we[d]) hmem[d][hpi_addr[d][3:0]] <= hpi_wdata[d];
      if (hpi_re[d]) hpi_rdata[d] <= hmem[d][hpi_addr[d][3:0]] ^ 16'(d * 16'h8000);
    end
  end
  logic [TTC_W-1:0] q0 [$], q1 [$]; logic [15:0] qc [$];
  always @(posedge clk) begin
    if (v0) begin checks++; if (q0.size() == 0 || d0 != q0[0][43:0]) failures++; else void'(q0.pop_front()); end
    if (v1) begin checks++; if (q1.size() == 0 || d1 != q1[0][51:44]) failures++; else void'(q1.pop_front()); end
    if (vc) begin checks++; if (qc.size() == 0 || dc != qc[0]) failures++; else void'(qc.pop_front()); end
  end
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(input int a, input int v);
    @(negedge clk); reg_we = 1; reg_addr = 24'(a); reg_wdata = 32'(v); @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); reg_re = 1; reg_addr = 24'(a); @(negedge clk); reg_re = 0; v = reg_rdata;
  endtask
  initial begin
    logic [31:0] v; logic [15:0] ref_m [2][16];
    for (int d = 0; d < 2; d++) for (int i = 0; i < 16; i++) begin hmem[d][i] = 0; ref_m[d][i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      logic [TTC_W-1:0] w;
      w = {$urandom, $urandom};
      @(negedge clk); while (t_busy) @(negedge clk);
      t_load = 1; t_data = w; q0.push_back(w); q1.push_back(w);
      @(negedge clk); t_load = 0;
    end
    for (int n = 0; n < 60; n++) begin
      int d, a, x;
      d = $urandom_range(0, 1); a = $urandom_range(0, 15); x = $urandom_range(0, 65535);
      if ($urandom_range(0, 1)) begin wr(((d + 1) << 22) | a, x); ref_m[d][a] = 16'(x); end
      else begin rd(((d + 1) << 22) | a, v); checks++; if (v[15:0] != (ref_m[d][a] ^ 16'(d * 16'h8000))) failures++; end
    end
    wr(0, 32'h0013); qc.push_back(16'h0013);
    repeat (100) @(negedge clk);
    rd(1, v); checks++; if (v != 32'h1234) failures++;
    rd(2, v); checks++; if (v != 32'h0055) failures++;
    rd(3, v); checks++; if (v != 32'd30) failures++;
    rd(4, v); checks++; if (v != 32'd0) failures++;
    checks++; if (q0.size() || q1.size() || qc.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
