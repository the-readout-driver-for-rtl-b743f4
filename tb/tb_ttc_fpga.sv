`timescale 1ns/1ps
// tb_ttc_fpga: random L1A/BCR/ECR and trigger types; the serial words are
// received and compared with BCID/EVID counters kept here. The TTC clock is
// then stopped and restarted to check the fallback to the local clock, and
// the forced-local register is exercised.
module tb_ttc_fpga;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1, clk_local = 0, ttc_clk = 0, ttc_run = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  always #12.5 clk_local = ~clk_local;
  always #12.4 if (ttc_run) ttc_clk = ~ttc_clk;
  int checks = 0, failures = 0;
  logic bc_en = 0, l1a = 0, bcr = 0, ecr = 0, ttype_valid = 0, ttc_fs, ttc_sd, use_ttc_clk, rv;
  logic [7:0] ttype = 0;
  logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  logic [TTC_W-1:0] rword;
  ttc_fpga dut (.*);
  serial_rx #(.W(TTC_W)) u_rx (.clk, .rst_n, .fs(ttc_fs), .sd(ttc_sd), .valid(rv), .data(rword));
  logic [TTC_W-1:0] q [$]; int nrx = 0;
  always @(posedge clk) if (rv) begin
    checks++; nrx++;
    if (q.size() == 0 || rword != q[0]) begin failures++; $display("ttc word %h", rword); end
    if (q.size() != 0) void'(q.pop_front());
  end
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = 32'(d); @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a); @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask
  initial begin
    int bc = 0, evlo = 0, evhi = 0, nl1a = 0; logic [31:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      bc_en = 1; bcr = ($urandom_range(0, 99) == 0); ecr = ($urandom_range(0, 199) == 0) && !bcr;
      l1a = !ecr && n % 70 == 5;
      if (l1a) begin q.push_back({8'(n), BCID_W'(bc), 8'(evhi), 24'(evlo)}); nl1a++; end
      if (bcr) bc = 0; else bc++;
      if (ecr) begin evlo = 0; evhi++; end else if (l1a) evlo++;
      @(negedge clk); bc_en = 0; bcr = 0; ecr = 0;
      ttype_valid = l1a; ttype = 8'(n); l1a = 0;
      @(negedge clk); ttype_valid = 0;
    end
    repeat (200) @(negedge clk);
    checks += 3;
    if (nrx != nl1a || q.size() != 0) failures++;
    rd(3, d); if (d != 32'(nl1a)) failures++;
    rd(2, d); if (d != {8'(evhi), 24'(evlo)}) failures++;
    // clock selection
    repeat (200) @(negedge clk);
    checks++; if (!use_ttc_clk) failures++;
    ttc_run = 0; repeat (100) @(negedge clk);
    checks++; if (use_ttc_clk) failures++;
    ttc_run = 1; repeat (200) @(negedge clk);
    checks++; if (!use_ttc_clk) failures++;
    wr(0, 1); repeat (20) @(negedge clk);
    checks++; if (use_ttc_clk) failures++;
    wr(0, 0); repeat (20) @(negedge clk);
    checks++; if (!use_ttc_clk) failures++;
    rd(4, d); checks++; if (d[31:8] != 24'd5) begin failures++; $display("nsw %0d", d[31:8]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
