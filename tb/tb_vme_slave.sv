`timescale 1ns/1ps
// tb_vme_slave: a VME master model runs CR/CSR, single A32 and block-transfer
// cycles; the internal bus is answered by a memory with random latency.
// Also checks that A32 is ignored before the base address is programmed and
// that another slot's CR/CSR space is ignored.
module tb_vme_slave;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #6.25 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] ga = 5'd7;
  logic as_n = 1, write_n = 1, d_oe, dtack_n, bus_we, bus_re, bus_ack = 0;
  logic [1:0] ds_n = 2'b11; logic [5:0] am = 0; logic [31:2] a = 0;
  logic [31:0] d_in = 0, d_out, bus_wdata, bus_rdata = 0; logic [23:0] bus_addr;
  vme_slave dut (.*);
  logic [31:0] mem [256];
  initial for (int i = 0; i < 256; i++) mem[i] = 0;
  always @(posedge clk) begin
    if (bus_we || bus_re) begin
      automatic logic [23:0] ad = bus_addr; automatic logic w = bus_we; automatic logic [31:0] wd = bus_wdata;
      fork begin
        repeat ($urandom_range(0, 5)) @(posedge clk);
        if (w) mem[ad[9:2]] = wd; else bus_rdata <= mem[ad[9:2]];
        bus_ack <= 1; @(posedge clk); bus_ack <= 0;
      end join_none
    end
  end
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // one data strobe; ok=0 if no DTACK within 2 us
  task automatic strobe(input logic w, input logic [31:0] wd, output logic [31:0] rd, output bit ok);
    int t = 0;
    write_n = !w; d_in = wd; #20 ds_n = 2'b00;
    while (dtack_n && t < 200) begin #10; t++; end
    ok = !dtack_n; rd = d_out;
    #10 ds_n = 2'b11;
    t = 0; while (!dtack_n && t < 200) begin #10; t++; end
  endtask
  task automatic cycle(input logic [5:0] m, input logic [31:0] ad, input logic w, input logic [31:0] wd,
                       output logic [31:0] rd, output bit ok);
    am = m; a = ad[31:2]; #20 as_n = 0;
    strobe(w, wd, rd, ok);
    #10 as_n = 1; #40;
  endtask
  initial begin
    logic [31:0] rd; bit ok; logic [31:0] rf [256];
    for (int i = 0; i < 256; i++) rf[i] = 0;
    #100 rst_n = 1; #100;
    cycle(6'h09, 32'h3000_0010, 1'b1, 32'h1234, rd, ok); checks++; if (ok) failures++;     // no base yet
    cycle(6'h2F, {8'h0, 5'd7, 19'h1C}, 1'b0, 0, rd, ok); checks++; if (!ok || rd[7:0] != 8'h43) failures++;
    cycle(6'h2F, {8'h0, 5'd7, 19'h20}, 1'b0, 0, rd, ok); checks++; if (!ok || rd[7:0] != 8'h52) failures++;
    cycle(6'h2F, {8'h0, 5'd6, 19'h1C}, 1'b0, 0, rd, ok); checks++; if (ok) failures++;     // other slot
    cycle(6'h2F, {8'h0, 5'd7, 19'h7FF60}, 1'b1, 32'h30, rd, ok); checks++; if (!ok) failures++;
    cycle(6'h2F, {8'h0, 5'd7, 19'h7FF60}, 1'b0, 0, rd, ok); checks++; if (!ok || rd[7:0] != 8'h30) failures++;
    for (int n = 0; n < 200; n++) begin
      int i; bit w; logic [31:0] v;
      i = $urandom_range(0, 63); w = $urandom_range(0, 1); v = $urandom;
      cycle($urandom_range(0, 1) ? 6'h09 : 6'h0D, 32'h3000_0000 | 32'(i * 4), w, v, rd, ok);
      checks++;
      if (!ok) failures++;
      else if (w) rf[i] = v;
      else if (rd != rf[i]) begin failures++; $display("rd %0d %h %h", i, rd, rf[i]); end
    end
    cycle(6'h09, 32'h3100_0000, 1'b0, 0, rd, ok); checks++; if (ok) failures++;           // other base
    // block transfer write then read of 16 words
    am = 6'h0B; a = 30'h0C00_0040; #20 as_n = 0;                                          // 0x30000100
    for (int k = 0; k < 16; k++) begin
      logic [31:0] v = $urandom; strobe(1'b1, v, rd, ok); rf[64 + k] = v; checks++; if (!ok) failures++;
    end
    #10 as_n = 1; #40;
    am = 6'h0F; a = 30'h0C00_0040; #20 as_n = 0;
    for (int k = 0; k < 16; k++) begin
      strobe(1'b0, 0, rd, ok); checks++; if (!ok || rd != rf[64 + k]) failures++;
    end
    #10 as_n = 1; #40;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
