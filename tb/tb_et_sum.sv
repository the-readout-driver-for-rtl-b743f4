`timescale 1ns/1ps
// tb_et_sum: random cell energies and trigonometric tables; Et, Ex, Ey are
// compared with a tower sum computed here; latency N_TOWER+2 is checked.
module tb_et_sum;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, ready, valid;
  logic signed [19:0] cell_e [N_CELL];
  logic lut_we = 0; logic [3:0] lut_addr = 0; logic [15:0] lut_data = 0;
  logic signed [23:0] et, ex, ey;
  et_sum dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int sinth [N_TOWER]; int cph, sph;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int e [N_CELL]; longint acc, tw; int lat;
      if (n % 50 == 0) begin
        for (int t = 0; t < N_TOWER; t++) begin
          sinth[t] = $urandom_range(16000, 32767);
          @(negedge clk); lut_we = 1; lut_addr = 4'(t); lut_data = 16'(sinth[t]);
        end
        cph = $urandom_range(0, 65535) - 32768; sph = $urandom_range(0, 65535) - 32768;
        if (cph == -32768) cph = -32767;
        @(negedge clk); lut_addr = 14; lut_data = 16'(cph);
        @(negedge clk); lut_addr = 15; lut_data = 16'(sph);
        @(negedge clk); lut_we = 0;
      end
      for (int c = 0; c < N_CELL; c++) begin e[c] = $urandom_range(0, 4000) - 500; cell_e[c] = 20'(e[c]); end
      acc = 0;
      for (int t = 0; t < N_TOWER; t++) begin
        tw = e[t];
        if (t < 8) tw += e[CELL_BC0 + t]; else if (t == 8) tw += e[CELL_BC0 + 8];
        if (t == 0) tw += e[CELL_D0];
        else if (t <= 6) tw += e[CELL_D0 + (t + 1) / 2] >>> 1;
        acc += (tw * sinth[t]) >>> 15;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!valid) begin @(negedge clk); lat++; end
      checks += 4;
      if (et != 24'(acc)) failures++;
      if (ex != 24'((acc * cph) >>> 15)) failures++;
      if (ey != 24'((acc * sph) >>> 15)) failures++;
      if (lat != N_TOWER + 2) begin failures++; $display("lat %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
