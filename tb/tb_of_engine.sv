`timescale 1ns/1ps
// tb_of_engine: self-checking test of of_engine. Fills the whole weight
// table with pseudo-random weights, then reconstructs random pulses in the
// fixed and iterative modes and compares amplitude, pedestal, phase and QF
// with a reference model written here from the Optimal Filtering equations.
// Also checks the latency (4 clocks fixed, 10 clocks iterative).
module tb_of_engine;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, iterative = 0, gain = 0, ready, valid;
  logic [ADC_W-1:0] samp [N_SAMP];
  logic signed [18:0] amp, ped;
  logic signed [15:0] phase;
  logic [15:0] qf;
  logic w_we = 0;
  logic [14:0] w_addr = 0;
  logic signed [15:0] w_data = 0;
  of_engine dut (.*);

  function automatic int wgt(int g, int ph, int k, int i);
    int h;
    h = (g * 7919 + ph * 104729 + k * 1299709 + i * 15485863) ^ 32'h5bd1e995;
    h = h ^ (h >>> 13); h = h * 1540483477; h = h ^ (h >>> 15);
    if (k == K_A) return (h % 700);          // up to ~0.68
    if (k == K_B) return (h % 9000);         // up to ~9 ns per count
    if (k == K_C) return (h % 300);
    if (k == K_G) return (h % 1024);
    return (h % 60);
  endfunction

  function automatic longint fl(longint v, int sh);   // arithmetic shift (floor)
    return v >>> sh;
  endfunction

  typedef struct { longint a, b, p, tq, q; } res_t;
  function automatic res_t model_once(int g, int ph, int s [N_SAMP]);
    res_t r; longint sa = 0, sb = 0, sc = 0, q = 0; logic sat = 0;
    for (int i = 0; i < N_SAMP; i++) begin
      sa += longint'(wgt(g, ph, K_A, i)) * s[i];
      sb += longint'(wgt(g, ph, K_B, i)) * s[i];
      sc += longint'(wgt(g, ph, K_C, i)) * s[i];
    end
    r.a = fl(sa, WFRAC); r.b = fl(sb, WFRAC); r.p = fl(sc, WFRAC);
    if (r.a > 0) begin
      longint num; num = r.b * 16;
      r.tq = num / r.a;                       // truncation toward zero
    end else r.tq = 0;
    for (int i = 0; i < N_SAMP; i++) begin
      longint fit, res;
      fit = r.a * wgt(g, ph, K_G, i) + r.b * wgt(g, ph, K_GD, i);
      res = s[i] - fl(fit, WFRAC) - r.p;
      if (res > 255 || res < -255) sat = 1;
      else if (q < 65536) q += res * res;
    end
    r.q = (sat || q > 65535) ? 65535 : q;
    return r;
  endfunction

  function automatic res_t model(int g, bit it, int s [N_SAMP]);
    int ph, imax; res_t r;
    imax = 0;
    for (int i = 1; i < N_SAMP; i++) if (s[i] > s[imax]) imax = i;
    ph = it ? 75 + 25 * (3 - imax) : 75;
    r = model_once(g, ph, s);
    if (it) for (int k = 2; k <= 3; k++) begin
      longint tn; tn = (r.tq + 8) >>> 4;
      if (tn < -75) ph = 0; else if (tn > 75) ph = 150; else ph = int'(tn) + 75;
      r = model_once(g, ph, s);
    end
    return r;
  endfunction

  task automatic run(bit it, int g, int s [N_SAMP]);
    res_t r; int lat;
    r = model(g, it, s);
    @(negedge clk);
    for (int i = 0; i < N_SAMP; i++) samp[i] = ADC_W'(s[i]);
    iterative = it; gain = g[0]; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!valid) begin @(negedge clk); lat++; end
    checks++;
    if (amp !== 19'(r.a) || ped !== 19'(r.p) || phase !== 16'(r.tq) || qf !== 16'(r.q)) begin
      failures++;
      $display("MISMATCH it=%0d g=%0d amp %0d/%0d ped %0d/%0d ph %0d/%0d qf %0d/%0d", it, g,
               amp, r.a, ped, r.p, phase, r.tq, qf, r.q);
    end
    checks++;
    if (lat != (it ? 10 : 4)) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s [N_SAMP];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int g = 0; g < 2; g++) for (int ph = 0; ph < N_PHASE; ph++)
      for (int k = 0; k < N_KIND; k++) for (int i = 0; i < N_SAMP; i++) begin
        @(negedge clk); w_we = 1; w_addr = {g[0], 8'(ph), 3'(k), 3'(i)}; w_data = 16'(wgt(g, ph, k, i));
      end
    @(negedge clk); w_we = 0;
    for (int n = 0; n < 200; n++) begin
      int pk, ped0;
      ped0 = 40 + $urandom_range(0, 20); pk = $urandom_range(0, 6);
      for (int i = 0; i < N_SAMP; i++)
        s[i] = ped0 + ((i == pk) ? $urandom_range(0, 900) : $urandom_range(0, 200));
      for (int i = 0; i < N_SAMP; i++) if (s[i] > 1023) s[i] = 1023;
      run(n % 3 == 0, n % 2, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
