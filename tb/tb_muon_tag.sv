`timescale 1ns/1ps
// tb_muon_tag: random cell energies against a reference of the two tagging
// strategies written here from the cell layout (D0 over BC1/A1, Dn over
// BC2n..2n+1 and A2n..2n+1).
module tb_muon_tag;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, valid;
  logic signed [19:0] cell_e [N_CELL];
  logic signed [19:0] thr_lo [3], thr_hi [3];
  logic [N_DCELL-1:0] tag;
  logic [2:0] ntag;
  logic signed [21:0] tag_e [N_DCELL];
  muon_tag dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int n_s1 = 0, n_s2 = 0;
  initial begin
    thr_lo = '{150, 300, 200}; thr_hi = '{600, 1200, 800};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int e [N_CELL]; bit exp [N_DCELL]; int cnt;
      for (int c = 0; c < N_CELL; c++) e[c] = $urandom_range(0, 900) - 100;
      // steer some D cells into the window
      for (int d = 0; d < N_DCELL; d++) if ($urandom_range(0, 1)) e[CELL_D0 + d] = $urandom_range(150, 600);
      for (int c = 0; c < N_CELL; c++) cell_e[c] = 20'(e[c]);
      cnt = 0;
      for (int d = 0; d < N_DCELL; d++) begin
        int ed, eb, ea; bit s1, s2;
        ed = e[CELL_D0 + d];
        eb = (d == 0) ? e[CELL_BC0] : e[CELL_BC0 + 2*d - 1] + e[CELL_BC0 + 2*d];
        ea = (d == 0) ? e[CELL_A0]  : e[CELL_A0 + 2*d - 1] + e[CELL_A0 + 2*d];
        s1 = eb >= 300 && eb <= 1200 && ea >= 200 && ea <= 800;
        s2 = (eb > 1200 && ea >= 200) || (ea > 800 && eb >= 300);
        exp[d] = ed >= 150 && ed <= 600 && (s1 || s2);
        if (exp[d] && s1) n_s1++;
        if (exp[d] && !s1 && s2) n_s2++;
        cnt += exp[d];
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++;
      if (!valid || ntag != 3'(cnt)) failures++;
      for (int d = 0; d < N_DCELL; d++) begin
        checks++;
        if (tag[d] != exp[d]) failures++;
      end
    end
    checks++;
    if (n_s1 == 0 || n_s2 == 0) begin failures++; $display("strategy not exercised %0d %0d", n_s1, n_s2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
