`timescale 1ns/1ps
// tb_processing_unit: one Processing Unit fed with four superdrawer links
// (front-end frames from tb_fe_pkg), TTC words on its serial input and
// register access on its local-bus side; its two output FIFOs are read in a
// separate, slower clock. Each event must give one block per FIFO: FIFO A
// with the ROD header, and per superdrawer a reconstruction sub-fragment
// whose energies equal the central samples (weights a = 1.0 on the central
// sample, calibration 1.0, preloaded), and a DQ sub-fragment. Also checks
// the DSP register read-back through the OutFPGA, busy (the FIFO readers
// are held off for the first events) and the interrupt.
module tb_processing_unit;
  import rod_pkg::*;
  import tb_fe_pkg::*;
  logic clk = 0, rst_n = 1, oclk = 0;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #6.25 clk = ~clk;
  always #9.1 oclk = ~oclk;
  int checks = 0, failures = 0;
  link_word_t lw [4]; logic lw_valid [4];
  logic t_load = 0, t_busy, ttc_fs, ttc_sd;
  logic [TTC_W-1:0] t_data = 0;
  logic [23:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  logic ofifo_rd [2], ofifo_empty [2], busy, irq;
  logic [16:0] ofifo_data [2];
  serial_tx #(.W(TTC_W)) u_tx (.clk, .rst_n, .load(t_load), .data(t_data), .busy(t_busy), .fs(ttc_fs), .sd(ttc_sd));
  processing_unit dut (.clk, .rst_n, .lw, .lw_valid, .ttc_fs, .ttc_sd, .reg_addr, .reg_wdata, .reg_we,
    .reg_re, .reg_rdata, .ofifo_clk(oclk), .ofifo_rst_n(rst_n), .ofifo_rd, .ofifo_data, .ofifo_empty, .busy, .irq);
  initial begin #20_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  for (genvar h = 0; h < 2; h++) begin : g_bd
    initial begin
      logic [N_KIND*N_SAMP*W_W-1:0] row;
      row = '0;
      row[(K_A * N_SAMP + C_SAMP) * W_W +: W_W] = 16'd1024;
      for (int r = 0; r < 2 * N_PHASE; r++) dut.g_half[h].u_dsp.u_of.wmem[r] = row;
      for (int c = 0; c < 2 * N_CH; c++) dut.g_half[h].u_dsp.cal[c] = 16'd256;
    end
  end
  int n_irq = 0, n_busy = 0;
  always @(posedge clk) begin if (irq) n_irq++; if (busy) n_busy++; end
  // output FIFO readers
  int n_blk [2] = '{0, 0};
  localparam int NEV = 12;
  bit rd_hold = 1;                 // readers held off at first: output back-pressure
  int exp_bc [int];
  for (genvar h = 0; h < 2; h++) begin : g_rd
    logic [31:0] w [$]; logic [15:0] hi; bit have = 0;
    always @(negedge oclk) ofifo_rd[h] = !rd_hold && !ofifo_empty[h] && $urandom_range(0, 3) != 0;
    always @(posedge oclk) if (ofifo_rd[h] && !ofifo_empty[h]) begin
      if (!have) begin hi = ofifo_data[h][15:0]; have = 1; end
      else begin
        w.push_back({hi, ofifo_data[h][15:0]}); have = 0;
        if (ofifo_data[h][16]) begin check_blk(h, w); w.delete(); n_blk[h]++; end
      end
    end
  end
  task automatic check_blk(input int h, input logic [31:0] w [$]);
    int i, ev;
    i = 0; ev = -1;
    if (h == 0) begin
      checks++;
      if (w[0] != ROD_HDR_MARKER || !exp_bc.exists(int'(w[5])) || w[6] != 32'(exp_bc[int'(w[5])])) begin
        failures++; $display("header %h %h %h", w[0], w[5], w[6]); return;
      end
      ev = int'(w[5]); i = 9;
    end else ev = n_blk[1];
    for (int f = 0; f < 2; f++) begin
      int feb; feb = 2 * h + f;
      checks++;
      if (w[i] != SUB_MARKER || w[i+2] != {SUB_RECO, 16'(feb)}) begin failures++; $display("reco h%0d %h", h, w[i+2]); return; end
      for (int c = 0; c < 48; c++) begin
        checks++;
        if (w[i + 3 + c][31:16] != 16'(fe_samp(feb, ev, c, 3))) begin failures++; if (failures < 10) $display("E h%0d f%0d c%0d", h, f, c); end
      end
      i += 51;
      checks++;
      if (w[i] != SUB_MARKER || w[i+2] != {SUB_DQ, 16'(feb)} || w[i+3][20:16] != 5'h0) begin failures++; $display("dq %h", w[i+3]); end
      i += 4;
    end
    checks++; if (i != w.size()) failures++;
  endtask
  task automatic send_link(input int l, input int ev, input int bc);
    logic [15:0] crc, x;
    @(negedge clk);
    x = {4'hA, 12'(bc)}; crc = crc16_word(16'hFFFF, x);
    lw_valid[l] = 1; lw[l] = '{ctrl: 1'b1, data: x}; @(negedge clk);
    x = 16'(ev); crc = crc16_word(crc, x); lw[l] = '{ctrl: 1'b0, data: x}; @(negedge clk);
    for (int c = 0; c < 48; c++) for (int i = 0; i < 7; i++) begin
      x = {5'b0, 1'b1, 10'(fe_samp(l, ev, c, i))}; crc = crc16_word(crc, x);
      lw[l] = '{ctrl: 1'b0, data: x}; @(negedge clk);
    end
    lw[l] = '{ctrl: 1'b0, data: crc}; @(negedge clk);
    lw_valid[l] = 0;
  endtask
  task automatic wr(input int a, input int v);
    @(negedge clk); reg_we = 1; reg_addr = 24'(a); reg_wdata = 32'(v); @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); reg_re = 1; reg_addr = 24'(a); @(negedge clk); reg_re = 0; v = reg_rdata;
  endtask
  initial begin
    logic [31:0] v;
    for (int l = 0; l < 4; l++) begin lw[l] = '0; lw_valid[l] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    wr((1 << 22) | (2 << 16) | 0, 16'h0002);        // DSP0: header DSP, fixed OF
    wr((1 << 22) | (2 << 16) | 12, 0);
    wr((2 << 22) | (2 << 16) | 12, 2);
    rd((2 << 22) | (2 << 16) | 12, v); checks++; if (v[15:0] != 16'd2) failures++;
    // NEV events back to back with the FIFO readers held off, so the output
    // FIFOs and then the input buffers fill and busy rises; like the trigger
    // system, the test then waits while busy and releases the readers
    for (int e = 0; e < NEV; e++) begin
      int bc; bc = (e * 101) % 4096; exp_bc[e] = bc;
      @(negedge clk); while (t_busy) @(negedge clk);
      if (busy) begin rd_hold = 0; while (busy) @(negedge clk); end
      t_load = 1; t_data = {8'(e), 12'(bc), 32'(e)}; @(negedge clk); t_load = 0;
      fork
        send_link(0, e, bc); send_link(1, e, bc); send_link(2, e, bc); send_link(3, e, bc);
      join
      if (!rd_hold) repeat (1500) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    checks += 4;
    if (n_blk[0] != NEV || n_blk[1] != NEV) begin failures++; $display("blocks %0d %0d", n_blk[0], n_blk[1]); end
    if (n_irq == 0) failures++;
    if (n_busy == 0) begin failures++; $display("busy never seen"); end
    rd(1, v); if (v != 0) failures++;                  // no frames dropped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
