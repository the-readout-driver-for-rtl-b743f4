`timescale 1ns/1ps
// tb_dsp_core: one DSP core with a model of the Input FPGA buffer (random
// samples, 64-bit words one clock after the read), TTC words on the two
// serial lines and register/table writes on the host port. Weights:
// a = 1.0 on the central sample, b = 1.0 on sample 4, so E = s3*cal/256 and
// phase = 16*s4/s3; calibration constants and bad channels are random. The
// 16-bit output stream is rebuilt into 32-bit words and checked completely
// (header, reco, raw, DQ, L2 sizes, flags, last bit). A BCID mismatch is
// injected once; output back-pressure is random.
module tb_dsp_core;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_ready = 0, in_rd_en, in_rd_feb, in_release, active;
  logic [6:0] in_rd_word;
  logic [63:0] in_rd_data = 0;
  logic m0_load = 0, m1_load = 0, m0_busy, m1_busy, mcbsp0_fs, mcbsp0_sd, mcbsp1_fs, mcbsp1_sd;
  logic [43:0] m0_data = 0; logic [7:0] m1_data = 0;
  logic [19:0] hpi_addr = 0; logic [15:0] hpi_wdata = 0, hpi_rdata; logic hpi_we = 0, hpi_re = 0;
  logic fifo_we, fifo_full = 0; logic [16:0] fifo_wdata;
  serial_tx #(.W(44)) u_t0 (.clk, .rst_n, .load(m0_load), .data(m0_data), .busy(m0_busy), .fs(mcbsp0_fs), .sd(mcbsp0_sd));
  serial_tx #(.W(8))  u_t1 (.clk, .rst_n, .load(m1_load), .data(m1_data), .busy(m1_busy), .fs(mcbsp1_fs), .sd(mcbsp1_sd));
  dsp_core #(.NPH(N_PHASE)) dut (.*);
  initial begin #50_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // Input FPGA buffer model: current event
  logic [9:0]  smp [2][48][7];
  logic [11:0] fe_bcid; logic [15:0] fe_evid;
  always @(posedge clk) if (in_rd_en) begin
    automatic int f = in_rd_feb, w = in_rd_word;
    if (w == 0) in_rd_data <= {11'h0, 5'h0, fe_evid, 4'h0, fe_bcid, 16'd48};
    else if (w % 2 == 1) in_rd_data <= {6'h1, smp[f][(w-1)/2][3], 6'h1, smp[f][(w-1)/2][2], 6'h1, smp[f][(w-1)/2][1], 6'h1, smp[f][(w-1)/2][0]};
    else in_rd_data <= {16'h0, 6'h1, smp[f][(w-2)/2][6], 6'h1, smp[f][(w-2)/2][5], 6'h1, smp[f][(w-2)/2][4]};
  end
  int n_release = 0;
  always @(posedge clk) if (in_release) begin n_release++; in_ready <= 0; end
  always @(negedge clk) fifo_full = ($urandom_range(0, 9) < 2);

  // output stream -> 32-bit words -> event
  logic [31:0] ev_w [$]; logic [15:0] hi_h; bit have_hi = 0; int n_events = 0;
  logic [15:0] cal [96]; logic [95:0] badm;
  bit mode_raw, mode_l2; int cur_bcid, cur_ev; bit bcid_bad;
  int n_stall = 0;
  always @(posedge clk) if (fifo_full && !dut.oq_empty) n_stall++;
  task automatic check_event();
    int i, n; n = ev_w.size();
    checks++;
    if (n < 9 || ev_w[0] != ROD_HDR_MARKER || ev_w[5] != 32'(cur_ev) || ev_w[6] != 32'(cur_bcid) ||
        ev_w[7] != 32'(cur_ev % 256) || ev_w[3] != 32'h00AB_00CD || ev_w[4] != 32'h0000_0042) begin
      failures++; $display("header ev%0d n=%0d", cur_ev, n); return;
    end
    i = 9;
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (ev_w[i] != SUB_MARKER || ev_w[i+1] != 32'd51 || ev_w[i+2] != {SUB_RECO, 16'(10 + f)}) begin failures++; $display("reco hdr %h %h %h", ev_w[i], ev_w[i+1], ev_w[i+2]); return; end
      for (int c = 0; c < 48; c++) begin
        logic [31:0] w0; int e, ph, s3, s4;
        w0 = ev_w[i + 3 + c];
        s3 = smp[f][c][3]; s4 = smp[f][c][4];
        e = (s3 * cal[48*f + c]) >>> 8; if (e > 32767) e = 32767;
        ph = (s4 * 16) / s3;
        checks += 3;
        if (w0[31:16] != 16'(e)) begin failures++; if (failures < 10) $display("E f%0d c%0d %0d exp %0d", f, c, w0[31:16], e); end
        ph = ph >>> 3; if (ph > 127) ph = 127; if (ph < -128) ph = -128;   // 1/2 ns units
        if (int'(signed'(w0[15:8])) - ph > 1 || ph - int'(signed'(w0[15:8])) > 1) begin failures++; if (failures < 10) $display("phase %0d exp %0d", signed'(w0[15:8]), ph); end
        if (w0[1:0] != {badm[48*f + c], 1'b1}) begin failures++; $display("flags f%0d c%0d %h", f, c, w0); end
      end
      i += 51;
      if (mode_raw) begin
        checks += 2;
        if (ev_w[i] != SUB_MARKER || ev_w[i+1] != 32'(3 + 4*48) || ev_w[i+2] != {SUB_RAW, 16'(10 + f)}) failures++;
        if (ev_w[i + 3 + 4*7 + 1][9:0] != smp[f][7][0] || ev_w[i + 3 + 4*7 + 2][9:0] != smp[f][7][6]) failures++;
        i += 3 + 4*48;
      end
      checks++;
      if (ev_w[i] != SUB_MARKER || ev_w[i+1] != 32'd4 || ev_w[i+2] != {SUB_DQ, 16'(10 + f)} ||
          ev_w[i+3] != {11'h0, 1'b0, bcid_bad, 3'b0, 4'h0, fe_bcid}) begin failures++; $display("dq %h", ev_w[i+3]); end
      i += 4;
    end
    if (mode_l2) begin
      checks++;
      if (ev_w[i] != SUB_MARKER || ev_w[i+1] != 32'd11 || ev_w[i+2] != {SUB_L2, 16'd10}) failures++;
      i += 11;
    end
    checks++;
    if (i != n) begin failures++; $display("event length %0d exp %0d", n, i); end
  endtask
  always @(posedge clk) if (fifo_we && !fifo_full) begin
    if (!have_hi) begin hi_h = fifo_wdata[15:0]; have_hi = 1; checks++; if (fifo_wdata[16]) failures++; end
    else begin
      ev_w.push_back({hi_h, fifo_wdata[15:0]}); have_hi = 0;
      if (fifo_wdata[16]) begin check_event(); ev_w.delete(); n_events++; end
    end
  end

  task automatic hw(input int region, input int off, input int v);
    @(negedge clk); hpi_we = 1; hpi_addr = 20'((region << 16) | off); hpi_wdata = 16'(v);
    @(negedge clk); hpi_we = 0;
  endtask
  task automatic hr(input int region, input int off, output logic [15:0] v);
    @(negedge clk); hpi_re = 1; hpi_addr = 20'((region << 16) | off); @(negedge clk); hpi_re = 0; v = hpi_rdata;
  endtask
  task automatic run_event(input int ev, input bit bad_bc);
    int tb_bc;
    cur_ev = ev; cur_bcid = (ev * 13) % 4096; bcid_bad = bad_bc;
    fe_bcid = 12'(bad_bc ? cur_bcid + 1 : cur_bcid); fe_evid = 16'(ev);
    for (int f = 0; f < 2; f++) for (int c = 0; c < 48; c++) for (int i = 0; i < 7; i++)
      smp[f][c][i] = 10'($urandom_range(1, 1000));
    @(negedge clk); m0_load = 1; m0_data = {12'(cur_bcid), 32'(ev)}; m1_load = 1; m1_data = 8'(ev % 256);
    @(negedge clk); m0_load = 0; m1_load = 0;
    repeat (60) @(negedge clk);
    in_ready = 1;
    while (in_ready) @(negedge clk);
    while (active) @(negedge clk);
    repeat (100) @(negedge clk);
  endtask
  initial begin
    logic [15:0] v;
    repeat (3) @(negedge clk); rst_n = 1;
    // weights: every phase row, both gains: a3 = 1.0, b4 = 1.0 (host writes for gain 1 on 151 phases)
    for (int ph = 0; ph < N_PHASE; ph++) begin
      hw(0, {1'b1, 8'(ph), 3'(K_A), 3'(3)}, 1024);
      hw(0, {1'b1, 8'(ph), 3'(K_B), 3'(4)}, 1024);
      for (int k = 0; k < N_KIND; k++) for (int i = 0; i < N_SAMP; i++)
        if (!((k == K_A && i == 3) || (k == K_B && i == 4))) hw(0, {1'b1, 8'(ph), 3'(k), 3'(i)}, 0);
    end
    for (int c = 0; c < 96; c++) begin cal[c] = 16'($urandom_range(64, 1024)); hw(1, c, cal[c]); end
    badm = '0; badm[5] = 1; badm[60] = 1;
    for (int r = 0; r < 6; r++) hw(2, 16 + r, badm[16*r +: 16]);
    hw(2, 1, 16'h00CD); hw(2, 2, 16'h00AB); hw(2, 3, 16'h0042); hw(2, 4, 0); hw(2, 12, 10);
    hr(1, 7, v); checks++; if (v != cal[7]) failures++;
    mode_raw = 0; mode_l2 = 0; hw(2, 0, 16'h0002);
    for (int e = 0; e < 3; e++) run_event(e, e == 1);
    mode_raw = 1; mode_l2 = 1; hw(2, 0, 16'h001E);
    for (int e = 3; e < 6; e++) run_event(e, 0);
    hr(2, 32, v); checks++; if (v != 16'd6) begin failures++; $display("ev_done %0d", v); end
    hr(2, 33, v); checks++; if (v != 16'd2) begin failures++; $display("sync_err %0d", v); end
    checks += 3;
    if (n_events != 6) begin failures++; $display("events %0d", n_events); end
    if (n_release != 6) failures++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
