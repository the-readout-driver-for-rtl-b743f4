`timescale 1ns/1ps
// tb_rod_top: end-to-end test of the whole ROD at its default (full) size:
// 8 front-end models behind the G-Link inputs, a TTC source, a VME master,
// the serializer/deserializer looped back, two S-Link sinks, four ADC models
// and an SDRAM sink. All configuration goes over VME -> local bus -> device
// registers; only the large OF weight tables and calibration constants are
// preloaded through hierarchical references to save simulation time.
// Weights are phase independent: a = 1.0 on the central sample, b = 0,
// c = 1.0 on sample 0, g = the pulse shape. So each channel's energy (with
// calibration 1.0) equals its central sample and the phase is 0, which the
// checker compares for every channel of every fragment.
// Phases: A fixed OF mode plus one event with a bad front-end CRC;
// B iterative OF + raw data + Level 2 + histograms; C SDRAM mode on the
// second Output Controller; D S-Link back-pressure (LFF held) with 100 kHz
// triggers held off by the ROD busy; E interrupt, temperature read-back, TTC clock
// loss and JTAG loopback. Every mechanism has a counter that must be
// non-zero at the end. Also checks the DSP time per event in fixed mode
// against the 800-clock budget (10 us at 80 MHz).
module tb_rod_top;
  import rod_pkg::*;
  import tb_fe_pkg::*;

  logic clk = 0, rst_n = 1, clk_local = 0, ttc_clk = 0, ttc_run = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #6.25 clk = ~clk;
  always #12.5 clk_local = ~clk_local;
  always #12.45 if (ttc_run) ttc_clk = ~ttc_clk;

  logic        glink_clk [8];
  logic [15:0] glink_data [8];
  logic        glink_dav [8], glink_cav [8], glink_rst_n [8];
  logic [3:0]  glink_cfg [8];
  logic        adc_cs_n [4], adc_sclk [4], adc_din [4], adc_dout [4];
  logic        bc_en = 0, l1a = 0, bcr = 0, ecr = 0, ttype_valid = 0, use_ttc_clk;
  logic [7:0]  ttype = 0;
  logic [4:0]  vme_ga = 5'd3;
  logic        vme_as_n = 1, vme_write_n = 1, vme_d_oe, vme_dtack_n, vme_irq, rod_busy;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = 0;
  logic [31:2] vme_a = 0;
  logic [31:0] vme_d_in = 0, vme_d_out;
  logic        tck, tms, tdi, tdo;
  logic        ser_valid [2], ser_ctrl [2], des_valid [2], des_ctrl [2];
  logic [31:0] ser_data [2], des_data [2];
  logic [31:0] lsc_ud [2];
  logic        lsc_uctrl [2], lsc_uwen [2], lsc_lff [2];
  logic        sd_we [2];
  logic [23:0] sd_addr [2];
  logic [31:0] sd_data [2];

  rod_top dut (.*);

  int checks = 0, failures = 0;
  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %0t %s", $time, s);
  endtask

  // ---------------- clocks, front ends, link loopback, ADCs ----------------
  logic fe_trig = 0;
  logic [11:0] fe_bcid = 0;
  logic [15:0] fe_evid = 0;
  int fe_ev = 0;
  logic fe_bad [8];
  for (genvar i = 0; i < 8; i++) begin : g_fe
    logic gc = 0;
    always #(12.3 + 0.04 * i) gc = ~gc;
    assign glink_clk[i] = gc;
    fe_model #(.LINK(i)) u_fe (.glink_clk(gc), .trig(fe_trig), .bcid(fe_bcid), .evid(fe_evid),
      .ev(fe_ev), .bad_crc(fe_bad[i]), .glink_data(glink_data[i]), .glink_dav(glink_dav[i]),
      .glink_cav(glink_cav[i]));
  end
  logic [11:0] adc_val [16];
  initial for (int i = 0; i < 16; i++) adc_val[i] = 12'(100 + 7 * i);
  for (genvar s = 0; s < 4; s++) begin : g_adc
    logic fe_end;
    adc_model u_adc (.cs_n(adc_cs_n[s]), .sclk(adc_sclk[s]), .din(adc_din[s]), .dout(adc_dout[s]),
      .val(adc_val), .frame_end(fe_end));
  end
  always_comb for (int p = 0; p < 2; p++) begin
    des_valid[p] = ser_valid[p]; des_ctrl[p] = ser_ctrl[p]; des_data[p] = ser_data[p];
  end
  assign tdo = tdi;                 // JTAG chain replaced by a wire

  // ---------------- OF weights and calibration preload ----------------
  for (genvar p = 0; p < 2; p++) begin : g_bd
    for (genvar h = 0; h < 2; h++) begin : g_h
      initial begin
        logic [N_KIND*N_SAMP*W_W-1:0] row;
        row = '0;
        row[(K_A * N_SAMP + C_SAMP) * W_W +: W_W] = 16'd1024;
        row[(K_C * N_SAMP + 0) * W_W +: W_W] = 16'd1024;
        for (int i = 0; i < N_SAMP; i++) row[(K_G * N_SAMP + i) * W_W +: W_W] = 16'(FE_SHAPE[i] * 4);
        for (int r = 0; r < 2 * N_PHASE; r++) dut.g_pu[p].u_pu.g_half[h].u_dsp.u_of.wmem[r] = row;
        for (int c = 0; c < 2 * N_CH; c++) dut.g_pu[p].u_pu.g_half[h].u_dsp.cal[c] = 16'd256;
      end
    end
  end

  // ---------------- mechanism counters (probes) ----------------
  int n_iter = 0, n_fixed = 0, n_xoff = 0, n_busy = 0, n_dsp_stall = 0, n_irq = 0;
  int n_fallback = 0, n_throttle = 0;
  int act_len = 0, act_max_fixed = 0;
  logic use_q = 0;
  always @(posedge clk) begin
    if (dut.xoff[0] || dut.xoff[1]) n_xoff++;
    if (rod_busy) n_busy++;
    if (vme_irq) n_irq++;
    use_q <= use_ttc_clk;
    if (use_q && !use_ttc_clk) n_fallback++;
  end
  for (genvar p = 0; p < 2; p++) begin : g_pr
    for (genvar h = 0; h < 2; h++) begin : g_h
      always @(posedge clk) begin
        if (dut.g_pu[p].u_pu.g_half[h].u_dsp.of_valid) begin
          if (dut.g_pu[p].u_pu.g_half[h].u_dsp.iterative) n_iter++; else n_fixed++;
        end
        if (dut.g_pu[p].u_pu.g_half[h].u_dsp.fifo_full) n_dsp_stall++;
      end
    end
  end
  // DSP time per event of PU0/DSP0 while running the fixed mode without back-pressure
  logic meas = 0;
  always @(posedge clk) begin
    if (dut.g_pu[0].u_pu.g_half[0].u_dsp.active) act_len++;
    else begin
      if (meas && act_len > act_max_fixed) act_max_fixed = act_len;
      act_len = 0;
    end
  end

  // ---------------- trigger source and expected events ----------------
  int bc = 0, evn = 0;
  int exp_bcid [int], exp_ttype [int];
  logic [7:0] exp_bad [int];
  always @(negedge clk) bc_en = rst_n && !bc_en;          // 40 MHz bunch clock enable
  always @(posedge clk) if (rst_n && bc_en) bc = (bc + 1) % 4096;
  task automatic trigger(input logic [7:0] bad);
    @(negedge clk);
    l1a = 1;
    exp_bcid[evn] = bc; exp_ttype[evn] = (evn * 37 + 5) % 256; exp_bad[evn] = bad;
    fe_bcid = 12'(bc); fe_evid = 16'(evn); fe_ev = evn;
    for (int i = 0; i < 8; i++) fe_bad[i] = bad[i];
    fe_trig = 1;
    @(negedge clk); l1a = 0; fe_trig = 0;
    repeat (3) @(negedge clk);
    ttype = 8'(exp_ttype[evn]); ttype_valid = 1;
    @(negedge clk); ttype_valid = 0;
    evn++;
  endtask

  // ---------------- fragment checker ----------------
  int n_frag [2] = '{0, 0};
  int n_sd_frag = 0, n_reco = 0, n_raw = 0, n_dq = 0, n_l2 = 0, n_crc_seen = 0;
  logic [31:0] src_exp [2] = '{32'h0051_0000, 32'h0051_0001};
  task automatic check_frag(input int p, input logic [31:0] f [$]);
    int n, ev, i, nreco;
    n = f.size();
    checks++;
    if (n < 13 || f[0] != ROD_HDR_MARKER || f[1] != 32'd9 || f[2] != FORMAT_VERSION) begin
      fail($sformatf("PU%0d bad header n=%0d %h", p, n, n ? f[0] : 0)); return;
    end
    ev = int'(f[5]);
    checks++;
    if (!exp_bcid.exists(ev)) begin fail($sformatf("unknown event %0d", ev)); return; end
    checks += 4;
    if (f[6] != 32'(exp_bcid[ev])) fail($sformatf("bcid ev%0d %h %h", ev, f[6], exp_bcid[ev]));
    if (f[7] != 32'(exp_ttype[ev])) fail("ttype");
    if (f[3] != src_exp[p]) fail("source id");
    if (f[4] != 32'h0007_1234) fail("run number");
    i = 9; nreco = 0;
    while (i + 3 < n && f[i] == SUB_MARKER) begin
      int sz, feb; logic [15:0] typ;
      sz = int'(f[i+1]); typ = f[i+2][31:16]; feb = int'(f[i+2][15:0]);
      checks++;
      if (feb / 4 != p && typ != SUB_L2) fail($sformatf("feb %0d in PU%0d", feb, p));
      if (typ == SUB_RECO) begin
        n_reco++; nreco++;
        checks++;
        if (sz != 3 + N_CH) fail("reco size");
        for (int c = 0; c < N_CH; c++) begin
          logic [31:0] w0;
          w0 = f[i + 3 + c];
          checks += 3;
          if (w0[31:16] != 16'(fe_samp(feb, ev, c, C_SAMP)))
            fail($sformatf("E ev%0d feb%0d ch%0d %0d exp %0d", ev, feb, c, w0[31:16], fe_samp(feb, ev, c, C_SAMP)));
          if (w0[15:8] != 8'h0) fail($sformatf("phase ev%0d ch%0d %h", ev, c, w0[15:8]));
          if (w0[1:0] != 2'b01) fail($sformatf("flags %h", w0));
        end
      end else if (typ == SUB_RAW) begin
        n_raw++;
        checks += 2;
        if (sz != 3 + 4 * N_CH) fail("raw size");
        // channel 5: W0 = {s3,s2,s1,s0} as two 32-bit words, high half first
        if (f[i + 3 + 4*5][25:16] != 10'(fe_samp(feb, ev, 5, 3)) || f[i + 4 + 4*5][9:0] != 10'(fe_samp(feb, ev, 5, 0)))
          fail($sformatf("raw ev%0d feb%0d %h %h", ev, feb, f[i + 3 + 4*5], f[i + 4 + 4*5]));
      end else if (typ == SUB_DQ) begin
        n_dq++;
        checks += 2;
        if (f[i+3][20:16] != {4'b0, exp_bad[ev][feb]}) fail($sformatf("dq ev%0d feb%0d %h", ev, feb, f[i+3]));
        if (f[i+3][11:0] != 12'(exp_bcid[ev])) fail("dq bcid");
        if (f[i+3][16]) n_crc_seen++;
      end else if (typ == SUB_L2) begin
        n_l2++;
        checks++;
        if (sz != 11) fail("l2 size");
      end else fail($sformatf("sub type %h", typ));
      if (sz < 4) begin fail("sub size"); return; end
      i += sz;
    end
    checks += 3;
    if (nreco != 4) fail($sformatf("PU%0d ev%0d has %0d reco sub-fragments", p, ev, nreco));
    if (i + 4 != n) fail($sformatf("fragment length %0d, trailer at %0d", n, i));
    else if (f[i+1] != 32'd1 || f[i+2] != 32'(i - 9) || f[i+3] != 32'd1) fail("trailer");
  endtask

  logic [31:0] fw [2][$];
  logic        in_frag [2] = '{0, 0};
  for (genvar p = 0; p < 2; p++) begin : g_sl
    always @(posedge clk) if (lsc_uwen[p]) begin
      if (lsc_uctrl[p]) begin
        if (lsc_ud[p] == SLINK_BOF) begin
          checks++;
          if (in_frag[p]) fail("BOF inside fragment");
          in_frag[p] = 1; fw[p].delete();
        end else if (lsc_ud[p] == SLINK_EOF) begin
          checks++;
          if (!in_frag[p]) fail("EOF outside fragment");
          in_frag[p] = 0; check_frag(p, fw[p]); n_frag[p]++;
        end else fail("unknown control word");
      end else fw[p].push_back(lsc_ud[p]);
    end
  end
  // SDRAM sink of OC 1: consecutive addresses, fragments parsed afterwards
  logic [31:0] sdq [$];
  int sd_next = 0;
  always @(posedge clk) if (sd_we[1]) begin
    checks++;
    if (int'(sd_addr[1]) != sd_next) fail("sdram address");
    sd_next = int'(sd_addr[1]) + 1;
    sdq.push_back(sd_data[1]);
  end
  always @(posedge clk) if (sd_we[0]) fail("OC0 wrote SDRAM");

  // ---------------- VME master ----------------
  task automatic vcycle(input logic [5:0] m, input logic [31:0] ad, input logic w,
                        input logic [31:0] wd, output logic [31:0] rd);
    int t = 0;
    vme_am = m; vme_a = ad[31:2]; vme_write_n = !w; vme_d_in = wd;
    #20 vme_as_n = 0; #20 vme_ds_n = 2'b00;
    while (vme_dtack_n && t < 2000) begin #10; t++; end
    checks++;
    if (vme_dtack_n) fail($sformatf("no DTACK at %h", ad));
    rd = vme_d_out;
    #10 vme_ds_n = 2'b11;
    t = 0; while (!vme_dtack_n && t < 200) begin #10; t++; end
    #10 vme_as_n = 1; #30;
  endtask
  task automatic vw(input logic [23:0] off, input logic [31:0] v);
    logic [31:0] rd; vcycle(6'h09, {8'h55, off}, 1'b1, v, rd);
  endtask
  task automatic vr(input logic [23:0] off, output logic [31:0] rd);
    vcycle(6'h09, {8'h55, off}, 1'b0, 0, rd);
  endtask
  task automatic lw(input int dev, input int addr, input logic [31:0] v);
    vw(24'h100, {1'b0, 5'(dev), 26'(addr)}); vw(24'h104, v);
  endtask
  task automatic lr(input int dev, input int addr, output logic [31:0] v);
    vw(24'h100, {1'b0, 5'(dev), 26'(addr)}); vr(24'h104, v);
  endtask
  // DSP host register: PU p, DSP h, region, offset
  function automatic int dsp_a(int h, int region, int off);
    return ((1 + h) << 22) | (region << 16) | off;
  endfunction
  task automatic set_mode(input bit iter, input bit raw, input bit l2, input bit hist);
    for (int p = 0; p < 2; p++)
      for (int h = 0; h < 2; h++)
        lw(4 + p, dsp_a(h, 2, 0), {27'h0, hist, raw, l2, h == 0, iter});
  endtask
  // wait until DSPs, Input FPGA buffers and S-Link outputs have been idle for 3000 clocks
  task automatic wait_idle(input int max_us);
    int t = 0, quiet = 0;
    while (t < max_us * 80 && quiet < 3000) begin
      @(negedge clk);
      t++;
      if (dut.g_pu[0].u_pu.g_half[0].u_dsp.active || dut.g_pu[0].u_pu.g_half[1].u_dsp.active ||
          dut.g_pu[1].u_pu.g_half[0].u_dsp.active || dut.g_pu[1].u_pu.g_half[1].u_dsp.active ||
          dut.g_pu[0].u_pu.g_half[0].u_in.ev_ready || dut.g_pu[0].u_pu.g_half[1].u_in.ev_ready ||
          dut.g_pu[1].u_pu.g_half[0].u_in.ev_ready || dut.g_pu[1].u_pu.g_half[1].u_in.ev_ready ||
          in_frag[0] || in_frag[1] || lsc_uwen[0] || lsc_uwen[1] || sd_we[1]) quiet = 0;
      else quiet++;
    end
    checks++;
    if (quiet < 3000) fail("ROD did not become idle");
  endtask

  initial begin #20_000_000; fail("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [31:0] d;
    int n_a, n_b, n_c, n_d, sent;
    for (int i = 0; i < 8; i++) fe_bad[i] = 0;
    lsc_lff = '{0, 0};
    #100 rst_n = 1;
    repeat (20) @(negedge clk);
    // ---- configuration ----
    begin logic [31:0] rd; vcycle(6'h2F, {8'h0, 5'd3, 19'h7FF60}, 1'b1, 32'h55, rd); end
    for (int s = 0; s < 4; s++) begin
      lw(s, 8'h01, 32'h0);                                   // G-Links out of reset
      lw(s, 8'h00, (s % 2 == 0) ? (1 | 2 << 3 | 3 << 6 | 4 << 9) : 0);
    end
    lr(0, 8'h00, d); checks++; if (d[11:0] != 12'(1 | 2 << 3 | 3 << 6 | 4 << 9)) fail("route read-back");
    for (int p = 0; p < 2; p++)
      for (int h = 0; h < 2; h++) begin
        lw(4 + p, dsp_a(h, 2, 1), h == 0 ? src_exp[p][15:0] : 32'h0);
        lw(4 + p, dsp_a(h, 2, 2), 32'h0051);
        lw(4 + p, dsp_a(h, 2, 3), 32'h1234);
        lw(4 + p, dsp_a(h, 2, 4), 32'h0007);
        lw(4 + p, dsp_a(h, 2, 12), 4 * p + 2 * h);
        lw(4 + p, dsp_a(h, 2, 6), 32'd50);  lw(4 + p, dsp_a(h, 2, 7), 32'd2000);   // D window
        lw(4 + p, dsp_a(h, 2, 8), 32'd50);  lw(4 + p, dsp_a(h, 2, 9), 32'd4000);   // BC window
        lw(4 + p, dsp_a(h, 2, 10), 32'd50); lw(4 + p, dsp_a(h, 2, 11), 32'd4000);  // A window
      end
    lr(5, dsp_a(1, 2, 12), d); checks++; if (d[15:0] != 16'd6) fail("DSP register read-back");
    lr(4, dsp_a(0, 1, 7), d); checks++; if (d[15:0] != 16'd256) fail("calibration read-back");
    lw(4, dsp_a(0, 0, 0), 32'h0);           // one weight write through the host port (unused sample)
    // ---- phase A: fixed OF mode ----
    set_mode(0, 0, 0, 0);
    meas = 1;
    for (int k = 0; k < 6; k++) begin
      trigger(k == 4 ? 8'b0000_0010 : 8'h0);
      repeat (960 + $urandom_range(0, 200)) @(negedge clk);
    end
    wait_idle(100);
    meas = 0;
    n_a = evn;
    checks += 3;
    if (n_frag[0] != n_a || n_frag[1] != n_a) fail($sformatf("phase A fragments %0d %0d of %0d", n_frag[0], n_frag[1], n_a));
    if (act_max_fixed == 0 || act_max_fixed >= 800) fail($sformatf("DSP time per event %0d clocks", act_max_fixed));
    if (n_crc_seen != 1) fail($sformatf("crc errors seen %0d", n_crc_seen));
    $display("phase A: %0d events, DSP time per event %0d clocks", n_a, act_max_fixed);
    // ---- phase B: iterative OF, raw data, Level 2, histograms ----
    lw(4, dsp_a(0, 2, 13), 32'h1);          // clear histograms of PU0/DSP0
    repeat (6200) @(negedge clk);           // histogram clear takes 96*64 clocks
    set_mode(1, 1, 1, 1);
    for (int k = 0; k < 5; k++) begin
      trigger(8'h0);
      repeat (1400 + $urandom_range(0, 200)) @(negedge clk);
    end
    wait_idle(200);
    n_b = evn - n_a;
    checks++;
    if (n_frag[0] != evn || n_frag[1] != evn) fail($sformatf("phase B fragments %0d %0d of %0d", n_frag[0], n_frag[1], evn));
    // histogram of first samples of channel 0: every event has s0 = pedestal -> bin ped/16
    lr(4, dsp_a(0, 4, {1'b0, 7'd0, 6'(FE_PED / 16)}), d);
    checks++; if (d[15:0] != 16'(n_b)) fail($sformatf("histogram bin %0d exp %0d", d[15:0], n_b));
    // ---- phase C: SDRAM mode on Output Controller 1 ----
    set_mode(0, 0, 0, 0);
    lw(7, 2, 32'h0);
    lw(7, 0, 32'h3);
    for (int k = 0; k < 3; k++) begin
      trigger(8'h0);
      repeat (1000) @(negedge clk);
    end
    wait_idle(100);
    n_c = 3;
    begin
      int i;
      i = 0;
      while (i < sdq.size()) begin
        logic [31:0] f [$]; int j;
        j = i + 9;
        while (j + 1 < sdq.size() && sdq[j] == SUB_MARKER) j += int'(sdq[j+1]);
        if (j + 4 > sdq.size()) begin fail("SDRAM fragment truncated"); break; end
        f = sdq[i : j + 3];
        check_frag(1, f);
        n_sd_frag++;
        i = j + 4;
      end
    end
    checks += 2;
    if (n_sd_frag != n_c) fail($sformatf("SDRAM fragments %0d", n_sd_frag));
    if (n_frag[0] != evn || n_frag[1] != evn - n_c) fail("phase C S-Link fragments");
    lr(7, 1, d); checks++; if (d != 32'(evn)) fail($sformatf("OC1 fragment count %0d", d));
    lw(7, 0, 32'h1);
    // ---- phase D: back-pressure from the S-Link, triggers throttled by busy ----
    lsc_lff[0] = 1;
    sent = 0;
    // 100 kHz trigger (one per 800 clocks), held off while the ROD is busy
    for (int t = 0; t < 120 && n_throttle < 20; t++) begin
      if (rod_busy) begin n_throttle++; repeat (100) @(negedge clk); end
      else begin trigger(8'h0); sent++; repeat (800) @(negedge clk); end
    end
    n_d = sent;
    checks++;
    if (n_throttle == 0) fail("busy never throttled the trigger");
    repeat (2000) @(negedge clk);
    lsc_lff[0] = 0;
    wait_idle(2000);
    checks++;
    if (n_frag[0] != evn || n_frag[1] != evn - n_c) fail($sformatf("phase D fragments %0d %0d of %0d", n_frag[0], n_frag[1], evn));
    // ---- phase E: interrupts, temperatures, TTC counters, clock loss, JTAG ----
    vw(24'h004, 32'h3);                     // enable PU interrupts
    trigger(8'h0);
    wait_idle(100);
    vr(24'h008, d); checks++; if (d[1:0] == 2'b00) fail("no pending interrupt");
    vw(24'h008, 32'hFF); vw(24'h004, 32'h0);
    repeat (10) @(negedge clk);
    checks++; if (vme_irq) fail("interrupt not cleared");
    lr(2, 8'h08, d); checks++; if (d[11:0] != adc_val[0]) fail($sformatf("temperature %h", d));
    lr(8, 8'h03, d); checks++; if (d != 32'(evn)) fail($sformatf("TTC L1A count %0d exp %0d", d, evn));
    for (int i = 0; i < 4; i++) begin
      lr(4 + i / 2, dsp_a(i % 2, 2, 33), d);
      checks++; if (d[15:0] != 0) fail("DSP BCID/EVID mismatch count");
    end
    lr(4, 1, d); checks++; if (d[15:0] != 0) fail("Input FPGA dropped frames");
    vw(24'h204, 32'h0); vw(24'h208, 32'h0000_00C3); vw(24'h200, 32'h107);
    repeat (100) @(negedge clk);
    vr(24'h20C, d); checks++; if (d[7:0] != 8'hC3) fail($sformatf("JTAG loopback %h", d));
    ttc_run = 0; repeat (200) @(negedge clk);
    checks++; if (use_ttc_clk) fail("no fallback to the local clock");
    ttc_run = 1; repeat (400) @(negedge clk);
    checks++; if (!use_ttc_clk) fail("TTC clock not taken back");
    // ---- mechanism summary ----
    $display("mechanisms: fixed=%0d iterative=%0d raw=%0d l2=%0d dq=%0d crc_err=%0d sdram=%0d xoff=%0d dsp_stall=%0d busy=%0d throttle=%0d irq=%0d fallback=%0d frags=%0d/%0d",
             n_fixed, n_iter, n_raw, n_l2, n_dq, n_crc_seen, n_sd_frag, n_xoff, n_dsp_stall, n_busy,
             n_throttle, n_irq, n_fallback, n_frag[0], n_frag[1]);
    checks += 12;
    if (n_fixed == 0) fail("fixed OF never ran");
    if (n_iter == 0) fail("iterative OF never ran");
    if (n_raw == 0) fail("raw mode never happened");
    if (n_l2 == 0) fail("Level 2 never happened");
    if (n_crc_seen == 0) fail("CRC error never flagged");
    if (n_sd_frag == 0) fail("SDRAM mode never happened");
    if (n_xoff == 0) fail("XOFF never happened");
    if (n_dsp_stall == 0) fail("DSP never stalled on a full FIFO");
    if (n_busy == 0) fail("busy never happened");
    if (n_irq == 0) fail("interrupt never happened");
    if (n_fallback == 0) fail("clock fallback never happened");
    if (n_reco == 0) fail("no reconstruction data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
