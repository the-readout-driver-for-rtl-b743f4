// rod_top: one TileCal Read-Out Driver motherboard with its Transition
// Module buffers, in the TileCal configuration: 8 G-Link inputs (one per
// superdrawer), 4 Staging FPGAs, 2 Processing Units in slots 1 and 3, 2
// Output Controllers, 2 Transition Module FIFOs, the TTC FPGA and the VME and
// Busy FPGA.
// Dataflow: G-Link k -> Staging FPGA k/2. In Staging Mode Staging FPGA 1
// (index 0) forwards its own two links and the two links of Staging FPGA 2
// to PU 0, likewise Staging 3 and 4 to PU 1, so each PU reads four
// superdrawers. Each PU half (Input FPGA + DSP core) handles two of them and
// writes its part of the ROD fragment into its output FIFO; Output
// Controller i joins the two FIFOs of PU i into one fragment and sends it to
// the serializer towards the Transition Module, whose FIFO feeds the S-Link
// card and returns XOFF. The TTC FPGA feeds every PU with the TTC word of each
// event; the PU busy flags are ORed in the VME FPGA into the ROD busy.
// The VME FPGA's local serial bus reaches the devices with these device
// numbers: Staging 0-3, PU 4-5, Output Controller 6-7, TTC FPGA 8.
// Parts that are not logic or not designed here are outside this module and
// appear as ports: G-Link deserialisers (their parallel outputs and control
// pins), temperature ADCs, TTCrx outputs, the clock buffer select, the
// serializer/deserializer pair between motherboard and Transition Module,
// S-Link link source cards, SDRAMs, the VME backplane and the JTAG chain.
// Clocks: clk is the ROD clock (selected TTC or local source) for every
// device; 80 MHz is intended, the PU output FIFO read rate, and the 40 MHz
// rates (bunch crossings, 32-bit output words) appear as one strobe or one
// word every two clocks. glink_clk are the recovered G-Link clocks, crossed
// in the Staging FPGAs; clk_local and ttc_clk are the two clock sources
// watched by the TTC FPGA. rst_n is asynchronous.
// Note for lint: the Transition Module buffer's overflow counter (tm_ovf) is
// left unconnected; XOFF keeps the buffer from overflowing, and the board has
// no register path from the Transition Module back to VME.
module rod_top
  import rod_pkg::*;
#(
  parameter int NPH      = N_PHASE,
  parameter int OFIFO_AW = 10,
  parameter int TM_AW    = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_local,
  input  logic        ttc_clk,
  // G-Link deserialisers
  input  logic        glink_clk  [8],
  input  logic [15:0] glink_data [8],
  input  logic        glink_dav  [8],
  input  logic        glink_cav  [8],
  output logic        glink_rst_n[8],
  output logic [3:0]  glink_cfg  [8],
  // temperature ADCs, one per Staging FPGA
  output logic        adc_cs_n [4],
  output logic        adc_sclk [4],
  output logic        adc_din  [4],
  input  logic        adc_dout [4],
  // TTCrx
  input  logic        bc_en,
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic [7:0]  ttype,
  input  logic        ttype_valid,
  output logic        use_ttc_clk,
  // VME
  input  logic [4:0]  vme_ga,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:2] vme_a,
  input  logic [31:0] vme_d_in,
  output logic [31:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output logic        vme_irq,
  output logic        rod_busy,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  // serializer (motherboard) and deserializer (Transition Module)
  output logic        ser_valid [2],
  output logic        ser_ctrl  [2],
  output logic [31:0] ser_data  [2],
  input  logic        des_valid [2],
  input  logic        des_ctrl  [2],
  input  logic [31:0] des_data  [2],
  // S-Link link source cards
  output logic [31:0] lsc_ud    [2],
  output logic        lsc_uctrl [2],
  output logic        lsc_uwen  [2],
  input  logic        lsc_lff   [2],
  // SDRAMs for VME read-out
  output logic        sd_we   [2],
  output logic [23:0] sd_addr [2],
  output logic [31:0] sd_data [2]
);
  localparam int N_DEV = 9;

  // ---------------- local serial bus ----------------
  logic       lb_ctl, lb_oe;
  logic [3:0] lb_do, lb_di, lb_m2s;
  logic [3:0] s_do [N_DEV];
  logic       s_oe [N_DEV];
  logic [25:0] s_addr  [N_DEV];
  logic [31:0] s_wdata [N_DEV];
  logic        s_we    [N_DEV];
  logic        s_re    [N_DEV];
  logic [31:0] s_rdata [N_DEV];
  assign lb_m2s = lb_oe ? lb_do : 4'h0;
  always_comb begin
    lb_di = '0;
    for (int i = 0; i < N_DEV; i++) if (s_oe[i]) lb_di |= s_do[i];
  end
  for (genvar i = 0; i < N_DEV; i++) begin : g_lbs
    lbus_slave #(.DEV_ID(5'(i))) u_s (.clk, .rst_n, .lb_ctl, .lb_di(lb_m2s), .lb_do(s_do[i]),
      .lb_oe(s_oe[i]), .reg_addr(s_addr[i]), .reg_wdata(s_wdata[i]), .reg_we(s_we[i]),
      .reg_re(s_re[i]), .reg_rdata(s_rdata[i]));
  end

  // ---------------- Staging FPGAs ----------------
  link_word_t nb_out [4][2];
  logic       nb_ov  [4][2];
  link_word_t st_pu  [4][4];
  logic       st_puv [4][4];
  for (genvar s = 0; s < 4; s++) begin : g_stg
    logic       gclk [2];
    logic [15:0] gdat [2];
    logic       gdav [2], gcav [2], grst [2];
    logic [3:0] gcfg [2];
    for (genvar j = 0; j < 2; j++) begin : g_j
      assign gclk[j] = glink_clk[2*s+j];
      assign gdat[j] = glink_data[2*s+j];
      assign gdav[j] = glink_dav[2*s+j];
      assign gcav[j] = glink_cav[2*s+j];
      assign glink_rst_n[2*s+j] = grst[j];
      assign glink_cfg[2*s+j]   = gcfg[j];
    end
    staging_fpga u_stg (
      .clk, .rst_n, .glink_clk(gclk), .glink_data(gdat), .glink_dav(gdav), .glink_cav(gcav),
      .glink_rst_n(grst), .glink_cfg(gcfg),
      .nb_in(nb_out[s ^ 1]), .nb_in_valid(nb_ov[s ^ 1]), .nb_out(nb_out[s]), .nb_out_valid(nb_ov[s]),
      .pu_out(st_pu[s]), .pu_valid(st_puv[s]),
      .reg_addr(s_addr[s][7:0]), .reg_wdata(s_wdata[s]), .reg_we(s_we[s]), .reg_re(s_re[s]),
      .reg_rdata(s_rdata[s]),
      .adc_cs_n(adc_cs_n[s]), .adc_sclk(adc_sclk[s]), .adc_din(adc_din[s]), .adc_dout(adc_dout[s]));
  end

  // ---------------- TTC FPGA ----------------
  logic ttc_fs, ttc_sd;
  ttc_fpga u_ttc (.clk, .rst_n, .bc_en, .l1a, .bcr, .ecr, .ttype, .ttype_valid,
    .ttc_fs, .ttc_sd, .clk_local, .ttc_clk, .use_ttc_clk,
    .reg_addr(s_addr[8][7:0]), .reg_wdata(s_wdata[8]), .reg_we(s_we[8]), .reg_re(s_re[8]),
    .reg_rdata(s_rdata[8]));

  // ---------------- Processing Units, Output Controllers, TM ----------------
  logic pu_busy [2], pu_irq [2];
  logic xoff [2];
  for (genvar p = 0; p < 2; p++) begin : g_pu
    logic        frd [2];
    logic [16:0] fdat [2];
    logic        femp [2];
    logic [15:0] tm_ovf;
    processing_unit #(.NPH(NPH), .OFIFO_AW(OFIFO_AW)) u_pu (
      .clk, .rst_n, .lw(st_pu[2*p]), .lw_valid(st_puv[2*p]), .ttc_fs, .ttc_sd,
      .reg_addr(s_addr[4+p][23:0]), .reg_wdata(s_wdata[4+p]), .reg_we(s_we[4+p]),
      .reg_re(s_re[4+p]), .reg_rdata(s_rdata[4+p]),
      .ofifo_clk(clk), .ofifo_rst_n(rst_n), .ofifo_rd(frd), .ofifo_data(fdat),
      .ofifo_empty(femp), .busy(pu_busy[p]), .irq(pu_irq[p]));

    output_controller u_oc (
      .clk, .rst_n, .fa_rd(frd[0]), .fa_data(fdat[0]), .fa_empty(femp[0]),
      .fb_rd(frd[1]), .fb_data(fdat[1]), .fb_empty(femp[1]), .xoff(xoff[p]),
      .sl_valid(ser_valid[p]), .sl_ctrl(ser_ctrl[p]), .sl_data(ser_data[p]),
      .sd_we(sd_we[p]), .sd_addr(sd_addr[p]), .sd_data(sd_data[p]),
      .reg_addr(s_addr[6+p][7:0]), .reg_wdata(s_wdata[6+p]), .reg_we(s_we[6+p]), .reg_re(s_re[6+p]),
      .reg_rdata(s_rdata[6+p]));
    tm_buffer #(.AW(TM_AW)) u_tm (
      .clk, .rst_n, .in_valid(des_valid[p]), .in_ctrl(des_ctrl[p]),
      .in_data(des_data[p]), .xoff(xoff[p]), .lsc_ud(lsc_ud[p]), .lsc_uctrl(lsc_uctrl[p]),
      .lsc_uwen(lsc_uwen[p]), .lsc_lff(lsc_lff[p]), .overflow(tm_ovf));
  end

  // ---------------- VME and Busy FPGA ----------------
  vme_fpga u_vme (.clk, .rst_n, .ga(vme_ga), .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .am(vme_am), .a(vme_a), .d_in(vme_d_in), .d_out(vme_d_out),
    .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .busy_in({1'b0, pu_busy[1], 1'b0, pu_busy[0]}), .busy_out(rod_busy),
    .irq_in({6'h0, pu_irq[1], pu_irq[0]}), .irq_out(vme_irq),
    .lb_ctl, .lb_do, .lb_oe, .lb_di, .tck, .tms, .tdi, .tdo);
endmodule
