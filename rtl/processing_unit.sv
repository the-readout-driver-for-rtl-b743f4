// processing_unit: the DSP Processing Unit mezzanine. Two identical halves,
// each an Input FPGA fed by two superdrawer links, a DSP processing core and
// an output FIFO, plus the Output FPGA that distributes TTC information,
// configuration and host access. One PU handles four superdrawers
// (192 channels). The structure follows the PU block diagram of the ROD
// description. The output FIFOs are dual-clock: written in the PU clock and
// read by the Output Controller in ofifo_clk (80 MHz in the ROD), 17 bits
// wide ({last, data}). busy is the OR of the two Input FPGA almost-full
// flags; irq pulses when either Input FPGA has a new event.
module processing_unit
  import rod_pkg::*;
#(
  parameter int NPH      = N_PHASE,
  parameter int OFIFO_AW = 10,
  parameter int N_SLOT   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  link_word_t  lw       [4],
  input  logic        lw_valid [4],
  input  logic        ttc_fs,
  input  logic        ttc_sd,
  input  logic [23:0] reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata,
  input  logic        ofifo_clk,
  input  logic        ofifo_rst_n,
  input  logic        ofifo_rd  [2],
  output logic [16:0] ofifo_data[2],
  output logic        ofifo_empty[2],
  output logic        busy,
  output logic        irq
);
  logic m0_fs, m0_sd, m1_fs, m1_sd, cfg_fs, cfg_sd;
  logic [15:0] in_status [2];
  logic [19:0] hpi_addr  [2];
  logic [15:0] hpi_wdata [2];
  logic        hpi_we    [2];
  logic        hpi_re    [2];
  logic [15:0] hpi_rdata [2];
  logic        in_busy [2], in_irq [2];

  out_fpga u_out (
    .clk, .rst_n, .ttc_fs, .ttc_sd,
    .mcbsp0_fs(m0_fs), .mcbsp0_sd(m0_sd), .mcbsp1_fs(m1_fs), .mcbsp1_sd(m1_sd),
    .cfg_fs, .cfg_sd, .in_status, .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata,
    .hpi_addr, .hpi_wdata, .hpi_we, .hpi_re, .hpi_rdata);

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic        ev_ready, rd_en, rd_feb, release_ev;
    logic [6:0]  rd_word;
    logic [63:0] rd_data;
    logic        fwe, ffull, act;
    logic [16:0] fwd;
    link_word_t  lwh [2];
    logic        lvh [2];
    assign lwh[0] = lw[2*h];   assign lwh[1] = lw[2*h+1];
    assign lvh[0] = lw_valid[2*h]; assign lvh[1] = lw_valid[2*h+1];
    input_fpga #(.N_SLOT(N_SLOT)) u_in (
      .clk, .rst_n, .lw(lwh), .lw_valid(lvh), .cfg_fs, .cfg_sd,
      .rd_en, .rd_feb, .rd_word, .rd_data, .ev_ready, .irq(in_irq[h]),
      .release_ev, .busy(in_busy[h]), .status(in_status[h]));
    dsp_core #(.NPH(NPH)) u_dsp (
      .clk, .rst_n, .in_ready(ev_ready), .in_rd_en(rd_en), .in_rd_feb(rd_feb),
      .in_rd_word(rd_word), .in_rd_data(rd_data), .in_release(release_ev),
      .mcbsp0_fs(m0_fs), .mcbsp0_sd(m0_sd), .mcbsp1_fs(m1_fs), .mcbsp1_sd(m1_sd),
      .hpi_addr(hpi_addr[h]), .hpi_wdata(hpi_wdata[h]), .hpi_we(hpi_we[h]), .hpi_re(hpi_re[h]),
      .hpi_rdata(hpi_rdata[h]), .fifo_we(fwe), .fifo_wdata(fwd), .fifo_full(ffull), .active(act));
    async_fifo #(.DW(17), .AW(OFIFO_AW)) u_ofifo (
      .wclk(clk), .wrst_n(rst_n), .wr_en(fwe), .wdata(fwd), .full(ffull),
      .rclk(ofifo_clk), .rrst_n(ofifo_rst_n), .rd_en(ofifo_rd[h]), .rdata(ofifo_data[h]),
      .empty(ofifo_empty[h]));
  end
  assign busy = in_busy[0] || in_busy[1];
  assign irq  = in_irq[0] || in_irq[1];
endmodule
