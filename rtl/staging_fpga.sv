// staging_fpga: input data distributor of the ROD. It takes two G-Link
// deserialiser outputs (16 bits plus the control flag, in the recovered
// G-Link clocks), moves them into the ROD clock through dual-clock FIFOs
// (clock de-skew), forwards its own two links to the neighbouring Staging
// FPGA, and drives four 16-bit outputs towards its Processing Unit. Each
// output selects one of: own link 0/1, neighbour link 0/1, the internal test
// RAM or nothing, so in Staging Mode one Staging FPGA feeds a PU with four
// superdrawers (two own, two from its neighbour) as in the TileCal dataflow.
// The test RAM (VME writable) can replay a frame to the PU. The FPGA also
// drives the G-Link reset/configuration pins and keeps G-Link temperatures
// through temp_monitor. Routing, test RAM, G-Link control and temperature
// registers follow the ROD description; the register map, the routing codes
// and the test RAM depth are this design's choices:
//   0x00 route: 3 bits per PU output k at [3k+2:3k]
//        (0 off, 1 own0, 2 own1, 3 neighbour0, 4 neighbour1, 5 test RAM)
//   0x01 G-Link control: [1:0] reset (1 = hold in reset), [15:8] config pins
//   0x02 test control: [9:0] length in words, write [16]=1 starts a replay
//   0x03 test RAM address pointer, 0x04 test RAM data (auto-increment)
//   0x06 write: clear temperature max/min
//   0x08+2i {t_max,t_cur} and 0x09+2i t_min of G-Link i
// Register reads return data one cycle after reg_re. Latency from a G-Link
// word to a PU output is the FIFO synchronisation delay (about 4 ROD clocks).
// Notes for lint: rsync is a reset synchroniser (asserted asynchronously,
// released in the G-Link clock) that drives the FIFO's write-side reset, so it
// is meant to feed an asynchronous reset. The de-skew FIFO's full flag is left
// unused because a G-Link cannot be stopped; both sides move one word per
// 40 MHz period, so the FIFO cannot fill. The temperature update strobe and
// the upper bits of reg_wdata are not needed by any register.
// reg_rdata[31:28] is always zero: no register is wider than 28 bits.
module staging_fpga
  import rod_pkg::*;
#(
  parameter int FIFO_AW = 6,
  parameter int TRAM_AW = 10,
  parameter int SCLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // G-Link parallel outputs
  input  logic        glink_clk  [2],
  input  logic [15:0] glink_data [2],
  input  logic        glink_dav  [2],
  input  logic        glink_cav  [2],
  output logic        glink_rst_n [2],
  output logic [3:0]  glink_cfg  [2],
  // neighbour Staging FPGA
  input  link_word_t  nb_in       [2],
  input  logic        nb_in_valid [2],
  output link_word_t  nb_out      [2],
  output logic        nb_out_valid[2],
  // to the Processing Unit
  output link_word_t  pu_out      [4],
  output logic        pu_valid    [4],
  // register access
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata,
  // temperature ADC
  output logic        adc_cs_n,
  output logic        adc_sclk,
  output logic        adc_din,
  input  logic        adc_dout
);
  // ---------------- clock de-skew FIFOs ----------------
  link_word_t own      [2];
  logic       own_valid[2];
  for (genvar i = 0; i < 2; i++) begin : g_link
    logic        empty, full;
    logic [16:0] rdata;
    logic        grst_n;
    // reset of the G-Link side, synchronised to its clock
    logic [1:0]  rsync;
    always_ff @(posedge glink_clk[i] or negedge rst_n)
      if (!rst_n) rsync <= '0; else rsync <= {rsync[0], 1'b1};
    assign grst_n = rsync[1];
    async_fifo #(.DW(17), .AW(FIFO_AW)) u_fifo (
      .wclk(glink_clk[i]), .wrst_n(grst_n), .wr_en(glink_dav[i]),
      .wdata({glink_cav[i], glink_data[i]}), .full(full),
      .rclk(clk), .rrst_n(rst_n), .rd_en(!empty), .rdata(rdata), .empty(empty));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin own[i] <= '0; own_valid[i] <= 1'b0; end
      else begin own[i] <= rdata; own_valid[i] <= !empty; end
    end
    assign nb_out[i] = own[i];
    assign nb_out_valid[i] = own_valid[i];
  end

  // ---------------- registers ----------------
  logic [11:0] route;
  logic [1:0]  glrst;
  logic [7:0]  glcfg;
  logic [TRAM_AW-1:0] tlen, tptr, tidx;
  logic        tplay;
  logic        tclr;
  logic [16:0] tram [2**TRAM_AW];
  link_word_t  tword;
  logic        tvalid;
  logic [11:0] t_cur [2], t_max [2], t_min [2];
  logic        t_update;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      route <= '0; glrst <= 2'b11; glcfg <= '0; tlen <= '0; tptr <= '0;
      tplay <= 1'b0; tidx <= '0; tclr <= 1'b0; tvalid <= 1'b0; tword <= '0;
    end else begin
      tclr <= 1'b0;
      if (reg_we) begin
        case (reg_addr)
          8'h00: route <= reg_wdata[11:0];
          8'h01: begin glrst <= reg_wdata[1:0]; glcfg <= reg_wdata[15:8]; end
          8'h02: begin
            tlen <= reg_wdata[TRAM_AW-1:0];
            if (reg_wdata[16]) begin tplay <= 1'b1; tidx <= '0; end
          end
          8'h03: tptr <= reg_wdata[TRAM_AW-1:0];
          8'h04: tptr <= tptr + 1'b1;
          8'h06: tclr <= 1'b1;
          default: ;
        endcase
      end
      // test RAM replay, one word per clock
      tvalid <= 1'b0;
      if (tplay) begin
        tword  <= tram[tidx];
        tvalid <= 1'b1;
        tidx   <= tidx + 1'b1;
        if (tidx == tlen - 1'b1) tplay <= 1'b0;
      end
    end
  end
  always_ff @(posedge clk) if (reg_we && reg_addr == 8'h04) tram[tptr] <= reg_wdata[16:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_rdata <= '0;
    else if (reg_re) begin
      case (reg_addr)
        8'h00: reg_rdata <= {20'h0, route};
        8'h01: reg_rdata <= {16'h0, glcfg, 6'h0, glrst};
        8'h02: reg_rdata <= {15'h0, tplay, 16'(tlen)};
        8'h03: reg_rdata <= 32'(tptr);
        8'h04: reg_rdata <= {15'h0, tram[tptr]};
        8'h08: reg_rdata <= {4'h0, t_max[0], 4'h0, t_cur[0]};
        8'h09: reg_rdata <= {20'h0, t_min[0]};
        8'h0A: reg_rdata <= {4'h0, t_max[1], 4'h0, t_cur[1]};
        8'h0B: reg_rdata <= {20'h0, t_min[1]};
        default: reg_rdata <= '0;
      endcase
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_glctl
    assign glink_rst_n[i] = ~glrst[i];
    assign glink_cfg[i]   = glcfg[4*i +: 4];
  end

  // ---------------- routing to the PU ----------------
  for (genvar k = 0; k < 4; k++) begin : g_route
    always_comb begin
      unique case (route[3*k +: 3])
        3'd1: begin pu_out[k] = own[0];   pu_valid[k] = own_valid[0];   end
        3'd2: begin pu_out[k] = own[1];   pu_valid[k] = own_valid[1];   end
        3'd3: begin pu_out[k] = nb_in[0]; pu_valid[k] = nb_in_valid[0]; end
        3'd4: begin pu_out[k] = nb_in[1]; pu_valid[k] = nb_in_valid[1]; end
        3'd5: begin pu_out[k] = tword;    pu_valid[k] = tvalid;         end
        default: begin pu_out[k] = '0;    pu_valid[k] = 1'b0;           end
      endcase
    end
  end

  temp_monitor #(.N_SENS(2), .SCLK_DIV(SCLK_DIV)) u_temp (
    .clk, .rst_n, .clr(tclr), .adc_cs_n, .adc_sclk, .adc_din, .adc_dout,
    .t_cur, .t_max, .t_min, .t_update);
endmodule
