// out_fpga: the Output FPGA of a Processing Unit, its control and
// configuration device. It
//   - receives the TTC word of every accepted event {ttype, BCID, EVID} on a
//     serial line from the TTC FPGA and re-sends it to both DSPs on two
//     serial ports: McBSP0 carries {BCID, EVID} (44 bits), McBSP1 the
//     trigger type (8 bits); the lines are shared by the two DSPs;
//   - gives the ROD controller access to the PU: its own registers and the
//     host ports (HPI) of the two DSPs;
//   - sends the Input FPGA configuration (number of samples, gains, mode) on a
//     serial line to both Input FPGAs and reads their status.
// These functions follow the ROD description; the register map is this
// design's choice: reg_addr[23:22] = 0 own registers (0 InFPGA config word,
// write; 1/2 InFPGA 0/1 status; 3 TTC words forwarded; 4 TTC words lost
// because a serial port was still busy), 1 DSP 0 HPI, 2 DSP 1 HPI
// (reg_addr[19:0] is the HPI address, data bits [15:0]).
// The HPI address and write data are these local-bus bits passed straight
// through, with no register in between.
// Reads return data one clock after reg_re. A TTC word leaves on McBSP0/1 one
// clock after it has been received.
module out_fpga
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ttc_fs,
  input  logic        ttc_sd,
  output logic        mcbsp0_fs,
  output logic        mcbsp0_sd,
  output logic        mcbsp1_fs,
  output logic        mcbsp1_sd,
  output logic        cfg_fs,
  output logic        cfg_sd,
  input  logic [15:0] in_status [2],
  input  logic [23:0] reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata,
  output logic [19:0] hpi_addr  [2],
  output logic [15:0] hpi_wdata [2],
  output logic        hpi_we    [2],
  output logic        hpi_re    [2],
  input  logic [15:0] hpi_rdata [2]
);
  logic          t_v;
  logic [TTC_W-1:0] t_d;
  ttc_info_t     ti;
  serial_rx #(.W(TTC_W)) u_ttc (.clk, .rst_n, .fs(ttc_fs), .sd(ttc_sd), .valid(t_v), .data(t_d));
  assign ti = t_d;
  logic b0, b1, bc;
  serial_tx #(.W(BCID_W+EVID_W)) u_m0 (.clk, .rst_n, .load(t_v), .data({ti.bcid, ti.evid}),
    .busy(b0), .fs(mcbsp0_fs), .sd(mcbsp0_sd));
  serial_tx #(.W(TTYPE_W)) u_m1 (.clk, .rst_n, .load(t_v), .data(ti.ttype),
    .busy(b1), .fs(mcbsp1_fs), .sd(mcbsp1_sd));

  logic        cfg_load;
  assign cfg_load = reg_we && reg_addr[23:22] == 2'd0 && reg_addr[7:0] == 8'd0;
  serial_tx #(.W(16)) u_cfg (.clk, .rst_n, .load(cfg_load), .data(reg_wdata[15:0]),
    .busy(bc), .fs(cfg_fs), .sd(cfg_sd));

  logic [31:0] n_fwd, n_lost;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin n_fwd <= '0; n_lost <= '0; end
    else if (t_v) begin
      if (b0 || b1) n_lost <= n_lost + 1'b1;
      else          n_fwd  <= n_fwd + 1'b1;
    end
  end

  for (genvar d = 0; d < 2; d++) begin : g_hpi
    assign hpi_addr[d]  = reg_addr[19:0];
    assign hpi_wdata[d] = reg_wdata[15:0];
    assign hpi_we[d]    = reg_we && reg_addr[23:22] == 2'(d + 1);
    assign hpi_re[d]    = reg_re && reg_addr[23:22] == 2'(d + 1);
  end

  logic [1:0]  rsel;
  logic [31:0] own_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rsel <= '0; own_rd <= '0; end
    else if (reg_re) begin
      rsel <= reg_addr[23:22];
      case (reg_addr[7:0])
        8'd1: own_rd <= 32'(in_status[0]);
        8'd2: own_rd <= 32'(in_status[1]);
        8'd3: own_rd <= n_fwd;
        8'd4: own_rd <= n_lost;
        default: own_rd <= '0;
      endcase
    end
  end
  always_comb begin
    unique case (rsel)
      2'd1: reg_rdata = 32'(hpi_rdata[0]);
      2'd2: reg_rdata = 32'(hpi_rdata[1]);
      default: reg_rdata = own_rd;
    endcase
  end
endmodule
