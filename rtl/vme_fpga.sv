// vme_fpga: the VME and Busy FPGA, link between the ROD controller (VME) and
// the motherboard devices. It holds the VME64x slave, the busy logic with its
// monitoring and the interrupt collection, the JTAG master and the local
// serial bus master that reaches the Staging, Output Controller, TTC and PU
// devices. The set of functions follows the ROD description; the A32 map is
// this design's choice (byte offsets inside the board's 16 MB window):
//   0x000-0x0FF busy_logic registers (offset/4)
//   0x100 local bus address {autoinc[31], device[30:26], address[25:0]}
//   0x104 local bus data: a write or read here runs one local bus transfer
//         (DTACK when it is done); with autoinc the address then advances by 1
//   0x200-0x20F jtag_master registers (offset/4)
// irq_out is the interrupt request towards the controller (an open-drain IRQ
// line on the backplane in the board).
module vme_fpga (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [31:2] a,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  input  logic [3:0]  busy_in,
  output logic        busy_out,
  input  logic [7:0]  irq_in,
  output logic        irq_out,
  output logic        lb_ctl,
  output logic [3:0]  lb_do,
  output logic        lb_oe,
  input  logic [3:0]  lb_di,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);
  logic [23:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        bus_we, bus_re, bus_ack;
  vme_slave u_vme (.clk, .rst_n, .ga, .as_n, .ds_n, .write_n, .am, .a, .d_in, .d_out, .d_oe,
    .dtack_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .bus_ack);

  logic sel_busy, sel_lba, sel_lbd, sel_jtag;
  assign sel_busy = bus_addr[23:8] == 16'h0000;
  assign sel_lba  = bus_addr == 24'h000100;
  assign sel_lbd  = bus_addr == 24'h000104;
  assign sel_jtag = bus_addr[23:4] == 20'h00020;

  logic [31:0] busy_rd, jtag_rd;
  busy_logic #(.N_BUSY(4), .N_IRQ(8)) u_busy (.clk, .rst_n, .busy_in, .busy_out, .irq_in, .irq_out,
    .reg_addr({2'b0, bus_addr[7:2]}), .reg_wdata(bus_wdata), .reg_we(bus_we && sel_busy),
    .reg_re(bus_re && sel_busy), .reg_rdata(busy_rd));
  jtag_master u_jtag (.clk, .rst_n, .tck, .tms, .tdi, .tdo,
    .reg_addr({6'b0, bus_addr[3:2]}), .reg_wdata(bus_wdata), .reg_we(bus_we && sel_jtag),
    .reg_re(bus_re && sel_jtag), .reg_rdata(jtag_rd));

  logic [31:0] lb_addr;
  logic        lb_req, lb_busy, lb_done;
  logic [31:0] lb_rdata;
  assign lb_req = (bus_we || bus_re) && sel_lbd;
  lbus_master u_lb (.clk, .rst_n, .req(lb_req), .rd(bus_re), .dev(lb_addr[30:26]),
    .addr(lb_addr[25:0]), .wdata(bus_wdata), .busy(lb_busy), .done(lb_done), .rdata(lb_rdata),
    .lb_ctl, .lb_do, .lb_oe, .lb_di);

  typedef enum logic [1:0] {B_NONE, B_BUSY, B_JTAG, B_LBA} src_t;
  src_t  src;
  logic  ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin lb_addr <= '0; ack_q <= 1'b0; src <= B_NONE; end
    else begin
      ack_q <= (bus_we || bus_re) && !sel_lbd;
      if (bus_we || bus_re)
        src <= sel_busy ? B_BUSY : sel_jtag ? B_JTAG : sel_lba ? B_LBA : B_NONE;
      if (bus_we && sel_lba) lb_addr <= bus_wdata;
      if (lb_done && lb_addr[31]) lb_addr[25:0] <= lb_addr[25:0] + 1'b1;
    end
  end
  assign bus_ack = ack_q || lb_done;
  always_comb begin
    if (lb_done) bus_rdata = lb_rdata;
    else unique case (src)
      B_BUSY:  bus_rdata = busy_rd;
      B_JTAG:  bus_rdata = jtag_rd;
      B_LBA:   bus_rdata = lb_addr;
      default: bus_rdata = 32'h0;
    endcase
  end
endmodule
