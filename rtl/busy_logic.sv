// busy_logic: busy and interrupt handling of the VME and Busy FPGA. The busy
// flags of the four Processing Unit slots (each raised when a DSP input
// buffer is almost full) are masked and ORed into the ROD busy that goes to
// the crate's Trigger and Busy Module over the backplane. For monitoring, the
// number of clocks each input and the ROD busy have been asserted is counted.
// Interrupt requests from the motherboard devices are latched as pending,
// masked by an enable register and ORed into one request to the ROD
// controller. The OR of four busy signals, busy monitoring and interrupt
// handling follow the ROD description; masks, counters and the register map
// are this design's choices (word addresses): 0 busy mask (1 = ignore),
// 1 interrupt enable, 2 pending (write 1s to clear), 3 {busy_out[4],
// busy inputs[3:0]}, 4 write: clear counters, 8..11 busy clocks of input i,
// 12 busy clocks of the ROD busy. busy_out is registered (one clock).
module busy_logic #(
  parameter int N_BUSY = 4,
  parameter int N_IRQ  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BUSY-1:0] busy_in,
  output logic              busy_out,
  input  logic [N_IRQ-1:0]  irq_in,
  output logic              irq_out,
  input  logic [7:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  input  logic              reg_we,
  input  logic              reg_re,
  output logic [31:0]       reg_rdata
);
  logic [N_BUSY-1:0] mask;
  logic [N_IRQ-1:0]  en, pend;
  logic [31:0]       cnt [N_BUSY];
  logic [31:0]       cnt_out;
  logic              clr;
  assign clr = reg_we && reg_addr == 8'd4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0; en <= '0; pend <= '0; busy_out <= 1'b0; irq_out <= 1'b0;
      cnt_out <= '0; reg_rdata <= '0;
      for (int i = 0; i < N_BUSY; i++) cnt[i] <= '0;
    end else begin
      busy_out <= |(busy_in & ~mask);
      for (int i = 0; i < N_BUSY; i++)
        if (clr) cnt[i] <= '0; else if (busy_in[i]) cnt[i] <= cnt[i] + 1'b1;
      if (clr) cnt_out <= '0; else if (busy_out) cnt_out <= cnt_out + 1'b1;
      pend <= (pend | irq_in) & ~((reg_we && reg_addr == 8'd2) ? reg_wdata[N_IRQ-1:0] : '0);
      irq_out <= |(pend & en);
      if (reg_we) begin
        if (reg_addr == 8'd0) mask <= reg_wdata[N_BUSY-1:0];
        if (reg_addr == 8'd1) en <= reg_wdata[N_IRQ-1:0];
      end
      if (reg_re) begin
        if (reg_addr >= 8'd8 && reg_addr < 8'(8 + N_BUSY)) reg_rdata <= cnt[($clog2(N_BUSY))'(reg_addr - 8'd8)];
        else case (reg_addr)
          8'd0: reg_rdata <= 32'(mask);
          8'd1: reg_rdata <= 32'(en);
          8'd2: reg_rdata <= 32'(pend);
          8'd3: reg_rdata <= 32'({busy_out, busy_in});
          8'd12: reg_rdata <= cnt_out;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
