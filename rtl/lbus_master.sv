// lbus_master: VME FPGA end of the ROD's local serial bus to the motherboard
// devices. The bus has five lines: ctl, driven only by the master, flags the
// command (control/address) phase, and four bidirectional byte lines each
// carry one byte of a 32-bit word, serialised MSB first, so a word takes 8
// clocks. The five lines and the byte-per-line split follow the ROD
// description; the framing is this design's choice:
//   command, 8 clocks with ctl=1: {read[31], device[30:26], address[25:0]}
//   write:   8 clocks with ctl=0, master drives the data word;
//   read:    2 turnaround clocks, then the slave drives the data word for
//            8 clocks.
// Bidirectional lines are split into lb_do/lb_oe (out) and lb_di (in).
// A request (req with rw, dev, addr, wdata) is taken when !busy; done pulses
// at the end with rdata valid for reads. A write takes 17 clocks, a read 19.
module lbus_master (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        rd,
  input  logic [4:0]  dev,
  input  logic [25:0] addr,
  input  logic [31:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [31:0] rdata,
  output logic        lb_ctl,
  output logic [3:0]  lb_do,
  output logic        lb_oe,
  input  logic [3:0]  lb_di
);
  logic [4:0]  t;
  logic        act, isrd;
  logic [31:0] cmd, dat, c_new;
  assign c_new = {rd, dev, addr};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; act <= 1'b0; isrd <= 1'b0; cmd <= '0; dat <= '0; done <= 1'b0; rdata <= '0;
      lb_ctl <= 1'b0; lb_do <= '0; lb_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!act) begin
        lb_ctl <= 1'b0; lb_oe <= 1'b0; lb_do <= '0;
        if (req) begin
          act <= 1'b1; isrd <= rd; t <= '0;
          cmd <= c_new; dat <= wdata;
          lb_ctl <= 1'b1; lb_oe <= 1'b1;
          for (int j = 0; j < 4; j++) lb_do[j] <= c_new[8*j + 7];
        end
      end else begin
        t <= t + 1'b1;
        if (t < 5'd7) begin
          for (int j = 0; j < 4; j++) lb_do[j] <= cmd[8*j + 6 - int'(t)];
        end else if (t == 5'd7) begin
          lb_ctl <= 1'b0;
          if (isrd) begin lb_oe <= 1'b0; lb_do <= '0; end
          else for (int j = 0; j < 4; j++) lb_do[j] <= dat[8*j + 7];
        end else if (!isrd) begin
          if (t < 5'd15) for (int j = 0; j < 4; j++) lb_do[j] <= dat[8*j + 14 - int'(t)];
          else begin lb_oe <= 1'b0; lb_do <= '0; act <= 1'b0; done <= 1'b1; end
        end else begin
          // read: data bits are driven by the slave during t = 10..17
          if (t >= 5'd10 && t <= 5'd17)
            for (int j = 0; j < 4; j++) rdata[8*j + 17 - int'(t)] <= lb_di[j];
          if (t == 5'd17) begin act <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end
  assign busy = act;
endmodule
