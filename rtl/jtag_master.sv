// jtag_master: JTAG access from the ROD controller to the boundary-scan chain
// of the ROD FPGAs, so that they can be programmed remotely. The controller
// loads up to 32 TMS and TDI bits and a length, starts the shift, and reads
// the captured TDO bits. TCK runs at clk/2: TMS and TDI change while TCK is
// low and TDO is taken on the rising TCK edge. The purpose follows the ROD
// description; this register-driven shifter is this design's choice.
// Registers (word addresses): 0 write {start[8], length-1[4:0]}, read
// {busy[8]}, 1 TMS bits, 2 TDI bits (bit 0 first), 3 TDO bits (bit 0 first).
module jtag_master (
  input  logic        clk,
  input  logic        rst_n,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata
);
  logic [31:0] vtms, vtdi, vtdo;
  logic [4:0]  len, idx;
  logic        run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vtms <= '0; vtdi <= '0; vtdo <= '0; len <= '0; idx <= '0; run <= 1'b0;
      tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0; reg_rdata <= '0;
    end else begin
      if (reg_we && !run) begin
        case (reg_addr)
          8'd0: if (reg_wdata[8]) begin
            len <= reg_wdata[4:0]; idx <= '0; run <= 1'b1; tck <= 1'b0;
            tms <= vtms[0]; tdi <= vtdi[0];
          end
          8'd1: vtms <= reg_wdata;
          8'd2: vtdi <= reg_wdata;
          default: ;
        endcase
      end
      if (run) begin
        tck <= ~tck;
        if (!tck) vtdo[idx] <= tdo;             // rising edge of TCK
        else begin                              // falling edge: next bit
          if (idx == len) run <= 1'b0;
          else begin
            idx <= idx + 1'b1;
            tms <= vtms[idx + 1'b1]; tdi <= vtdi[idx + 1'b1];
          end
        end
      end
      if (reg_re) begin
        case (reg_addr)
          8'd0: reg_rdata <= {23'h0, run, 8'h0};
          8'd1: reg_rdata <= vtms;
          8'd2: reg_rdata <= vtdi;
          8'd3: reg_rdata <= vtdo;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
