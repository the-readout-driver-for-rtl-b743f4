// output_controller: Output Controller FPGA. For each event it reads the
// event block of the header DSP from PU FIFO A and then the block of the
// trailer DSP from FIFO B (16 bits each read, a 17th bit marks the last word
// of a block), joins pairs of 16-bit words into 32-bit words (16 bits at
// 80 MHz in, 32 bits at 40 MHz out) and frames the ROD fragment:
//   S-Link mode: BOF control word, fragment, status word, ROD trailer
//                (number of status words, number of data words, status
//                position), EOF control word, on the serializer port;
//   SDRAM mode:  the same fragment without control words, written at
//                consecutive SDRAM addresses for read-out over VME.
// The number of data words excludes the 9-word ROD header written by the
// header DSP. XOFF from the Transition Module stalls the output. Reading the
// PU FIFOs, adding S-Link words and the trailer, the two destinations and the
// control/status registers follow the ROD description; word values and the
// register map are this design's choices:
//   0 ctrl {sdram_mode[1], enable[0]} (reset: S-Link, enabled), 1 fragments
//   sent, 2 SDRAM write pointer (write sets it), 3 data words of the last
//   fragment, 4 status word of the last fragment.
// Status word: bit 0 = a block ended on an odd 16-bit word.
// Timing: one 32-bit word every two clocks while both FIFOs have data.
module output_controller
  import rod_pkg::*;
#(
  parameter int SD_AW = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        fa_rd,
  input  logic [16:0] fa_data,
  input  logic        fa_empty,
  output logic        fb_rd,
  input  logic [16:0] fb_data,
  input  logic        fb_empty,
  input  logic        xoff,
  output logic        sl_valid,
  output logic        sl_ctrl,
  output logic [31:0] sl_data,
  output logic        sd_we,
  output logic [SD_AW-1:0] sd_addr,
  output logic [31:0] sd_data,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata
);
  typedef enum logic [2:0] {O_IDLE, O_BOF, O_HI, O_LO, O_STAT, O_TRL, O_EOF} st_t;
  st_t st;
  logic        enable, sd_mode;
  logic        src;             // 0 FIFO A, 1 FIFO B
  logic [15:0] hi;
  logic [31:0] nwords, nfrag, last_n, last_stat;
  logic [1:0]  tidx;
  logic        odd;
  logic [SD_AW-1:0] sptr;
  logic [16:0] cur;
  logic        cur_empty;
  assign cur       = src ? fb_data  : fa_data;
  assign cur_empty = src ? fb_empty : fa_empty;

  // one output word per clock at most, held off by xoff
  logic        emit, emit_ctrl;
  logic [31:0] emit_d;
  always_comb begin
    emit = 1'b0; emit_ctrl = 1'b0; emit_d = '0; fa_rd = 1'b0; fb_rd = 1'b0;
    unique case (st)
      O_BOF: if (!xoff) begin emit = 1'b1; emit_ctrl = 1'b1; emit_d = SLINK_BOF; end
      O_HI:  if (!cur_empty && (!cur[16] || !xoff)) begin
        if (src) fb_rd = 1'b1; else fa_rd = 1'b1;
        if (cur[16]) begin emit = 1'b1; emit_d = {cur[15:0], 16'h0}; end
      end
      O_LO:  if (!cur_empty && !xoff) begin
        if (src) fb_rd = 1'b1; else fa_rd = 1'b1;
        emit = 1'b1; emit_d = {hi, cur[15:0]};
      end
      O_STAT: if (!xoff) begin emit = 1'b1; emit_d = {31'h0, odd}; end
      O_TRL: if (!xoff) begin
        emit = 1'b1;
        unique case (tidx)
          2'd0: emit_d = 32'd1;
          2'd1: emit_d = nwords - 32'(ROD_HDR_WORDS);
          default: emit_d = 32'd1;
        endcase
      end
      O_EOF: if (!xoff) begin emit = 1'b1; emit_ctrl = 1'b1; emit_d = SLINK_EOF; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= O_IDLE; enable <= 1'b1; sd_mode <= 1'b0; src <= 1'b0; hi <= '0;
      nwords <= '0; nfrag <= '0; last_n <= '0; last_stat <= '0; tidx <= '0; odd <= 1'b0;
      sptr <= '0; sl_valid <= 1'b0; sl_ctrl <= 1'b0; sl_data <= '0;
      sd_we <= 1'b0; sd_addr <= '0; sd_data <= '0; reg_rdata <= '0;
    end else begin
      if (reg_we) begin
        case (reg_addr)
          8'd0: begin enable <= reg_wdata[0]; sd_mode <= reg_wdata[1]; end
          8'd2: sptr <= reg_wdata[SD_AW-1:0];
          default: ;
        endcase
      end
      if (reg_re) begin
        case (reg_addr)
          8'd0: reg_rdata <= {30'h0, sd_mode, enable};
          8'd1: reg_rdata <= nfrag;
          8'd2: reg_rdata <= 32'(sptr);
          8'd3: reg_rdata <= last_n;
          8'd4: reg_rdata <= last_stat;
          default: reg_rdata <= '0;
        endcase
      end
      // output registers
      sl_valid <= 1'b0; sd_we <= 1'b0;
      if (emit) begin
        if (sd_mode) begin
          if (!emit_ctrl) begin
            sd_we <= 1'b1; sd_addr <= sptr; sd_data <= emit_d; sptr <= sptr + 1'b1;
          end
        end else begin
          sl_valid <= 1'b1; sl_ctrl <= emit_ctrl; sl_data <= emit_d;
        end
      end
      unique case (st)
        O_IDLE: if (enable && !fa_empty && !fb_empty) begin
          src <= 1'b0; nwords <= '0; odd <= 1'b0; st <= O_BOF;
        end
        O_BOF: if (!xoff) st <= O_HI;
        O_HI: if (!cur_empty && (!cur[16] || !xoff)) begin
          hi <= cur[15:0];
          if (cur[16]) begin
            // block ended on the high half: pad it with zeros
            odd <= 1'b1; nwords <= nwords + 1'b1;
            if (src) st <= O_STAT; else src <= 1'b1;
          end else st <= O_LO;
        end
        O_LO: if (!cur_empty && !xoff) begin
          nwords <= nwords + 1'b1;
          st <= O_HI;
          if (cur[16]) begin
            if (src) st <= O_STAT;
            else src <= 1'b1;
          end
        end
        O_STAT: if (!xoff) begin st <= O_TRL; tidx <= '0; end
        O_TRL: if (!xoff) begin
          if (tidx == 2'd2) st <= O_EOF; else tidx <= tidx + 1'b1;
        end
        O_EOF: if (!xoff) begin
          st <= O_IDLE; nfrag <= nfrag + 1'b1; last_n <= nwords - 32'(ROD_HDR_WORDS);
          last_stat <= {31'h0, odd};
        end
        default: st <= O_IDLE;
      endcase
    end
  end
endmodule
