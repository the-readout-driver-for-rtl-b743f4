// frame_rx: front-end frame receiver for one superdrawer link inside the
// Input FPGA. Frame (this design's layout; the ROD description names the
// contents but not the order): word 0 with the control flag =
// {4'hA, BCID[11:0]}, word 1 = EVID[15:0], then for each of the 48 channels
// NGAIN blocks (low gain first) of NSAMP sample words {5'b0, gain, adc[9:0]},
// then a CRC-16-CCITT (initial value 0xFFFF) over all previous words.
// Checks: CRC, frame length (a new control word or a TIMEOUT-clock gap inside
// a frame ends it with len_err), saturation. With two gains the high gain
// block is kept unless one of its samples is saturated (1023), then the low
// gain block is kept. Output: per channel two 64-bit words
// W0 = {s3,s2,s1,s0}, W1 = {16'h0,s6,s5,s4} at word 1+2*ch, and at the end
// the header word 0 = {11'h0, dq[4:0], evid16, 4'h0, bcid12, 16'd48}.
// done pulses one cycle after the header word is written. Accepts at most one
// link word per clock.
module frame_rx
  import rod_pkg::*;
#(
  parameter int TIMEOUT = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        accept,       // a frame may be started
  input  logic [2:0]  nsamp,        // 1..7
  input  logic        ngain2,
  input  link_word_t  lw,
  input  logic        lw_valid,
  output logic        we,
  output logic [6:0]  waddr,
  output logic [63:0] wdata,
  output logic        done,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_EVID, S_SAMP, S_CRC, S_HDR} st_t;
  st_t st;
  logic [15:0] crc;
  logic [11:0] bcid;
  logic [15:0] evid;
  logic [5:0]  ch;
  logic [2:0]  s;
  logic        g;
  logic [10:0] smp [2][N_SAMP];
  logic        crc_err, len_err, sat;
  logic [$clog2(TIMEOUT+1)-1:0] idle;
  logic        w1_pend;
  logic [63:0] w1_data;
  logic [6:0]  w1_addr;

  // chosen gain block of the channel being completed (includes the word in flight)
  logic [10:0] cur [2][N_SAMP];
  logic        hg_sat;
  logic [10:0] sel [N_SAMP];
  logic        sel_sat;
  always_comb begin
    cur = smp;
    cur[g][s] = lw.data[10:0];
    hg_sat = 1'b0;
    for (int i = 0; i < N_SAMP; i++)
      if (3'(i) < nsamp && cur[1][i][9:0] == 10'h3FF) hg_sat = 1'b1;
    sel_sat = 1'b0;
    for (int i = 0; i < N_SAMP; i++) begin
      sel[i] = (ngain2 && !hg_sat) ? cur[1][i] : cur[0][i];
      if (3'(i) >= nsamp) sel[i] = '0;
      if (3'(i) < nsamp && sel[i][9:0] == 10'h3FF) sel_sat = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; crc <= '1; bcid <= '0; evid <= '0; ch <= '0; s <= '0; g <= 1'b0;
      crc_err <= 1'b0; len_err <= 1'b0; sat <= 1'b0; idle <= '0;
      we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0;
      w1_pend <= 1'b0; w1_data <= '0; w1_addr <= '0;
      for (int gi = 0; gi < 2; gi++) for (int i = 0; i < N_SAMP; i++) smp[gi][i] <= '0;
    end else begin
      we <= 1'b0; done <= 1'b0;
      if (w1_pend) begin
        we <= 1'b1; waddr <= w1_addr; wdata <= w1_data; w1_pend <= 1'b0;
      end
      if (st != S_IDLE && st != S_HDR) begin
        if (lw_valid) idle <= '0;
        else if (idle == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
          len_err <= 1'b1; st <= S_HDR;
        end else idle <= idle + 1'b1;
      end
      case (st)
        S_IDLE: if (accept && lw_valid && lw.ctrl && lw.data[15:12] == FE_HDR_TAG) begin
          bcid <= lw.data[11:0]; crc <= crc16_word(16'hFFFF, lw.data);
          crc_err <= 1'b0; len_err <= 1'b0; sat <= 1'b0; idle <= '0;
          st <= S_EVID;
        end
        S_EVID: if (lw_valid) begin
          if (lw.ctrl) begin len_err <= 1'b1; st <= S_HDR; end
          else begin
            evid <= lw.data; crc <= crc16_word(crc, lw.data);
            ch <= '0; s <= '0; g <= 1'b0; st <= S_SAMP;
          end
        end
        S_SAMP: if (lw_valid) begin
          if (lw.ctrl) begin len_err <= 1'b1; st <= S_HDR; end
          else begin
            crc <= crc16_word(crc, lw.data);
            smp[g][s] <= lw.data[10:0];
            if (s == nsamp - 1'b1) begin
              s <= '0;
              if (ngain2 && !g) g <= 1'b1;
              else begin
                g <= 1'b0;
                we <= 1'b1; waddr <= 7'(1 + 2*ch);
                wdata <= {5'h0, sel[3], 5'h0, sel[2], 5'h0, sel[1], 5'h0, sel[0]};
                w1_pend <= 1'b1; w1_addr <= 7'(2 + 2*ch);
                w1_data <= {16'h0, 5'h0, sel[6], 5'h0, sel[5], 5'h0, sel[4]};
                if (sel_sat) sat <= 1'b1;
                if (ch == 6'(N_CH-1)) st <= S_CRC;
                else ch <= ch + 1'b1;
              end
            end else s <= s + 1'b1;
          end
        end
        S_CRC: if (lw_valid) begin
          if (lw.ctrl) len_err <= 1'b1;
          else if (lw.data != crc) crc_err <= 1'b1;
          st <= S_HDR;
        end
        S_HDR: if (!w1_pend) begin
          we <= 1'b1; waddr <= '0;
          wdata <= {11'h0, 1'b0, 1'b0, sat, len_err, crc_err, evid, 4'h0, bcid, 16'(N_CH)};
          done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = (st != S_IDLE);
endmodule
