// dsp_histogram: monitoring histograms kept by the DSP, one per channel, of
// the first sample of every event and of the Quality Factor. Bins: first
// sample adc >> (ADC_W-6) (64 bins over the ADC range), QF >> QF_SHIFT
// clamped to bin 63. Counters are 16 bits and stop at 0xFFFF. The two
// histogram kinds and per-channel histograms follow the ROD description; bin
// count, binning and counter width are this design's choices.
// An update (ch, first sample, QF) is a read-modify-write that takes two
// clocks; a new update may be given every second clock (ready). The host
// reads one bin with rd_en and rd_addr = {kind(0 sample, 1 QF), ch, bin};
// rd_data is valid one clock later. clr clears all bins over
// N_CHAN*64 clocks (ready low meanwhile).
module dsp_histogram
  import rod_pkg::*;
#(
  parameter int N_CHAN   = 2*N_CH,
  parameter int QF_SHIFT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        upd,
  input  logic [$clog2(N_CHAN)-1:0] upd_ch,
  input  logic [ADC_W-1:0] upd_s0,
  input  logic [15:0] upd_qf,
  output logic        ready,
  input  logic        rd_en,
  input  logic [$clog2(N_CHAN)+6:0] rd_addr,
  output logic [15:0] rd_data
);
  localparam int CW = $clog2(N_CHAN);
  localparam int AW = CW + 6;
  logic [15:0] hs [N_CHAN*64];
  logic [15:0] hq [N_CHAN*64];
  logic [AW-1:0] as_q, aq_q;
  logic [15:0] vs, vq;
  logic        ph2;
  logic        clearing;
  logic [AW-1:0] cptr;
  logic [5:0]  qbin;
  assign qbin = (upd_qf >> QF_SHIFT) > 16'd63 ? 6'd63 : 6'(upd_qf >> QF_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph2 <= 1'b0; clearing <= 1'b1; cptr <= '0; as_q <= '0; aq_q <= '0;
    end else begin
      if (clr && !clearing) begin clearing <= 1'b1; cptr <= '0; ph2 <= 1'b0; end
      else if (clearing) begin
        cptr <= cptr + 1'b1;
        if (cptr == AW'(N_CHAN*64 - 1)) clearing <= 1'b0;
      end else if (ph2) ph2 <= 1'b0;
      else if (upd) begin
        ph2 <= 1'b1;
        as_q <= {upd_ch, 6'(upd_s0 >> (ADC_W - 6))};
        aq_q <= {upd_ch, qbin};
      end
    end
  end
  always_ff @(posedge clk) begin
    vs <= hs[(upd && !ph2) ? {upd_ch, 6'(upd_s0 >> (ADC_W - 6))} : as_q];
    vq <= hq[(upd && !ph2) ? {upd_ch, qbin} : aq_q];
    if (clearing) begin
      hs[cptr] <= '0; hq[cptr] <= '0;
    end else if (ph2) begin
      if (vs != 16'hFFFF) hs[as_q] <= vs + 1'b1;
      if (vq != 16'hFFFF) hq[aq_q] <= vq + 1'b1;
    end
    if (rd_en) rd_data <= rd_addr[AW] ? hq[rd_addr[AW-1:0]] : hs[rd_addr[AW-1:0]];
  end
  assign ready = !ph2 && !clearing;
endmodule
