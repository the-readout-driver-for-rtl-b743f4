// dsp_core: the event processing that one DSP of a Processing Unit performs,
// built as logic. For each event it
//   1. waits for an event in the Input FPGA buffer and for the TTC words of
//      that event (BCID and EVID on the McBSP0 line, trigger type on McBSP1),
//   2. if configured as the header DSP, writes the 9-word ROD fragment header,
//   3. for each of its two superdrawers: compares the front-end BCID and
//      EVID with the TTC ones, reconstructs every channel with of_engine,
//      calibrates the amplitude to energy, writes the reconstruction
//      sub-fragment (energy, phase, QF, flags per channel), optionally the raw
//      data sub-fragment, and the data-quality sub-fragment,
//   4. if enabled, runs muon tagging and the transverse energy sum for both
//      modules and writes the Level 2 sub-fragment,
//   5. fills the first-sample and QF histograms and frees the input slot.
// Words go to the PU output FIFO as 16-bit halves (high half first) with a
// 17th bit marking the last word of the event. Fragment order, contents and
// the split into header DSP / trailer DSP follow the ROD description; word
// layouts, the 17th bit, the channel-to-cell map (channels 2c and 2c+1 read
// cell c) and the host map below are this design's choices.
// Reconstruction word, one per channel in channel order:
// {energy[15:0], phase[7:0] in 1/2 ns, QF/16 [5:0], bad, gain}; phase and
// QF saturate. One 32-bit word per channel keeps a PU fragment inside the
// output link's budget at 100 kHz (about 257 words of 32 bits in 10 us).
// Host port (16-bit, the DSP's HPI), address bits [19:16] select:
//   0 OF weights (of_engine w_addr), 1 calibration constant of channel
//   48*feb + ch
//   (Q8.8, energy = A*cal/256), 2 registers, 3 et_sum tables ({module,lut}),
//   4 histograms (read, dsp_histogram rd_addr).
// Registers: 0 ctrl {hist_en[4], raw_en[3], l2_en[2], header[1], iterative[0]},
// 1/2 source id lo/hi, 3/4 run number lo/hi, 5 detector event type,
// 6..11 muon thresholds lo/hi of D, BC, A, 12 module id of the first
// superdrawer, 13 write: clear histograms, 16..21 bad-channel bits
// (bit c of reg 16+c/16 for channel c of 96), 32 events done, 33
// superdrawer blocks with a BCID or EVID mismatch. Reads return data one
// clock after hpi_re.
// Timing: with the fixed OF mode one channel is reconstructed every 4 clocks,
// so a 96-channel event takes about 420 clocks, inside the 10 us budget of a
// 100 kHz trigger rate at an 80 MHz clock.
module dsp_core
  import rod_pkg::*;
#(
  parameter int NPH = N_PHASE
) (
  input  logic        clk,
  input  logic        rst_n,
  // Input FPGA (EMIFA side)
  input  logic        in_ready,
  output logic        in_rd_en,
  output logic        in_rd_feb,
  output logic [6:0]  in_rd_word,
  input  logic [63:0] in_rd_data,
  output logic        in_release,
  // serial ports from the OutFPGA
  input  logic        mcbsp0_fs,
  input  logic        mcbsp0_sd,
  input  logic        mcbsp1_fs,
  input  logic        mcbsp1_sd,
  // host port
  input  logic [19:0] hpi_addr,
  input  logic [15:0] hpi_wdata,
  input  logic        hpi_we,
  input  logic        hpi_re,
  output logic [15:0] hpi_rdata,
  // output FIFO (EMIFB side)
  output logic        fifo_we,
  output logic [16:0] fifo_wdata,
  input  logic        fifo_full,
  output logic        active
);
  // ---------------- TTC information from the serial ports ----------------
  logic        m0_v, m1_v;
  logic [43:0] m0_d;
  logic [7:0]  m1_d;
  serial_rx #(.W(44)) u_m0 (.clk, .rst_n, .fs(mcbsp0_fs), .sd(mcbsp0_sd), .valid(m0_v), .data(m0_d));
  serial_rx #(.W(8))  u_m1 (.clk, .rst_n, .fs(mcbsp1_fs), .sd(mcbsp1_sd), .valid(m1_v), .data(m1_d));
  logic        q0_empty, q1_empty, ttc_pop;
  logic [43:0] q0_d;
  logic [7:0]  q1_d;
  logic        q0_full, q1_full;
  logic [3:0]  q0_cnt, q1_cnt;
  sync_fifo #(.DW(44), .AW(3)) u_q0 (.clk, .rst_n, .wr_en(m0_v), .wdata(m0_d), .full(q0_full),
    .rd_en(ttc_pop), .rdata(q0_d), .empty(q0_empty), .count(q0_cnt));
  sync_fifo #(.DW(8), .AW(3)) u_q1 (.clk, .rst_n, .wr_en(m1_v), .wdata(m1_d), .full(q1_full),
    .rd_en(ttc_pop), .rdata(q1_d), .empty(q1_empty), .count(q1_cnt));

  // ---------------- configuration ----------------
  logic [15:0] ctrl, src_lo, src_hi, run_lo, run_hi, det_type, mod_id;
  logic signed [15:0] thr [6];
  logic [95:0] bad;
  logic [15:0] cal [2*N_CH];
  logic [15:0] ev_done, sync_err;
  logic        hist_clr;
  logic        iterative, is_header, l2_en, raw_en, hist_en;
  assign iterative = ctrl[0];
  assign is_header = ctrl[1];
  assign l2_en     = ctrl[2];
  assign raw_en    = ctrl[3];
  assign hist_en   = ctrl[4];

  logic [3:0]  region;
  assign region = hpi_addr[19:16];
  logic        w_we;
  logic        lut_we [2];
  assign w_we = hpi_we && region == 4'd0;
  assign lut_we[0] = hpi_we && region == 4'd3 && !hpi_addr[4];
  assign lut_we[1] = hpi_we && region == 4'd3 &&  hpi_addr[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= 16'h0000; src_lo <= '0; src_hi <= '0; run_lo <= '0; run_hi <= '0;
      det_type <= '0; mod_id <= '0; bad <= '0; hist_clr <= 1'b0;
      for (int i = 0; i < 6; i++) thr[i] <= '0;
    end else begin
      hist_clr <= 1'b0;
      if (hpi_we && region == 4'd2) begin
        case (hpi_addr[5:0])
          6'd0: ctrl <= hpi_wdata;
          6'd1: src_lo <= hpi_wdata;
          6'd2: src_hi <= hpi_wdata;
          6'd3: run_lo <= hpi_wdata;
          6'd4: run_hi <= hpi_wdata;
          6'd5: det_type <= hpi_wdata;
          6'd6, 6'd7, 6'd8, 6'd9, 6'd10, 6'd11: thr[3'(hpi_addr[5:0] - 6'd6)] <= hpi_wdata;
          6'd12: mod_id <= hpi_wdata;
          6'd13: hist_clr <= 1'b1;
          6'd16, 6'd17, 6'd18, 6'd19, 6'd20, 6'd21:
            bad[16*(hpi_addr[5:0] - 6'd16) +: 16] <= hpi_wdata;
          default: ;
        endcase
      end
    end
  end
  always_ff @(posedge clk) if (hpi_we && region == 4'd1 && hpi_addr[6:0] < 7'(2*N_CH)) cal[hpi_addr[6:0]] <= hpi_wdata;

  logic [15:0] h_rd;
  logic [3:0]  rd_region;
  logic [15:0] reg_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rd_region <= '0; reg_rd <= '0; end
    else if (hpi_re) begin
      rd_region <= region;
      case (hpi_addr[5:0])
        6'd0: reg_rd <= ctrl;
        6'd3: reg_rd <= run_lo;
        6'd4: reg_rd <= run_hi;
        6'd12: reg_rd <= mod_id;
        6'd32: reg_rd <= ev_done;
        6'd33: reg_rd <= sync_err;
        default: reg_rd <= (region == 4'd1) ? cal[hpi_addr[6:0]] : 16'h0;
      endcase
    end
  end
  assign hpi_rdata = (rd_region == 4'd4) ? h_rd : reg_rd;

  // ---------------- output word queue and 16-bit writer ----------------
  // entry: {two_words, last, data64}; one 32-bit word uses data[31:0]
  logic        oq_push, oq_two, oq_last;
  logic [63:0] oq_d;
  logic [65:0] oq_rd;
  logic        oq_empty, oq_full, oq_pop;
  logic [4:0]  oq_cnt;
  logic        oq_space;
  sync_fifo #(.DW(66), .AW(4)) u_oq (.clk, .rst_n, .wr_en(oq_push), .wdata({oq_two, oq_last, oq_d}),
    .full(oq_full), .rd_en(oq_pop), .rdata(oq_rd), .empty(oq_empty), .count(oq_cnt));
  assign oq_space = (oq_cnt <= 5'd12);
  logic [1:0] half;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) half <= '0;
    else if (!oq_empty && !fifo_full) half <= oq_pop ? 2'd0 : half + 1'b1;
  end
  logic [1:0] nlast;
  assign nlast = oq_rd[65] ? 2'd3 : 2'd1;
  assign oq_pop = !oq_empty && !fifo_full && (half == nlast);
  always_comb begin
    fifo_we = !oq_empty && !fifo_full;
    unique case (oq_rd[65] ? half : half + 2'd2)
      2'd0: fifo_wdata = {1'b0, oq_rd[63:48]};
      2'd1: fifo_wdata = {1'b0, oq_rd[47:32]};
      2'd2: fifo_wdata = {1'b0, oq_rd[31:16]};
      default: fifo_wdata = {oq_rd[64], oq_rd[15:0]};
    endcase
  end

  // ---------------- reconstruction units ----------------
  logic        of_start, of_ready, of_valid;
  logic [ADC_W-1:0] of_samp [N_SAMP];
  logic        of_gain;
  logic signed [18:0] of_amp, of_ped;
  logic signed [15:0] of_phase;
  logic [15:0] of_qf;
  of_engine #(.NPH(NPH)) u_of (
    .clk, .rst_n, .start(of_start), .iterative, .gain(of_gain), .samp(of_samp),
    .ready(of_ready), .valid(of_valid), .amp(of_amp), .phase(of_phase), .ped(of_ped), .qf(of_qf),
    .w_we, .w_addr(hpi_addr[14:0]), .w_data(hpi_wdata));

  logic signed [19:0] cell_e [2][N_CELL];
  logic signed [19:0] thr_lo [3], thr_hi [3];
  for (genvar i = 0; i < 3; i++) begin : g_thr
    assign thr_lo[i] = 20'(thr[2*i]);
    assign thr_hi[i] = 20'(thr[2*i+1]);
  end
  logic        l2_start;
  logic        mt_valid [2], et_valid [2], et_ready [2];
  logic [N_DCELL-1:0] mt_tag [2];
  logic [2:0]  mt_ntag [2];
  logic signed [21:0] mt_e [2][N_DCELL];
  logic signed [23:0] et_v [2], ex_v [2], ey_v [2];
  for (genvar m = 0; m < 2; m++) begin : g_l2
    muon_tag u_mt (.clk, .rst_n, .start(l2_start), .cell_e(cell_e[m]), .thr_lo, .thr_hi,
      .valid(mt_valid[m]), .tag(mt_tag[m]), .ntag(mt_ntag[m]), .tag_e(mt_e[m]));
    et_sum u_et (.clk, .rst_n, .start(l2_start), .cell_e(cell_e[m]),
      .lut_we(lut_we[m]), .lut_addr(hpi_addr[3:0]), .lut_data(hpi_wdata),
      .ready(et_ready[m]), .valid(et_valid[m]), .et(et_v[m]), .ex(ex_v[m]), .ey(ey_v[m]));
  end

  logic        h_upd, h_ready;
  logic [6:0]  h_ch;
  logic [ADC_W-1:0] h_s0;
  logic [15:0] h_qf;
  dsp_histogram #(.N_CHAN(2*N_CH)) u_hist (
    .clk, .rst_n, .clr(hist_clr), .upd(h_upd), .upd_ch(h_ch), .upd_s0(h_s0), .upd_qf(h_qf),
    .ready(h_ready), .rd_en(hpi_re && region == 4'd4), .rd_addr(hpi_addr[13:0]), .rd_data(h_rd));

  // ---------------- event sequencer ----------------
  typedef enum logic [3:0] {
    E_IDLE, E_HDR, E_FHDR_RD, E_FHDR_WAIT, E_SUBHDR, E_CHAN, E_RAWHDR, E_RAW,
    E_DQ, E_L2_RUN, E_L2_OUT, E_DONE
  } est_t;
  est_t est;
  ttc_info_t ttc;
  logic        feb;
  logic [3:0]  widx;
  dq_t         dq;
  logic [11:0] fe_bcid;
  // channel fetch / start / result bookkeeping
  logic [5:0]  fch;          // next channel to fetch
  logic [1:0]  fph;          // fetch phase
  logic        nxt_v;
  logic [63:0] nxt_w0;
  logic [5:0]  nxt_ch;
  logic [5:0]  run_ch;       // channel inside of_engine
  logic        run_v;
  logic [ADC_W-1:0] run_s0;
  logic        run_gain;
  logic [5:0]  done_ch;      // channels with results written
  logic [6:0]  raw_w;
  logic        raw_wait;

  logic [31:0] hdr_word;
  always_comb begin
    unique case (widx)
      4'd0: hdr_word = ROD_HDR_MARKER;
      4'd1: hdr_word = 32'(ROD_HDR_WORDS);
      4'd2: hdr_word = FORMAT_VERSION;
      4'd3: hdr_word = {src_hi, src_lo};
      4'd4: hdr_word = {run_hi, run_lo};
      4'd5: hdr_word = ttc.evid;
      4'd6: hdr_word = 32'(ttc.bcid);
      4'd7: hdr_word = 32'(ttc.ttype);
      default: hdr_word = 32'(det_type);
    endcase
  end

  logic [6:0]  cidx;
  assign cidx = feb ? 7'(N_CH) + 7'(run_ch) : 7'(run_ch);   // channel 0..95 of the DSP
  logic signed [34:0] e_full;
  logic signed [15:0] e_sat;
  assign e_full = 35'(of_amp) * 35'(signed'({1'b0, cal[cidx]}));
  always_comb begin
    logic signed [34:0] e_sh;
    e_sh = e_full >>> CAL_FRAC;
    if (e_sh > 35'sd32767)       e_sat = 16'sh7FFF;
    else if (e_sh < -35'sd32768) e_sat = 16'sh8000;
    else                         e_sat = 16'(e_sh);
  end
  // packed channel word: phase in 1/2 ns and QF/16, both saturated
  logic signed [7:0] ph8;
  logic [5:0]        qf6;
  assign ph8 = (of_phase >>> 3) > 16'sd127  ? 8'sd127 :
               (of_phase >>> 3) < -16'sd128 ? -8'sd128 : 8'(of_phase >>> 3);
  assign qf6 = (of_qf >> 4) > 16'd63 ? 6'd63 : 6'(of_qf >> 4);
  logic [15:0] feb_id;
  assign feb_id = mod_id + 16'(feb);

  logic        last_is_dq;
  assign last_is_dq = !l2_en && feb;

  always_comb begin
    oq_push = 1'b0; oq_two = 1'b0; oq_last = 1'b0; oq_d = '0;
    of_start = 1'b0; ttc_pop = 1'b0; l2_start = 1'b0;
    in_rd_en = 1'b0; in_rd_feb = feb; in_rd_word = '0; in_release = 1'b0;
    h_upd = 1'b0; h_ch = cidx; h_s0 = run_s0; h_qf = of_qf;
    unique case (est)
      E_IDLE: ttc_pop = in_ready && !q0_empty && !q1_empty;
      E_HDR: if (oq_space) begin oq_push = 1'b1; oq_d = 64'(hdr_word); end
      E_FHDR_RD: begin in_rd_en = 1'b1; in_rd_word = '0; end
      E_SUBHDR: if (oq_space) begin
        oq_push = 1'b1;
        unique case (widx)
          4'd0: oq_d = 64'(SUB_MARKER);
          4'd1: oq_d = 64'(3 + N_CH);
          default: oq_d = 64'({SUB_RECO, feb_id});
        endcase
      end
      E_CHAN: begin
        // fetch next channel's two words
        if (!nxt_v && fch < 6'(N_CH) && fph == 2'd0) begin
          in_rd_en = 1'b1; in_rd_word = 7'(1 + 2*fch);
        end else if (fph == 2'd1) begin
          in_rd_en = 1'b1; in_rd_word = 7'(2 + 2*fch);
        end
        // start the next reconstruction when the queue has room
        if (nxt_v && (of_ready && !run_v || of_valid) && oq_space) of_start = 1'b1;
        // result: one 32-bit word per channel
        if (of_valid) begin
          oq_push = 1'b1;
          oq_d = 64'({e_sat, ph8, qf6, bad[cidx], run_gain});
          h_upd = hist_en && h_ready;
        end
      end
      E_RAWHDR: if (oq_space) begin
        oq_push = 1'b1;
        unique case (widx)
          4'd0: oq_d = 64'(SUB_MARKER);
          4'd1: oq_d = 64'(3 + 4*N_CH);
          default: oq_d = 64'({SUB_RAW, feb_id});
        endcase
      end
      E_RAW: begin
        if (!raw_wait && raw_w <= 7'(2*N_CH) && oq_space) begin
          in_rd_en = 1'b1; in_rd_word = raw_w;
        end
        if (raw_wait) begin oq_push = 1'b1; oq_two = 1'b1; oq_d = in_rd_data; end
      end
      E_DQ: if (oq_space) begin
        oq_push = 1'b1;
        unique case (widx)
          4'd0: oq_d = 64'(SUB_MARKER);
          4'd1: oq_d = 64'(4);
          4'd2: oq_d = 64'({SUB_DQ, feb_id});
          default: begin oq_d = {32'h0, 11'h0, dq, 4'h0, fe_bcid}; oq_last = last_is_dq; end
        endcase
      end
      E_L2_RUN: l2_start = (widx == 4'd0);
      E_L2_OUT: if (oq_space) begin
        oq_push = 1'b1;
        unique case (widx)
          4'd0: oq_d = 64'(SUB_MARKER);
          4'd1: oq_d = 64'(3 + 8);
          4'd2: oq_d = 64'({SUB_L2, mod_id});
          4'd3:  oq_d = 64'({5'h0, mt_ntag[0], 20'h0, mt_tag[0]});
          4'd4:  oq_d = 64'(32'(et_v[0]));
          4'd5:  oq_d = 64'(32'(ex_v[0]));
          4'd6:  oq_d = 64'(32'(ey_v[0]));
          4'd7:  oq_d = 64'({5'h0, mt_ntag[1], 20'h0, mt_tag[1]});
          4'd8:  oq_d = 64'(32'(et_v[1]));
          4'd9:  oq_d = 64'(32'(ex_v[1]));
          default: begin oq_d = 64'(32'(ey_v[1])); oq_last = 1'b1; end
        endcase
      end
      E_DONE: in_release = 1'b1;
      default: ;
    endcase
  end

  logic l2_mt_done, l2_et_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est <= E_IDLE; ttc <= '0; feb <= 1'b0; widx <= '0; dq <= '0; fe_bcid <= '0;
      fch <= '0; fph <= '0; nxt_v <= 1'b0; nxt_w0 <= '0; nxt_ch <= '0;
      run_ch <= '0; run_v <= 1'b0; run_s0 <= '0; run_gain <= 1'b0; done_ch <= '0;
      raw_w <= '0; raw_wait <= 1'b0; ev_done <= '0; sync_err <= '0;
      l2_mt_done <= 1'b0; l2_et_done <= 1'b0;
      for (int i = 0; i < N_SAMP; i++) of_samp[i] <= '0;
      of_gain <= 1'b0;
      for (int m = 0; m < 2; m++) for (int c = 0; c < N_CELL; c++) cell_e[m][c] <= '0;
    end else begin
      unique case (est)
        E_IDLE: if (ttc_pop) begin
          ttc <= '{ttype: q1_d, bcid: q0_d[43:32], evid: q0_d[31:0]};
          feb <= 1'b0; widx <= '0;
          for (int m = 0; m < 2; m++) for (int c = 0; c < N_CELL; c++) cell_e[m][c] <= '0;
          est <= is_header ? E_HDR : E_FHDR_RD;
        end
        E_HDR: if (oq_space) begin
          if (widx == 4'(ROD_HDR_WORDS - 1)) begin widx <= '0; est <= E_FHDR_RD; end
          else widx <= widx + 1'b1;
        end
        E_FHDR_RD: est <= E_FHDR_WAIT;
        E_FHDR_WAIT: begin
          dq <= '{crc_err: in_rd_data[48], len_err: in_rd_data[49], saturated: in_rd_data[50],
                  bcid_mismatch: in_rd_data[27:16] != ttc.bcid,
                  evid_mismatch: in_rd_data[47:32] != ttc.evid[15:0]};
          if (in_rd_data[27:16] != ttc.bcid || in_rd_data[47:32] != ttc.evid[15:0])
            sync_err <= sync_err + 1'b1;
          fe_bcid <= in_rd_data[27:16];
          widx <= '0; est <= E_SUBHDR;
        end
        E_SUBHDR: if (oq_space) begin
          if (widx == 4'd2) begin
            widx <= '0; est <= E_CHAN;
            fch <= '0; fph <= '0; nxt_v <= 1'b0; run_v <= 1'b0; done_ch <= '0;
          end else widx <= widx + 1'b1;
        end
        E_CHAN: begin
          // fetch pipeline: phase 0 reads W0, phase 1 reads W1 while W0
          // arrives, phase 2 takes W1
          if (!nxt_v && fch < 6'(N_CH) && fph == 2'd0) fph <= 2'd1;
          else if (fph == 2'd1) begin nxt_w0 <= in_rd_data; fph <= 2'd2; end
          else if (fph == 2'd2) begin
            for (int i = 0; i < 4; i++) of_samp[i] <= nxt_w0[16*i +: ADC_W];
            for (int i = 4; i < N_SAMP; i++) of_samp[i] <= in_rd_data[16*(i-4) +: ADC_W];
            of_gain <= nxt_w0[ADC_W];
            nxt_v <= 1'b1; nxt_ch <= fch; fch <= fch + 1'b1; fph <= 2'd0;
          end
          if (of_start) begin
            nxt_v <= 1'b0; run_v <= 1'b1; run_ch <= nxt_ch;
            run_s0 <= of_samp[0]; run_gain <= of_gain;
          end else if (of_valid) run_v <= 1'b0;
          if (of_valid) begin
            done_ch <= done_ch + 1'b1;
            if (!bad[cidx] && run_ch < 6'(2*N_CELL))
              cell_e[feb][5'(run_ch >> 1)] <= cell_e[feb][5'(run_ch >> 1)] + 20'(e_sat);
            if (done_ch == 6'(N_CH - 1)) begin
              widx <= '0; est <= raw_en ? E_RAWHDR : E_DQ;
            end
          end
        end
        E_RAWHDR: if (oq_space) begin
          if (widx == 4'd2) begin widx <= '0; raw_w <= 7'd1; raw_wait <= 1'b0; est <= E_RAW; end
          else widx <= widx + 1'b1;
        end
        E_RAW: begin
          if (raw_wait) raw_wait <= 1'b0;
          if (!raw_wait && raw_w <= 7'(2*N_CH) && oq_space) begin
            raw_wait <= 1'b1; raw_w <= raw_w + 1'b1;
          end
          if (raw_wait && raw_w > 7'(2*N_CH)) begin widx <= '0; est <= E_DQ; end
        end
        E_DQ: if (oq_space) begin
          if (widx == 4'd3) begin
            widx <= '0;
            if (!feb) begin feb <= 1'b1; est <= E_FHDR_RD; end
            else est <= l2_en ? E_L2_RUN : E_DONE;
          end else widx <= widx + 1'b1;
        end
        E_L2_RUN: begin
          widx <= 4'd1;
          if (widx == 4'd0) begin l2_mt_done <= 1'b0; l2_et_done <= 1'b0; end
          else begin
            if (mt_valid[0]) l2_mt_done <= 1'b1;
            if (et_valid[0]) l2_et_done <= 1'b1;
            if (l2_mt_done && l2_et_done) begin widx <= '0; est <= E_L2_OUT; end
          end
        end
        E_L2_OUT: if (oq_space) begin
          if (widx == 4'd10) begin widx <= '0; est <= E_DONE; end
          else widx <= widx + 1'b1;
        end
        E_DONE: begin
          ev_done <= ev_done + 1'b1; est <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end
  assign active = (est != E_IDLE);
endmodule
