// ttc_fpga: TTC FPGA of the ROD. It works on the signals decoded by the TTCrx
// (bunch-crossing strobe, Level 1 Accept, Bunch Counter Reset, Event Counter
// Reset, trigger type) and
//   - keeps the 12-bit BCID counter (one count per bunch crossing, cleared by
//     BCR) and the 32-bit EVID: 24 low bits count L1A and are cleared by ECR,
//     8 high bits count ECR;
//   - for every L1A takes {trigger type, BCID, EVID} and sends it on a
//     serial line (52 bits, serial_tx) to the Processing Units;
//   - chooses the clock source: the TTC clock when it is present, the local
//     oscillator when it disappears or when VME forces it, switching back
//     when the TTC clock returns. ttc_clk is watched from clk_local: no edge
//     for LOSS_CYC local clocks means lost, RECOVER_CYC clocks with edges
//     means present again. use_ttc_clk drives the external clock buffer.
// Counters and clock fall-back follow the ROD description. The EVID given to
// an event is the counter value before its L1A increments it, the trigger
// type may arrive after its L1A and is matched in order (8-deep queues), and
// the register map is this design's choice: 0 ctrl {force_local[0]},
// 1 BCID of the last L1A, 2 current EVID, 3 L1A count, 4 clock status
// {switches[31:8], ttc_ok[1], use_ttc_clk[0]}, 5 TTC words lost (queue full).
// Notes for lint: only bit 0 of reg_wdata is used (one writable register). A
// word is lost when the L1A queue is full; the trigger type queue is popped
// with it, so its full flag and both occupancy counts are left unused.
module ttc_fpga
  import rod_pkg::*;
#(
  parameter int LOSS_CYC    = 8,
  parameter int RECOVER_CYC = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bc_en,
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic [7:0]  ttype,
  input  logic        ttype_valid,
  output logic        ttc_fs,
  output logic        ttc_sd,
  input  logic        clk_local,
  input  logic        ttc_clk,
  output logic        use_ttc_clk,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [31:0] reg_rdata
);
  logic [BCID_W-1:0] bcid;
  logic [23:0] ev_lo;
  logic [7:0]  ev_hi;
  logic [31:0] n_l1a, n_lost;
  logic [BCID_W-1:0] last_bcid;
  logic        force_local;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0; ev_lo <= '0; ev_hi <= '0; n_l1a <= '0; last_bcid <= '0;
    end else begin
      if (bcr) bcid <= '0;
      else if (bc_en) bcid <= bcid + 1'b1;
      if (ecr) begin ev_lo <= '0; ev_hi <= ev_hi + 1'b1; end
      else if (l1a) ev_lo <= ev_lo + 1'b1;
      if (l1a) begin n_l1a <= n_l1a + 1'b1; last_bcid <= bcid; end
    end
  end

  // pair L1A information with its trigger type, in order
  logic [43:0] qa_d;
  logic [7:0]  qt_d;
  logic        qa_empty, qt_empty, qa_full, qt_full, pop, tx_busy;
  logic [3:0]  qa_cnt, qt_cnt;
  sync_fifo #(.DW(44), .AW(3)) u_qa (.clk, .rst_n, .wr_en(l1a), .wdata({bcid, ev_hi, ev_lo}),
    .full(qa_full), .rd_en(pop), .rdata(qa_d), .empty(qa_empty), .count(qa_cnt));
  sync_fifo #(.DW(8), .AW(3)) u_qt (.clk, .rst_n, .wr_en(ttype_valid), .wdata(ttype),
    .full(qt_full), .rd_en(pop), .rdata(qt_d), .empty(qt_empty), .count(qt_cnt));
  assign pop = !qa_empty && !qt_empty && !tx_busy;
  serial_tx #(.W(TTC_W)) u_tx (.clk, .rst_n, .load(pop), .data({qt_d, qa_d}),
    .busy(tx_busy), .fs(ttc_fs), .sd(ttc_sd));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n_lost <= '0;
    else if (l1a && qa_full) n_lost <= n_lost + 1'b1;

  // ---------------- clock source selection ----------------
  logic tog;
  always_ff @(posedge ttc_clk or negedge rst_n)
    if (!rst_n) tog <= 1'b0; else tog <= ~tog;
  logic [2:0] tsync;
  logic [1:0] fsync;
  logic [$clog2(LOSS_CYC+1)-1:0]    quiet;
  logic [$clog2(RECOVER_CYC+1)-1:0] good;
  logic ttc_ok;
  logic [23:0] nsw;
  logic lrst_n, lrst_q;
  always_ff @(posedge clk_local or negedge rst_n)
    if (!rst_n) {lrst_n, lrst_q} <= '0; else {lrst_n, lrst_q} <= {lrst_q, 1'b1};
  always_ff @(posedge clk_local or negedge lrst_n) begin
    if (!lrst_n) begin
      tsync <= '0; fsync <= '0; quiet <= '0; good <= '0; ttc_ok <= 1'b0;
      use_ttc_clk <= 1'b0; nsw <= '0;
    end else begin
      tsync <= {tsync[1:0], tog};
      fsync <= {fsync[0], force_local};
      if (tsync[2] != tsync[1]) begin
        quiet <= '0;
        if (!ttc_ok) begin
          if (good == ($clog2(RECOVER_CYC+1))'(RECOVER_CYC)) begin ttc_ok <= 1'b1; good <= '0; end
          else good <= good + 1'b1;
        end
      end else begin
        if (quiet == ($clog2(LOSS_CYC+1))'(LOSS_CYC)) begin ttc_ok <= 1'b0; good <= '0; end
        else quiet <= quiet + 1'b1;
      end
      use_ttc_clk <= ttc_ok && !fsync[1];
      if (use_ttc_clk != (ttc_ok && !fsync[1])) nsw <= nsw + 1'b1;
    end
  end

  // ---------------- registers ----------------
  logic [1:0] st_s0, st_s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin force_local <= 1'b0; reg_rdata <= '0; st_s0 <= '0; st_s1 <= '0; end
    else begin
      st_s0 <= {ttc_ok, use_ttc_clk}; st_s1 <= st_s0;
      if (reg_we && reg_addr == 8'd0) force_local <= reg_wdata[0];
      if (reg_re) begin
        case (reg_addr)
          8'd0: reg_rdata <= {31'h0, force_local};
          8'd1: reg_rdata <= 32'(last_bcid);
          8'd2: reg_rdata <= {ev_hi, ev_lo};
          8'd3: reg_rdata <= n_l1a;
          8'd4: reg_rdata <= {nsw, 6'h0, st_s1};
          8'd5: reg_rdata <= n_lost;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
