// input_fpga: Input FPGA of a Processing Unit. It receives two superdrawer
// links (16 bits from the Staging FPGA), checks and formats each event frame
// with frame_rx, and stores the result in an event buffer of N_SLOT slots
// that the DSP side reads as 64-bit words (the EMIFA width). An event is
// ready when both superdrawers have delivered it; ev_ready is then high and
// irq pulses once per new event (the interrupt that starts the DSP's DMA).
// The reader addresses {feb, word} inside the oldest slot (rd_data one clock
// after rd_en) and frees the slot with release. busy is raised when a link has
// N_SLOT-1 slots in use, the "input buffer almost full" condition that feeds
// the ROD busy. Configuration (number of samples, number of gains, enable)
// arrives on a serial line from the OutFPGA as a 16-bit word
// {11'h0, enable, ngain2, nsamp[2:0]}; after reset nsamp=7, one gain,
// enabled. Frames arriving while a link has no free slot are dropped and
// counted in status[15:0]. Slot count and configuration word layout are this
// design's choices.
module input_fpga
  import rod_pkg::*;
#(
  parameter int N_SLOT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  link_word_t  lw       [2],
  input  logic        lw_valid [2],
  input  logic        cfg_fs,
  input  logic        cfg_sd,
  input  logic        rd_en,
  input  logic        rd_feb,
  input  logic [6:0]  rd_word,
  output logic [63:0] rd_data,
  output logic        ev_ready,
  output logic        irq,
  input  logic        release_ev,
  output logic        busy,
  output logic [15:0] status
);
  localparam int SW = $clog2(N_SLOT);
  logic [2:0] nsamp;
  logic       ngain2, enable;
  logic       cfg_v;
  logic [15:0] cfg_d;
  serial_rx #(.W(16)) u_cfg (.clk, .rst_n, .fs(cfg_fs), .sd(cfg_sd), .valid(cfg_v), .data(cfg_d));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin nsamp <= 3'd7; ngain2 <= 1'b0; enable <= 1'b1; end
    else if (cfg_v) begin
      nsamp <= (cfg_d[2:0] == 0) ? 3'd1 : cfg_d[2:0];
      ngain2 <= cfg_d[3]; enable <= cfg_d[4];
    end
  end

  logic [SW:0] wcnt [2];
  logic [SW:0] rcnt;
  logic [SW:0] occ [2];
  logic [63:0] mem0 [N_SLOT*128];
  logic [63:0] mem1 [N_SLOT*128];
  logic [63:0] rd0, rd1;
  logic        rd_sel;
  logic        we [2];
  logic [6:0]  waddr [2];
  logic [63:0] wdata [2];
  logic        done [2];
  logic        fbusy [2];
  logic        accept [2];

  for (genvar f = 0; f < 2; f++) begin : g_feb
    assign occ[f] = wcnt[f] - rcnt;
    assign accept[f] = enable && (occ[f] < (SW+1)'(N_SLOT));
    frame_rx u_rx (
      .clk, .rst_n, .accept(accept[f]), .nsamp, .ngain2,
      .lw(lw[f]), .lw_valid(lw_valid[f]),
      .we(we[f]), .waddr(waddr[f]), .wdata(wdata[f]), .done(done[f]), .busy(fbusy[f]));
  end

  always_ff @(posedge clk) begin
    if (we[0]) mem0[{wcnt[0][SW-1:0], waddr[0]}] <= wdata[0];
    if (we[1]) mem1[{wcnt[1][SW-1:0], waddr[1]}] <= wdata[1];
    if (rd_en) begin
      rd0 <= mem0[{rcnt[SW-1:0], rd_word}];
      rd1 <= mem1[{rcnt[SW-1:0], rd_word}];
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_sel <= 1'b0; else if (rd_en) rd_sel <= rd_feb;
  assign rd_data = rd_sel ? rd1 : rd0;

  // dropped frames: a frame start seen on a link that cannot accept it
  logic drop [2];
  for (genvar f = 0; f < 2; f++) begin : g_drop
    assign drop[f] = lw_valid[f] && lw[f].ctrl && !fbusy[f] && !accept[f];
  end

  logic ready_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt[0] <= '0; wcnt[1] <= '0; rcnt <= '0; status <= '0; ready_q <= 1'b0;
    end else begin
      if (done[0]) wcnt[0] <= wcnt[0] + 1'b1;
      if (done[1]) wcnt[1] <= wcnt[1] + 1'b1;
      if (release_ev && ev_ready) rcnt <= rcnt + 1'b1;
      if ((drop[0] || drop[1]) && status != 16'hFFFF) status <= status + 1'b1;
      ready_q <= ev_ready && !(release_ev);
    end
  end
  assign ev_ready = (occ[0] != 0) && (occ[1] != 0);
  assign irq  = ev_ready && !ready_q;
  assign busy = (occ[0] >= (SW+1)'(N_SLOT-1)) || (occ[1] >= (SW+1)'(N_SLOT-1));
endmodule
