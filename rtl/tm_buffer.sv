// tm_buffer: the FIFO on the Transition Module and the small controller
// (a PLD on the board) that manages it. Words from the deserializer (32-bit
// data plus the S-Link control flag) are stored and passed to the S-Link
// link source card whenever the card's link-full flag is low. When the FIFO
// holds XOFF_ON words or more, XOFF is raised towards the Output Controller
// and kept until the level falls to XOFF_OFF, so the card's own buffering is
// extended before the OC is stopped. FIFO and XOFF follow the ROD
// description; depth and thresholds are this design's choices. A word
// written by the deserializer appears on the LSC port one clock later at the
// earliest. Words that arrive when the FIFO is full are counted in overflow.
module tm_buffer #(
  parameter int AW       = 10,
  parameter int XOFF_ON  = 2**AW - 64,
  parameter int XOFF_OFF = 2**AW / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_ctrl,
  input  logic [31:0] in_data,
  output logic        xoff,
  output logic [31:0] lsc_ud,
  output logic        lsc_uctrl,
  output logic        lsc_uwen,
  input  logic        lsc_lff,
  output logic [15:0] overflow
);
  logic        empty, full;
  logic [AW:0] count;
  logic [32:0] rd;
  logic        pop;
  assign pop = !empty && !lsc_lff;
  sync_fifo #(.DW(33), .AW(AW)) u_fifo (
    .clk, .rst_n, .wr_en(in_valid), .wdata({in_ctrl, in_data}), .full,
    .rd_en(pop), .rdata(rd), .empty, .count);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xoff <= 1'b0; lsc_ud <= '0; lsc_uctrl <= 1'b0; lsc_uwen <= 1'b0; overflow <= '0;
    end else begin
      if (count >= (AW+1)'(XOFF_ON)) xoff <= 1'b1;
      else if (count <= (AW+1)'(XOFF_OFF)) xoff <= 1'b0;
      lsc_uwen <= pop;
      if (pop) begin lsc_ud <= rd[31:0]; lsc_uctrl <= rd[32]; end
      if (in_valid && full && overflow != 16'hFFFF) overflow <= overflow + 1'b1;
    end
  end
endmodule
