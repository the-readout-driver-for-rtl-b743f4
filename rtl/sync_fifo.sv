// sync_fifo: single-clock first-word-fall-through FIFO with an occupancy
// count. Used for the Transition Module buffer, the DSP output word queue and
// the TTC information queues. rdata shows the oldest word while !empty.
module sync_fifo #(
  parameter int DW = 32,
  parameter int AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
  always_ff @(posedge clk) if (do_wr) mem[wp] <= wdata;
  assign rdata = mem[rp];
  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(2**AW));
endmodule
