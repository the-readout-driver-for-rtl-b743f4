// async_fifo: dual-clock first-word-fall-through FIFO with Gray-coded
// pointers and two-flop synchronisers. It is the clock de-skew FIFO between a
// G-Link recovered clock and the ROD clock inside the Staging FPGA, and the PU
// output FIFO between the DSP side and the Output Controller.
// Interface: write side (wclk, wrst_n, wr_en, wdata, full), read side (rclk,
// rrst_n, rd_en, rdata, empty). rdata shows the oldest word while !empty;
// rd_en pops it. Full and empty are conservative (pointers are seen two
// cycles late in the other domain). Depth is 2**AW; the ROD description
// gives no depth, so the default is this design's choice.
module async_fifo #(
  parameter int DW = 17,
  parameter int AW = 9
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n; wgray <= b2g(wbin_n);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n; rgray <= b2g(rbin_n);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
