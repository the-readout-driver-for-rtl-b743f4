// serial_tx: frame-synchronised serial transmitter in the style of a DSP
// multichannel buffered serial port. A load of W bits starts a frame: fs is
// high for one cycle together with the first (most significant) bit on sd,
// the remaining bits follow one per clock. busy is high while a frame is
// being sent; a load while busy is ignored. Used for the TTC FPGA to PU
// line, the OutFPGA to DSP McBSP0/McBSP1 lines and the InFPGA configuration
// line. Bit order, frame sync and one bit per ROD clock are this design's
// choices; the ROD description only says these lines are serial.
module serial_tx #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] data,
  output logic         busy,
  output logic         fs,
  output logic         sd
);
  logic [W-1:0] sh;
  logic [$clog2(W+1)-1:0] left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; fs <= 1'b0; sd <= 1'b0;
    end else if (left == 0 && load) begin
      fs <= 1'b1; sd <= data[W-1];
      sh <= data << 1; left <= ($clog2(W+1))'(W-1);
    end else if (left != 0) begin
      fs <= 1'b0; sd <= sh[W-1];
      sh <= sh << 1; left <= left - 1'b1;
    end else begin
      fs <= 1'b0; sd <= 1'b0;
    end
  end
  assign busy = (left != 0);
endmodule
