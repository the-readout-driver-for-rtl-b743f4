// serial_rx: receiver for serial_tx frames. fs marks the first bit; after W
// bits the word appears on data with valid high for one cycle.
module serial_rx #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fs,
  input  logic         sd,
  output logic         valid,
  output logic [W-1:0] data
);
  logic [W-1:0] sh;
  logic [$clog2(W+1)-1:0] left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; valid <= 1'b0; data <= '0;
    end else begin
      valid <= 1'b0;
      if (fs) begin
        sh <= {{(W-1){1'b0}}, sd};
        left <= ($clog2(W+1))'(W-1);
      end else if (left != 0) begin
        sh <= {sh[W-2:0], sd};
        left <= left - 1'b1;
        if (left == 1) begin valid <= 1'b1; data <= {sh[W-2:0], sd}; end
      end
    end
  end
endmodule
