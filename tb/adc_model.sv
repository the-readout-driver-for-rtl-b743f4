`timescale 1ns/1ps
// adc_model: behavioural serial temperature ADC for testbenches. While CS is
// low it takes a 4-bit channel number on DIN (first four SCLK rising edges)
// and then returns 12 result bits on DOUT, MSB first, changing on SCLK
// falling edges. The value for each channel is set by the testbench.
module adc_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] val [16],
  output logic        frame_end
);
  int r = 0; logic [3:0] ch = 0;
  initial begin dout = 0; frame_end = 0; end
  always @(negedge cs_n) begin r = 0; ch = 0; dout = 0; end
  always @(posedge cs_n) begin frame_end = 1; #1 frame_end = 0; end
  always @(posedge sclk) if (!cs_n) begin
    if (r < 4) ch = {ch[2:0], din};
    r++;
  end
  always @(negedge sclk) if (!cs_n && r >= 4 && r < 16) dout = val[ch][11 - (r - 4)];
endmodule
