// temp_monitor: reads the G-Link temperatures from the serial ADC that sits
// next to the Staging FPGA (thermistor per G-Link, analog multiplexer,
// serial output) and keeps, per G-Link, the current, maximum and minimum
// reading for read-only registers. The ROD description gives the purpose and
// the three values; the ADC frame is this design's choice: adc_cs_n low for
// 16 SCLK periods, the 4-bit multiplexer channel is sent MSB first on
// adc_din during the first 4 periods and the 12-bit result returns MSB first
// on adc_dout during the last 12, sampled on the rising SCLK edge. SCLK is
// clk divided by 2*SCLK_DIV. Channels are converted round robin; a frame
// takes 32*SCLK_DIV clocks plus a gap of 4 clocks. clr resets max/min to
// the next reading.
module temp_monitor #(
  parameter int N_SENS   = 2,
  parameter int SCLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  output logic        adc_din,
  input  logic        adc_dout,
  output logic [11:0] t_cur [N_SENS],
  output logic [11:0] t_max [N_SENS],
  output logic [11:0] t_min [N_SENS],
  output logic        t_update
);
  localparam int CW = $clog2(N_SENS) > 0 ? $clog2(N_SENS) : 1;
  logic [CW-1:0] ch;
  logic [4:0]  bitn;          // SCLK period inside the frame
  logic [$clog2(SCLK_DIV+1):0] div;
  logic [11:0] shin;
  logic [2:0]  gap;
  logic        active;
  logic        first [N_SENS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch <= '0; bitn <= '0; div <= '0; shin <= '0; gap <= '0; active <= 1'b0;
      adc_cs_n <= 1'b1; adc_sclk <= 1'b0; adc_din <= 1'b0; t_update <= 1'b0;
      for (int i = 0; i < N_SENS; i++) begin
        t_cur[i] <= '0; t_max[i] <= '0; t_min[i] <= '1; first[i] <= 1'b1;
      end
    end else begin
      t_update <= 1'b0;
      if (clr) for (int i = 0; i < N_SENS; i++) first[i] <= 1'b1;
      if (!active) begin
        adc_cs_n <= 1'b1; adc_sclk <= 1'b0;
        if (gap == 3'd3) begin
          active <= 1'b1; adc_cs_n <= 1'b0; bitn <= '0; div <= '0;
          adc_din <= 1'(4'(ch) >> 3);
          gap <= '0;
        end else gap <= gap + 1'b1;
      end else begin
        if (div == ($clog2(SCLK_DIV+1)+1)'(SCLK_DIV-1)) begin
          div <= '0;
          adc_sclk <= ~adc_sclk;
          if (!adc_sclk) begin
            // rising edge: sample result bits
            if (bitn >= 5'd4) shin <= {shin[10:0], adc_dout};
          end else begin
            // falling edge: next bit period
            if (bitn == 5'd15) begin
              active <= 1'b0; adc_cs_n <= 1'b1;
              t_cur[ch] <= shin; t_update <= 1'b1;
              if (first[ch] || shin > t_max[ch]) t_max[ch] <= shin;
              if (first[ch] || shin < t_min[ch]) t_min[ch] <= shin;
              first[ch] <= 1'b0;
              ch <= (ch == CW'(N_SENS-1)) ? '0 : ch + 1'b1;
            end else begin
              bitn <= bitn + 1'b1;
              adc_din <= (bitn < 5'd3) ? 1'((4'(ch) >> (2 - bitn[1:0]))) : 1'b0;
            end
          end
        end else div <= div + 1'b1;
      end
    end
  end
endmodule
