`timescale 1ns/1ps
// tb_temp_monitor: the monitor polls two channels of a serial ADC model;
// random temperatures are changed between frames and current, maximum and
// minimum readings are checked, including the clear of max/min.
module tb_temp_monitor;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, adc_cs_n, adc_sclk, adc_din, adc_dout, t_update, frame_end;
  logic [11:0] t_cur [2], t_max [2], t_min [2];
  logic [11:0] val [16];
  temp_monitor dut (.*);
  adc_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout), .val, .frame_end);
  int mx [2], mn [2]; int ch = 0;
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 16; i++) val[i] = 12'(16 * i);
    val[0] = 12'($urandom); val[1] = 12'($urandom);
    mx = '{-1, -1}; mn = '{5000, 5000};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int v;
      v = val[ch];
      @(posedge t_update); @(negedge clk);
      if (n == 30) begin @(negedge clk); clr = 1; @(negedge clk); clr = 0; mx = '{-1, -1}; mn = '{5000, 5000}; end
      else begin
        if (v > mx[ch]) mx[ch] = v;
        if (v < mn[ch]) mn[ch] = v;
        checks += 3;
        if (t_cur[ch] != 12'(v)) begin failures++; $display("cur ch%0d %h %h", ch, t_cur[ch], v); end
        if (t_max[ch] != 12'(mx[ch])) failures++;
        if (t_min[ch] != 12'(mn[ch])) failures++;
      end
      val[ch] = 12'($urandom);
      ch ^= 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
