`timescale 1ns/1ps
// tb_staging_fpga: two G-Link inputs in their own clocks and two neighbour
// inputs send numbered words (source id in the top bits); each PU output is
// checked to carry exactly the stream of the source its route selects, in
// order and without loss. The own links must also appear on the neighbour
// outputs. Then a frame is loaded into the test RAM and replayed, and the
// G-Link control pins and the temperature registers are read back.
module tb_staging_fpga;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #6.25 clk = ~clk;
  int checks = 0, failures = 0;
  logic gc0 = 0, gc1 = 0;
  always #12.4 gc0 = ~gc0;
  always #12.6 gc1 = ~gc1;
  logic glink_clk [2];
  assign glink_clk[0] = gc0; assign glink_clk[1] = gc1;
  logic [15:0] glink_data [2]; logic glink_dav [2], glink_cav [2], glink_rst_n [2];
  logic [3:0] glink_cfg [2];
  link_word_t nb_in [2], nb_out [2], pu_out [4];
  logic nb_in_valid [2], nb_out_valid [2], pu_valid [4];
  logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata; logic reg_we = 0, reg_re = 0;
  logic adc_cs_n, adc_sclk, adc_din, adc_dout, fe_end;
  logic [11:0] val [16];
  staging_fpga dut (.*);
  adc_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout), .val, .frame_end(fe_end));
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  bit run = 0;
  int sent [4] = '{0, 0, 0, 0};
  // sources: 0/1 own G-Links, 2/3 neighbour inputs; word = {src3, seq13}, ctrl every 16th
  for (genvar i = 0; i < 2; i++) begin : g_src
    initial begin glink_data[i] = 0; glink_dav[i] = 0; glink_cav[i] = 0; end
    always @(posedge glink_clk[i]) begin
      glink_dav[i] <= 0;
      if (run && $urandom_range(0, 3) != 0) begin
        glink_dav[i] <= 1; glink_data[i] <= {3'(i), 13'(sent[i])}; glink_cav[i] <= (sent[i] % 16 == 0);
        sent[i] <= sent[i] + 1;
      end
    end
    initial begin nb_in[i] = '0; nb_in_valid[i] = 0; end
    always @(negedge clk) begin
      nb_in_valid[i] = run && $urandom_range(0, 1);
      if (nb_in_valid[i]) begin nb_in[i] = '{ctrl: (sent[2+i] % 16 == 0), data: {3'(2 + i), 13'(sent[2+i])}}; sent[2+i]++; end
    end
  end
  int got [4] = '{0, 0, 0, 0}, got_nb [2] = '{0, 0};
  int route_src [4] = '{-1, -1, -1, -1};
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) if (pu_valid[k]) begin
      checks++;
      if (route_src[k] < 0) failures++;
      else if (route_src[k] < 4 && (pu_out[k].data != {3'(route_src[k]), 13'(got[k])} || pu_out[k].ctrl != (got[k] % 16 == 0))) begin
        failures++; if (failures < 10) $display("out%0d %h exp src%0d seq%0d", k, pu_out[k].data, route_src[k], got[k]);
      end
      got[k]++;
    end
    for (int i = 0; i < 2; i++) if (nb_out_valid[i]) begin
      checks++; if (nb_out[i].data != {3'(i), 13'(got_nb[i])}) failures++;
      got_nb[i]++;
    end
  end
  task automatic wr(input int a, input int v);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = 32'(v); @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); reg_re = 1; reg_addr = 8'(a); @(negedge clk); reg_re = 0; v = reg_rdata;
  endtask
  initial begin
    logic [31:0] v;
    for (int i = 0; i < 16; i++) val[i] = 12'(300 + i);
    repeat (3) @(negedge clk); rst_n = 1;
    checks++; if (glink_rst_n[0] || glink_rst_n[1]) failures++;
    wr(1, 32'h0000_A500);
    checks++; if (!glink_rst_n[0] || glink_rst_n[1] != 1 || glink_cfg[0] != 4'h5 || glink_cfg[1] != 4'hA) failures++;
    // route: out0 <- own1, out1 <- neighbour0, out2 <- own0, out3 <- neighbour1
    wr(0, 2 | 3 << 3 | 1 << 6 | 4 << 9);
    route_src = '{1, 2, 0, 3};
    run = 1;
    repeat (3000) @(negedge clk);
    run = 0;
    repeat (50) @(negedge clk);
    for (int k = 0; k < 4; k++) begin checks++; if (got[k] != sent[route_src[k]] || got[k] < 100) begin failures++; $display("out%0d got %0d sent %0d", k, got[k], sent[route_src[k]]); end end
    // test RAM replay on out3
    wr(0, 5 << 9); route_src = '{-1, -1, -1, 9}; got[3] = 0;
    wr(3, 0);
    for (int i = 0; i < 40; i++) wr(4, (i == 0) << 16 | (16'hA000 + i));
    wr(3, 5); rd(4, v); checks++; if (v != 32'h0000_A005) failures++;
    wr(2, 40 | 1 << 16);
    repeat (60) @(negedge clk);
    checks++; if (got[3] != 40) begin failures++; $display("replayed %0d", got[3]); end
    // temperatures
    repeat (2000) @(negedge clk);
    rd(8, v); checks++; if (v[11:0] != 12'(300)) begin failures++; $display("temp %h", v); end
    rd(10, v); checks++; if (v[11:0] != 12'(301)) begin failures++; $display("temp1 %h", v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // replayed words: {ctrl on first, A000+i}
  int rp = 0;
  always @(posedge clk) if (pu_valid[3] && route_src[3] == 9) begin
    checks++; if (pu_out[3].data != 16'(16'hA000 + rp) || pu_out[3].ctrl != (rp == 0)) failures++;
    rp++;
  end
endmodule
