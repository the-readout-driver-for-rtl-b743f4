`timescale 1ns/1ps
// tb_input_fpga: two links send random front-end frames. Checks the stored
// header and channel words, CRC and saturation flags, busy at N_SLOT-1
// slots, dropping and counting of frames when all slots are used, slot
// release order, and two-gain selection after a serial configuration word.
module tb_input_fpga;
  import rod_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge resets the asynchronous flops at once
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  link_word_t lw [2];
  logic lw_valid [2];
  logic cfg_load = 0, cfg_busy, cfg_fs, cfg_sd;
  logic [15:0] cfg_word = 0;
  logic rd_en = 0, rd_feb = 0, ev_ready, irq, release_ev = 0, busy;
  logic [6:0] rd_word = 0;
  logic [63:0] rd_data;
  logic [15:0] status;
  serial_tx #(.W(16)) u_cfg (.clk, .rst_n, .load(cfg_load), .data(cfg_word), .busy(cfg_busy), .fs(cfg_fs), .sd(cfg_sd));
  input_fpga #(.N_SLOT(4)) dut (.*);
  initial begin #20_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // stored expectation per event and link
  logic [10:0] es [8][2][48][7];
  logic [4:0]  edq [8][2];
  int n_irq = 0;
  always @(posedge clk) if (irq) n_irq++;
  // frame on both links; gains: 1 or 2 blocks; bad_crc per link; sat forces channel 3 high gain to 1023
  task automatic send_link(input int ll, input int ev, input bit two, input bit bad, input bit sat);
    logic [15:0] crc, w;
    logic [9:0] v [2][7];
    @(negedge clk);
    w = {4'hA, 12'(ev * 5)}; crc = crc16_word(16'hFFFF, w);
    lw_valid[ll] = 1; lw[ll] = '{ctrl: 1'b1, data: w}; @(negedge clk);
    w = 16'(ev); crc = crc16_word(crc, w); lw[ll] = '{ctrl: 1'b0, data: w}; @(negedge clk);
    for (int c = 0; c < 48; c++) begin
      bit usehi;
      for (int g = 0; g < 2; g++) for (int i = 0; i < 7; i++) v[g][i] = 10'($urandom_range(0, 1000));
      if (sat && c == 3) v[1][2] = 10'd1023;
      usehi = two && !(sat && c == 3);
      for (int i = 0; i < 7; i++) es[ev % 8][ll][c][i] = two ? (usehi ? {1'b1, v[1][i]} : {1'b0, v[0][i]}) : {1'b1, v[1][i]};
      for (int g = two ? 0 : 1; g < 2; g++)
        for (int i = 0; i < 7; i++) begin
          w = {5'b0, 1'(g), v[g][i]}; crc = crc16_word(crc, w);
          lw[ll] = '{ctrl: 1'b0, data: w}; @(negedge clk);
        end
    end
    lw[ll] = '{ctrl: 1'b0, data: bad ? ~crc : crc}; @(negedge clk);
    lw_valid[ll] = 0;
    edq[ev % 8][ll] = {2'b0, sat && !two, 1'b0, bad};   // a saturated high gain is replaced by the low gain
  endtask
  // frame on both links; gains: 1 or 2 blocks; bad CRC per link; sat forces a high-gain sample of channel 3 to 1023
  task automatic send(input int ev, input bit two, input bit [1:0] bad, input bit sat);
    fork
      send_link(0, ev, two, bad[0], sat);
      send_link(1, ev, two, bad[1], sat);
    join
  endtask
  task automatic rdw(input bit f, input int w, output logic [63:0] d);
    @(negedge clk); rd_en = 1; rd_feb = f; rd_word = 7'(w); @(negedge clk); rd_en = 0; d = rd_data;
  endtask
  task automatic check_event(input int ev);
    logic [63:0] d;
    checks++; if (!ev_ready) failures++;
    for (int f = 0; f < 2; f++) begin
      rdw(f, 0, d);
      checks++;
      if (d != {11'h0, edq[ev % 8][f], 16'(ev), 4'h0, 12'(ev * 5), 16'd48}) begin failures++; $display("hdr ev%0d f%0d %h", ev, f, d); end
      for (int c = 0; c < 48; c += 5) begin
        logic [63:0] d1;
        rdw(f, 1 + 2*c, d); rdw(f, 2 + 2*c, d1);
        checks++;
        if (d != {5'h0, es[ev%8][f][c][3], 5'h0, es[ev%8][f][c][2], 5'h0, es[ev%8][f][c][1], 5'h0, es[ev%8][f][c][0]} ||
            d1 != {16'h0, 5'h0, es[ev%8][f][c][6], 5'h0, es[ev%8][f][c][5], 5'h0, es[ev%8][f][c][4]}) begin
          failures++; $display("data ev%0d f%0d c%0d %h %h", ev, f, c, d, d1);
        end
      end
    end
    @(negedge clk); release_ev = 1; @(negedge clk); release_ev = 0;
  endtask
  initial begin
    lw_valid = '{0, 0}; lw[0] = '0; lw[1] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // fill all four slots, then two frames are dropped
    for (int e = 0; e < 6; e++) begin
      send(e, 0, (e == 1) ? 2'b10 : 2'b00, e == 3);
      repeat (5) @(negedge clk);
      if (e == 2) begin checks++; if (!busy) failures++; end
      if (e == 1) begin checks++; if (busy) failures++; end
    end
    checks += 2;
    if (status != 16'd2) begin failures++; $display("dropped %0d", status); end   // two events dropped
    if (n_irq != 1) failures++;
    for (int e = 0; e < 4; e++) check_event(e);
    repeat (3) @(negedge clk);
    checks++; if (ev_ready || busy) failures++;
    // two gains
    @(negedge clk); cfg_load = 1; cfg_word = 16'h001F; @(negedge clk); cfg_load = 0;
    repeat (30) @(negedge clk);
    for (int e = 6; e < 9; e++) begin
      send(e, 1, 2'b00, e == 7);
      repeat (5) @(negedge clk);
      check_event(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
