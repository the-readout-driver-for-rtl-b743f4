`timescale 1ns/1ps
// fe_model: behavioural front end of one superdrawer behind its G-Link
// receiver. On each trig pulse it queues (bcid, evid) and then sends, in
// glink_clk, the frame: control word {4'hA, bcid}, evid[15:0], 48 channels
// x 7 samples {5'b0, gain=1, adc} from tb_fe_pkg, and CRC-16-CCITT. With
// bad_crc set at trigger time the CRC word of that frame is inverted.
// Frame words are separated by a random idle clock now and then.
module fe_model #(
  parameter int LINK = 0
) (
  input  logic        glink_clk,
  input  logic        trig,
  input  logic [11:0] bcid,
  input  logic [15:0] evid,
  input  int          ev,
  input  logic        bad_crc,
  output logic [15:0] glink_data,
  output logic        glink_dav,
  output logic        glink_cav
);
  import rod_pkg::*;
  import tb_fe_pkg::*;
  typedef struct { logic [11:0] bcid; logic [15:0] evid; int ev; logic bad; } req_t;
  req_t q [$];
  initial begin glink_data = 0; glink_dav = 0; glink_cav = 0; end
  always @(posedge trig) q.push_back('{bcid, evid, ev, bad_crc});
  task automatic put(input logic [15:0] w, input logic c);
    if ($urandom_range(0, 15) == 0) begin glink_dav <= 0; glink_cav <= 0; @(posedge glink_clk); end
    glink_data <= w; glink_dav <= 1; glink_cav <= c; @(posedge glink_clk);
  endtask
  initial forever begin
    req_t r; logic [15:0] crc, w;
    @(posedge glink_clk);
    if (q.size() != 0) begin
      r = q.pop_front();
      w = {4'hA, r.bcid}; crc = crc16_word(16'hFFFF, w); put(w, 1'b1);
      w = r.evid; crc = crc16_word(crc, w); put(w, 1'b0);
      for (int c = 0; c < N_CH; c++)
        for (int i = 0; i < N_SAMP; i++) begin
          w = {5'b0, 1'b1, 10'(fe_samp(LINK, r.ev, c, i))}; crc = crc16_word(crc, w); put(w, 1'b0);
        end
      put(r.bad ? ~crc : crc, 1'b0);
      glink_dav <= 0; glink_cav <= 0;
    end
  end
endmodule
