// tb_fe_pkg: the data the front-end model sends, shared by the frame
// generator and the checkers. Every channel carries a pulse
// ped + amp*shape(i)/256 with ped = 40 and amp a hash of (link, event,
// channel) in 1..900, so samples stay below saturation and the central
// sample is ped + amp.
package tb_fe_pkg;
  localparam int FE_PED = 40;
  localparam int FE_SHAPE [7] = '{0, 20, 140, 256, 180, 90, 30};
  function automatic int fe_amp(int link, int ev, int ch);
    int unsigned h;
    h = 32'(link) * 32'd2654435761 ^ 32'(ev) * 32'd40503 ^ 32'(ch) * 32'd977;
    h ^= h >> 13; h *= 32'd1274126177; h ^= h >> 16;
    return 1 + int'(h % 900);
  endfunction
  function automatic int fe_samp(int link, int ev, int ch, int i);
    return FE_PED + (fe_amp(link, ev, ch) * FE_SHAPE[i]) / 256;
  endfunction
endpackage
