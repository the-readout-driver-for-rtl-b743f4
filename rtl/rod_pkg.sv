// rod_pkg: constants, types and small functions shared by the TileCal ROD
// blocks. Sizes that the ROD description gives (48 channels per superdrawer,
// 7 samples, 16-bit links, 12-bit BCID, 8-bit trigger type, 32-bit event
// identifier, OF weights for -75..+75 ns in 1 ns steps) are used as they are.
// The ADC width (10 bits) follows from a 16-bit dynamic range split by a 64:1
// bi-gain system. Frame layout, fixed-point formats, fragment markers and
// sub-fragment type codes are this design's own choices and are collected
// here so they can be changed in one place.
package rod_pkg;
  localparam int LINK_W   = 16;   // G-Link / staging / PU input word
  localparam int ADC_W    = 10;   // 16-bit range / 64:1 gain ratio
  localparam int N_CH     = 48;   // PMT channels per superdrawer
  localparam int N_SAMP   = 7;    // samples per event frame
  localparam int C_SAMP   = 3;    // index of the central sample
  localparam int BCID_W   = 12;
  localparam int TTYPE_W  = 8;
  localparam int EVID_W   = 32;
  localparam int TTC_W    = TTYPE_W + BCID_W + EVID_W;  // 52-bit TTC word

  // Optimal Filtering weight table
  localparam int W_W      = 16;   // signed weight width
  localparam int WFRAC    = 10;   // fractional bits of a weight
  localparam int N_PHASE  = 151;  // -75 .. +75 ns, 1 ns steps
  localparam int PHASE_MIN = -75;
  localparam int N_KIND   = 5;    // a (amplitude), b (phase), c (pedestal), g, g'
  localparam int K_A = 0, K_B = 1, K_C = 2, K_G = 3, K_GD = 4;
  localparam int TFRAC    = 4;    // fractional bits of the reported phase (1/16 ns)
  localparam int OF_ITER  = 3;    // iterations of the iterative procedure
  localparam int CAL_FRAC = 8;    // fractional bits of the channel calibration constant

  // Front-end frame: first word carries the control flag
  localparam logic [3:0] FE_HDR_TAG = 4'hA;

  // Cells of a long-barrel module (channel pair 2c,2c+1 read cell c)
  localparam int N_CELL   = 24;
  localparam int CELL_A0  = 0;    // A1..A10  -> cells 0..9
  localparam int CELL_BC0 = 10;   // BC1..BC8 -> cells 10..17, B9 -> 18
  localparam int CELL_D0  = 19;   // D0..D3   -> cells 19..22
  localparam int N_DCELL  = 4;
  localparam int N_TOWER  = 10;   // eta bins 0.0 .. 1.0 in steps of 0.1

  // ATLAS style fragment markers and S-Link control words
  localparam logic [31:0] ROD_HDR_MARKER = 32'hEE12_34EE;
  localparam logic [31:0] SUB_MARKER     = 32'hFF12_34FF;
  localparam logic [31:0] SLINK_BOF      = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF      = 32'hE0F0_0000;
  localparam logic [31:0] FORMAT_VERSION = 32'h0301_0000;
  localparam int ROD_HDR_WORDS = 9;
  localparam logic [15:0] SUB_RECO = 16'h0020;
  localparam logic [15:0] SUB_RAW  = 16'h0010;
  localparam logic [15:0] SUB_DQ   = 16'h0030;
  localparam logic [15:0] SUB_L2   = 16'h0040;

  typedef struct packed {
    logic [TTYPE_W-1:0] ttype;
    logic [BCID_W-1:0]  bcid;
    logic [EVID_W-1:0]  evid;
  } ttc_info_t;

  // One link word after the G-Link: control flag (start of frame) + data
  typedef struct packed {
    logic              ctrl;
    logic [LINK_W-1:0] data;
  } link_word_t;

  // Data-quality flags kept per superdrawer and event
  typedef struct packed {
    logic evid_mismatch;
    logic bcid_mismatch;
    logic saturated;
    logic len_err;
    logic crc_err;
  } dq_t;

  // CRC-16-CCITT (x^16+x^12+x^5+1), one 16-bit word, MSB first
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = (c << 1) ^ 16'h1021;
      else              c = c << 1;
    end
    return c;
  endfunction
endpackage
