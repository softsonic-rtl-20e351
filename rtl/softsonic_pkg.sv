// softsonic_pkg - types and constants shared by the SoftSONIC node RTL.
//
// A SoftSONIC system is a network of Nodes that exchange packets. The
// configuration built here is the HDTV one: one packet carries one video line
// of 1920 RGB 4:4:4 pixels with 10 bits per channel, and a buffer word is
// eight pixels wide because an input/output buffer is made of eight 512x36
// block RAMs read and written in parallel. Each pixel sits in the low 30 bits
// of a 36-bit RAM word; the top six bits are written as zero and ignored.
//
// The packet types (line, window, scattered pixels, address-data pairs for
// random memory access, and non-image data) follow the platform description;
// the header layout and the encodings are this design's own choice.
package softsonic_pkg;

  localparam int unsigned CH_W        = 10;    // bits per colour channel
  localparam int unsigned PIX_W       = 3 * CH_W;
  localparam int unsigned WORD_W      = 36;    // block RAM word width
  localparam int unsigned BANKS       = 8;     // block RAMs per buffer = pixels per word
  localparam int unsigned BANK_DEPTH  = 512;   // words per block RAM
  localparam int unsigned LINE_PIX    = 1920;  // pixels per HDTV line
  localparam int unsigned FRAME_LINES = 1080;  // lines per HDTV frame
  localparam int unsigned LINE_WORDS  = LINE_PIX / BANKS;  // 240 buffer words per line
  localparam int unsigned WCNT_W      = 9;     // header word-count field width
  localparam int unsigned LINE_W      = 11;    // header line-number field width
  localparam int unsigned CREG_W      = 16;    // configuration register width

  typedef struct packed {
    logic [CH_W-1:0] r;
    logic [CH_W-1:0] g;
    logic [CH_W-1:0] b;
  } pixel_t;

  typedef enum logic [2:0] {
    PKT_LINE      = 3'd0,  // one image line
    PKT_WINDOW    = 3'd1,  // a rectangular window of pixels
    PKT_SCATTER   = 3'd2,  // scattered pixels
    PKT_ADDR_DATA = 3'd3,  // address-data pairs for random memory access
    PKT_META      = 3'd4   // non-image data (metadata, compressed data, audio)
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e         ptype;
    logic              sof;    // first packet of a frame
    logic [LINE_W-1:0] line;   // line number within the frame
    logic [WCNT_W-1:0] words;  // payload length in buffer words
  } pkt_hdr_t;

  typedef enum logic [2:0] {
    K_INVERT = 3'd0,  // invert colours
    K_DIFF   = 3'd1,  // image differentiator |a-b|
    K_ALPHA  = 3'd2,  // alpha blend of two images, alpha from a CReg
    K_BLUR   = 3'd3,  // 3x3 noise (blur) filter
    K_SOBEL  = 3'd4,  // 2D 3x3 Sobel edge magnitude
    K_LENS   = 3'd5   // thermal-camouflage lens effect
  } kernel_e;

  function automatic pixel_t word2pix(input logic [WORD_W-1:0] w);
    return pixel_t'(w[PIX_W-1:0]);
  endfunction

  function automatic logic [WORD_W-1:0] pix2word(input pixel_t p);
    return {{(WORD_W-PIX_W){1'b0}}, p};
  endfunction

endpackage
