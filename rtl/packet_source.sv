// packet_source - Packet Source Node: cuts video into one-line packets.
//
// Video arrives as buffer words of BANKS pixels on in_valid/in_ready, a
// foreground word (fg_data) and the matching background word (bg_data) in
// the same beat. The source writes each beat into N_OUT downstream input
// buffers at once; output i receives the background stream when BG_MASK[i]
// is set and the foreground otherwise, so one stream can be forked to several
// Nodes. After LINE_WORDS beats it commits a PKT_LINE packet on every output,
// with the line number (0 .. FRAME_LINES-1, wrapping) and a start-of-frame
// flag in the header.
//
// Writing is blocking: in_ready is high only while every output buffer has a
// free slot (a slot stays free until it is committed, so a started line
// always completes). One beat per clock when nothing blocks. The last word
// and the commit share a clock.
//
// The platform names the Packet Source and says packets are one line; how it
// takes in video (in the evaluated board, from external ZBT SRAM) is not
// described, so this streaming input and the fork by output mask are this
// design's own.
module packet_source
  import softsonic_pkg::*;
#(
  parameter int unsigned    N_OUT       = 4,
  parameter logic [N_OUT-1:0] BG_MASK   = N_OUT'(1) << (N_OUT - 1),
  parameter int unsigned    LINE_WORDS_P = LINE_WORDS,
  parameter int unsigned    FRAME_LINES_P = FRAME_LINES,
  parameter int unsigned    AW          = $clog2(BANK_DEPTH / 2)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  logic     [BANKS-1:0][WORD_W-1:0]      fg_data,
  input  logic     [BANKS-1:0][WORD_W-1:0]      bg_data,
  input  logic     [N_OUT-1:0]                  out_free,
  output logic     [N_OUT-1:0]                  out_wr_en,
  output logic     [N_OUT-1:0][AW-1:0]          out_wr_addr,
  output logic     [N_OUT-1:0][BANKS-1:0][WORD_W-1:0] out_wr_data,
  output logic     [N_OUT-1:0]                  out_commit,
  output pkt_hdr_t [N_OUT-1:0]                  out_hdr,
  output logic                                  line_done
);
  logic [AW-1:0]     wcnt;
  logic [LINE_W-1:0] line;
  logic              beat, last;
  pkt_hdr_t          hdr;

  assign in_ready = &out_free;
  assign beat     = in_valid && in_ready;
  assign last     = beat && (wcnt == AW'(LINE_WORDS_P - 1));
  assign line_done = last;

  always_comb begin
    hdr       = '0;
    hdr.ptype = PKT_LINE;
    hdr.sof   = (line == '0);
    hdr.line  = line;
    hdr.words = WCNT_W'(LINE_WORDS_P);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0;
      line <= '0;
    end else if (beat) begin
      if (last) begin
        wcnt <= '0;
        line <= (line == LINE_W'(FRAME_LINES_P - 1)) ? '0 : line + 1'b1;
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    assign out_wr_en[i]   = beat;
    assign out_wr_addr[i] = wcnt;
    for (genvar p = 0; p < BANKS; p++) begin : g_pix
      // only the 30 pixel bits are carried; the spare RAM bits are zero
      assign out_wr_data[i][p] = BG_MASK[i] ? pix2word(word2pix(bg_data[p]))
                                            : pix2word(word2pix(fg_data[p]));
    end
    assign out_commit[i]  = last;
    assign out_hdr[i]     = hdr;
  end

endmodule
