// packet_sink - Packet Sink Node: input buffer plus a reader that streams the
// packets out as video words.
//
// Upstream Nodes write whole line packets into the sink's input buffer
// (in_wr_* ports, in_free). The reader takes the oldest packet, reads its
// words in order and presents them on out_data/out_valid with the packet's
// line number, start-of-frame flag (on the first word of line 0) and an
// end-of-line flag on the last word; out_ready from the consumer may stall it
// at any time. A two-entry queue behind the one-clock buffer read keeps one
// word per clock flowing while out_ready stays high. The packet is released
// once its last word has been read.
//
// The platform names the Packet Sink as the Node that consumes packets; on
// the evaluated board it wrote frames to external memory, which is not
// described. This streaming output is this design's own.
module packet_sink
  import softsonic_pkg::*;
#(
  parameter int unsigned SLOTS = 2,
  parameter int unsigned AW    = $clog2(BANK_DEPTH / SLOTS)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  output logic                             in_free,
  input  logic                             in_wr_en,
  input  logic [AW-1:0]                    in_wr_addr,
  input  logic [BANKS-1:0][WORD_W-1:0]     in_wr_data,
  input  logic                             in_wr_commit,
  input  pkt_hdr_t                         in_wr_hdr,
  output logic                             out_valid,
  input  logic                             out_ready,
  output logic [BANKS-1:0][WORD_W-1:0]     out_data,
  output logic [LINE_W-1:0]                out_line,
  output logic                             out_sof,
  output logic                             out_eol
);
  typedef struct packed {
    logic [BANKS-1:0][WORD_W-1:0] data;
    logic [LINE_W-1:0]            line;
    logic                         sof;
    logic                         eol;
  } beat_t;

  logic                          avail, rel;
  pkt_hdr_t                      hdr;
  logic [AW-1:0]                 raddr;
  logic [BANKS-1:0][WORD_W-1:0]  rdata;

  packet_buffer #(.SLOTS(SLOTS), .DEPTH(BANK_DEPTH), .SLOT_WORDS(BANK_DEPTH / SLOTS), .AW(AW)) u_buf (
    .clk, .rst_n,
    .wr_free   (in_free),
    .wr_en     (in_wr_en),
    .wr_addr   (in_wr_addr),
    .wr_data   (in_wr_data),
    .wr_commit (in_wr_commit),
    .wr_hdr    (in_wr_hdr),
    .rd_avail  (avail),
    .rd_hdr    (hdr),
    .rd_addr   (raddr),
    .rd_data   (rdata),
    .rd_release(rel),
    .count     ()
  );

  // read issue
  logic        pend;          // a read was issued last clock
  beat_t       pend_meta;
  beat_t       q [2];
  logic [1:0]  qcount;
  logic        pop, issue, last_word;

  assign pop       = out_valid && out_ready;
  assign last_word = (raddr == AW'(hdr.words - 1'b1));
  assign issue     = avail && ((32'(qcount) - 32'(pop) + 32'(pend)) < 2);
  assign rel       = issue && last_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr     <= '0;
      pend      <= 1'b0;
      pend_meta <= '0;
    end else begin
      pend <= issue;
      if (issue) begin
        pend_meta.line <= hdr.line;
        pend_meta.sof  <= hdr.sof && (raddr == '0);
        pend_meta.eol  <= last_word;
        raddr          <= last_word ? '0 : raddr + 1'b1;
      end
    end
  end

  // two-entry output queue; q[0] is the head
  beat_t incoming;
  always_comb begin
    incoming      = pend_meta;
    incoming.data = rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcount <= '0;
      q[0]   <= '0;
      q[1]   <= '0;
    end else begin
      case ({pend, pop})
        2'b10: begin
          if (qcount == 2'd0) q[0] <= incoming;
          else                q[1] <= incoming;
          qcount <= qcount + 1'b1;
        end
        2'b01: begin
          q[0]   <= q[1];
          qcount <= qcount - 1'b1;
        end
        2'b11: begin
          if (qcount == 2'd1) q[0] <= incoming;
          else begin
            q[0] <= q[1];
            q[1] <= incoming;
          end
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (qcount != 2'd0);
  assign out_data  = q[0].data;
  assign out_line  = q[0].line;
  assign out_sof   = q[0].sof;
  assign out_eol   = q[0].eol;

  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n) qcount <= 2'd2)
    else $error("packet_sink: output queue overflow");

endmodule
