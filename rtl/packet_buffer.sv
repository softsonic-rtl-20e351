// packet_buffer - bounded packet FIFO used as a Node input or output buffer.
//
// The buffer holds SLOTS packets (two one-line packets in the HDTV setup, so
// one line can be read while the next is written). Its memory is BANKS block
// RAMs of BANK_DEPTH x WORD_W working side by side: a buffer word is one word
// from every bank, i.e. BANKS pixels, so BANKS pixels are written and read
// per cycle. Slot s occupies bank addresses s*SLOT_WORDS .. s*SLOT_WORDS +
// SLOT_WORDS-1 (with 2 slots of 256 words a 240-word line fits in each).
// The packet header is kept in a register per slot. An s_box keeps the status.
//
// Producer side: while wr_free is high, write the payload with wr_en/wr_addr
// (word index inside the packet) in any order, then pulse wr_commit with the
// header; the last word may be written in the commit cycle.
// Consumer side: while rd_avail is high, rd_hdr is the header of the oldest
// packet; present rd_addr (word index) and rd_data follows one clock later.
// Pulse rd_release when done with the packet.
//
// Follows the platform: bounded FIFO of packets, blocking full and empty,
// eight 512x36 block RAMs per buffer, buffer size of two packets. The header
// storage and the port protocol are this design's own.
module packet_buffer
  import softsonic_pkg::*;
#(
  parameter int unsigned SLOTS      = 2,
  parameter int unsigned NBANKS     = BANKS,
  parameter int unsigned DEPTH      = BANK_DEPTH,
  parameter int unsigned WW         = WORD_W,
  parameter int unsigned SLOT_WORDS = DEPTH / SLOTS,
  parameter int unsigned AW         = $clog2(SLOT_WORDS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // producer
  output logic                         wr_free,
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [NBANKS-1:0][WW-1:0]    wr_data,
  input  logic                         wr_commit,
  input  pkt_hdr_t                     wr_hdr,
  // consumer
  output logic                         rd_avail,
  output pkt_hdr_t                     rd_hdr,
  input  logic [AW-1:0]                rd_addr,
  output logic [NBANKS-1:0][WW-1:0]    rd_data,
  input  logic                         rd_release,
  // status
  output logic [$clog2(SLOTS+1)-1:0]   count
);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned MA = $clog2(DEPTH);

  logic [SW-1:0] wr_slot, rd_slot;
  pkt_hdr_t      hdr_q [SLOTS];

  s_box #(.SLOTS(SLOTS)) u_sbox (
    .clk, .rst_n,
    .commit   (wr_commit),
    .release_i(rd_release),
    .wr_slot, .rd_slot, .count, .wr_free, .rd_avail
  );

  // slot base + word index; SLOT_WORDS need not be a power of two
  logic [MA-1:0] waddr_full, raddr_full;
  assign waddr_full = MA'(wr_slot * SLOT_WORDS + wr_addr);
  assign raddr_full = MA'(rd_slot * SLOT_WORDS + rd_addr);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    bram_bank #(.DEPTH(DEPTH), .WIDTH(WW)) u_ram (
      .clk,
      .we   (wr_en),
      .waddr(waddr_full),
      .wdata(wr_data[b]),
      .raddr(raddr_full),
      .rdata(rd_data[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) hdr_q[s] <= '0;
    end else if (wr_commit) begin
      hdr_q[wr_slot] <= wr_hdr;
    end
  end
  assign rd_hdr = hdr_q[rd_slot];

  a_write_needs_space: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_free)
    else $error("packet_buffer: write while no slot is free");

endmodule
