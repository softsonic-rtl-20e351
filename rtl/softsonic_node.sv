// softsonic_node - one SoftSONIC Node: input buffer(s), engine wrapper, engines.
//
// A Node owns N_IN input packet buffers (each SLOTS one-line packets in eight
// block RAMs). Its upstream producers write them through the in_wr_* ports and
// are held off by in_free. The engine wrapper fires when every input holds a
// packet and the downstream buffer has room, runs the packet through
// NUM_ENGINES copies of the KERNEL engine, and writes the result through the
// out_* ports straight into the downstream Node's input buffer: with
// point-to-point connection the output buffer of this Node is the input
// buffer of the next, so it is not duplicated here.
//
// An input marked in DEEP_MASK gets DEEP_SLOTS packet slots instead of SLOTS
// (its banks grow to BANK_DEPTH/SLOTS*DEEP_SLOTS words). This is for inputs
// that bypass a longer path of Nodes and must hold more lines until the
// other inputs of a join catch up.
//
// Timing: see engine_wrapper (E pixels per clock, a few clocks per packet to
// drain) and packet_buffer (one-clock read latency).
//
// Follows the Node structure of the platform (buffers with status boxes,
// wrapper, engines) and its point-to-point option; where the buffers sit is
// this design's choice, which matches the block RAM counts given for the
// evaluated nodes (8 per input, plus 16 for the two line memories of a 3x3
// node).
module softsonic_node
  import softsonic_pkg::*;
#(
  parameter int unsigned N_IN        = 1,
  parameter int unsigned NUM_ENGINES = 1,
  parameter bit          WINDOW      = 1'b0,
  parameter kernel_e     KERNEL      = K_INVERT,
  parameter int unsigned SLOTS       = 2,
  parameter logic [N_IN-1:0] DEEP_MASK = '0,       // inputs given DEEP_SLOTS slots
  parameter int unsigned DEEP_SLOTS  = 4,
  parameter int unsigned AW          = $clog2(BANK_DEPTH / SLOTS)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // input buffers, producer side
  output logic     [N_IN-1:0]                   in_free,
  input  logic     [N_IN-1:0]                   in_wr_en,
  input  logic     [N_IN-1:0][AW-1:0]           in_wr_addr,
  input  logic     [N_IN-1:0][BANKS-1:0][WORD_W-1:0] in_wr_data,
  input  logic     [N_IN-1:0]                   in_wr_commit,
  input  pkt_hdr_t [N_IN-1:0]                   in_wr_hdr,
  // downstream buffer, producer side
  input  logic                                  out_free,
  output logic                                  out_wr_en,
  output logic     [AW-1:0]                     out_wr_addr,
  output logic     [BANKS-1:0][WORD_W-1:0]      out_wr_data,
  output logic                                  out_commit,
  output pkt_hdr_t                              out_hdr,
  // configuration register
  input  logic                                  creg_we,
  input  logic     [CREG_W-1:0]                 creg_data,
  // status
  output logic                                  busy,
  output logic                                  fire,
  output logic                                  out_blocked,
  output logic                                  creg_applied
);
  logic     [N_IN-1:0]                        avail;
  pkt_hdr_t [N_IN-1:0]                        hdr;
  logic     [AW-1:0]                          rd_addr;
  logic     [N_IN-1:0][BANKS-1:0][WORD_W-1:0] rd_data;
  logic                                       release_all;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    localparam int unsigned NS = DEEP_MASK[i] ? DEEP_SLOTS : SLOTS;
    packet_buffer #(.SLOTS(NS), .DEPTH(BANK_DEPTH / SLOTS * NS), .SLOT_WORDS(BANK_DEPTH / SLOTS), .AW(AW)) u_buf (
      .clk, .rst_n,
      .wr_free   (in_free[i]),
      .wr_en     (in_wr_en[i]),
      .wr_addr   (in_wr_addr[i]),
      .wr_data   (in_wr_data[i]),
      .wr_commit (in_wr_commit[i]),
      .wr_hdr    (in_wr_hdr[i]),
      .rd_avail  (avail[i]),
      .rd_hdr    (hdr[i]),
      .rd_addr   (rd_addr),
      .rd_data   (rd_data[i]),
      .rd_release(release_all),
      .count     ()
    );
  end

  engine_wrapper #(
    .N_IN(N_IN), .NUM_ENGINES(NUM_ENGINES), .WINDOW(WINDOW), .KERNEL(KERNEL), .AW(AW)
  ) u_wrapper (
    .clk, .rst_n,
    .in_avail    (avail),
    .in_hdr      (hdr),
    .in_rd_addr  (rd_addr),
    .in_rd_data  (rd_data),
    .in_release  (release_all),
    .out_free, .out_wr_en, .out_wr_addr, .out_wr_data, .out_commit, .out_hdr,
    .creg_we, .creg_data,
    .busy, .fire, .out_blocked, .creg_applied
  );

endmodule
