// softsonic_top - thermal camouflage application built from SoftSONIC Nodes.
//
// Six Nodes connected point-to-point (each producer writes straight into its
// consumer's input buffer):
//
//   video in --> Packet Source --fg--> 3x3 Blur ----> 3x3 Sobel ---edge--+
//                      |  |  +--fg--> Image Differentiator --diff--------+--> Lens Effect --> Packet Sink --> video out
//                      |  +-----bg-----^                                  |
//                      +--------fg----------------------------------------+
//
// The source forks the foreground line into three Nodes and sends the
// background line to the differentiator. The lens Node joins three streams:
// where the foreground differs from the background it displaces pixels
// horizontally by an amount that grows with the edge strength, which makes a
// semi-transparent object visible as a refraction pattern.
//
// Ports: video enters as buffer words of 8 pixels (foreground and background
// beat by beat, in_valid/in_ready) and leaves the same way with line number,
// start-of-frame and end-of-line flags (out_valid/out_ready). CRegs are
// written through creg_we/creg_sel/creg_data: creg_sel 0 blur, 1 Sobel,
// 2 differentiator, 3 lens (its difference threshold). Status outputs show
// which Nodes are busy, starting a packet,
// blocked by a full downstream buffer or taking a CReg write.
//
// Timing: every Node handles NUM_ENGINES pixels per clock; with one engine a
// 1920x1080 frame needs about 2.07 M clocks, 64 frames/s at 133 MHz, and two
// engines per Node double that. Each 3x3 Node delays its picture by one line
// and one pixel (windows are causal), so the edge image reaching the lens is
// offset by two lines and two pixels from the foreground; the lens rule
// accepts that offset.
//
// Buffers: every input buffer holds two one-line packets except the lens
// Node's foreground and difference inputs, which hold four. Those two streams
// bypass the blur and Sobel Nodes, whose results arrive two line times
// later; with two slots the source would stall on them and the frame rate
// would drop by a third.
//
// The Node set, the one-line packets, two-packet buffers of eight block RAMs
// and point-to-point links follow the platform's application; the exact
// topology (which Node feeds which) and the kernels' arithmetic are this
// design's reading of the application's description.
module softsonic_top
  import softsonic_pkg::*;
#(
  parameter int unsigned NUM_ENGINES   = 1,
  parameter int unsigned LINE_WORDS_P  = LINE_WORDS,
  parameter int unsigned FRAME_LINES_P = FRAME_LINES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // video in (from external memory / video input)
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [BANKS-1:0][WORD_W-1:0]  fg_data,
  input  logic [BANKS-1:0][WORD_W-1:0]  bg_data,
  // video out
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [BANKS-1:0][WORD_W-1:0]  out_data,
  output logic [LINE_W-1:0]             out_line,
  output logic                          out_sof,
  output logic                          out_eol,
  // configuration registers
  input  logic                          creg_we,
  input  logic [1:0]                    creg_sel,
  input  logic [CREG_W-1:0]             creg_data,
  // status: blur, Sobel, differentiator, lens
  output logic [3:0]                    node_busy,
  output logic [3:0]                    node_fire,        // a Node started a packet
  output logic [3:0]                    node_out_blocked, // a Node waits for room downstream
  output logic [3:0]                    node_creg_applied // a CReg write reached the engines
);
  localparam int unsigned AW = $clog2(BANK_DEPTH / 2);

  // a write port into one input buffer
  typedef struct packed {
    logic                          en;
    logic [AW-1:0]                 addr;
    logic [BANKS-1:0][WORD_W-1:0]  data;
    logic                          commit;
    pkt_hdr_t                      hdr;
  } wport_t;

  // source outputs: 0 blur, 1 diff fg, 2 diff bg, 3 lens fg
  logic     [3:0]                        src_free, src_en, src_commit;
  logic     [3:0][AW-1:0]                src_addr;
  logic     [3:0][BANKS-1:0][WORD_W-1:0] src_data;
  pkt_hdr_t [3:0]                        src_hdr;

  wport_t blur_o, sobel_o, diff_o, lens_o;
  logic   blur_in_free, sobel_in_free, sink_in_free;
  logic   [1:0] diff_in_free;
  logic   [2:0] lens_in_free;

  packet_source #(
    .N_OUT(4), .BG_MASK(4'b0100), .LINE_WORDS_P(LINE_WORDS_P),
    .FRAME_LINES_P(FRAME_LINES_P), .AW(AW)
  ) u_source (
    .clk, .rst_n,
    .in_valid, .in_ready, .fg_data, .bg_data,
    .out_free   (src_free),
    .out_wr_en  (src_en),
    .out_wr_addr(src_addr),
    .out_wr_data(src_data),
    .out_commit (src_commit),
    .out_hdr    (src_hdr),
    .line_done  ()
  );
  assign src_free = {lens_in_free[0], diff_in_free[1], diff_in_free[0], blur_in_free};

  softsonic_node #(.N_IN(1), .NUM_ENGINES(NUM_ENGINES), .WINDOW(1'b1), .KERNEL(K_BLUR), .AW(AW)) u_blur (
    .clk, .rst_n,
    .in_free(blur_in_free), .in_wr_en(src_en[0]), .in_wr_addr(src_addr[0]),
    .in_wr_data(src_data[0]), .in_wr_commit(src_commit[0]), .in_wr_hdr(src_hdr[0]),
    .out_free(sobel_in_free), .out_wr_en(blur_o.en), .out_wr_addr(blur_o.addr),
    .out_wr_data(blur_o.data), .out_commit(blur_o.commit), .out_hdr(blur_o.hdr),
    .creg_we(creg_we && creg_sel == 2'd0), .creg_data,
    .busy(node_busy[0]), .fire(node_fire[0]), .out_blocked(node_out_blocked[0]), .creg_applied(node_creg_applied[0])
  );

  softsonic_node #(.N_IN(1), .NUM_ENGINES(NUM_ENGINES), .WINDOW(1'b1), .KERNEL(K_SOBEL), .AW(AW)) u_sobel (
    .clk, .rst_n,
    .in_free(sobel_in_free), .in_wr_en(blur_o.en), .in_wr_addr(blur_o.addr),
    .in_wr_data(blur_o.data), .in_wr_commit(blur_o.commit), .in_wr_hdr(blur_o.hdr),
    .out_free(lens_in_free[2]), .out_wr_en(sobel_o.en), .out_wr_addr(sobel_o.addr),
    .out_wr_data(sobel_o.data), .out_commit(sobel_o.commit), .out_hdr(sobel_o.hdr),
    .creg_we(creg_we && creg_sel == 2'd1), .creg_data,
    .busy(node_busy[1]), .fire(node_fire[1]), .out_blocked(node_out_blocked[1]), .creg_applied(node_creg_applied[1])
  );

  softsonic_node #(.N_IN(2), .NUM_ENGINES(NUM_ENGINES), .WINDOW(1'b0), .KERNEL(K_DIFF), .AW(AW)) u_diff (
    .clk, .rst_n,
    .in_free(diff_in_free), .in_wr_en(src_en[2:1]), .in_wr_addr(src_addr[2:1]),
    .in_wr_data(src_data[2:1]), .in_wr_commit(src_commit[2:1]), .in_wr_hdr(src_hdr[2:1]),
    .out_free(lens_in_free[1]), .out_wr_en(diff_o.en), .out_wr_addr(diff_o.addr),
    .out_wr_data(diff_o.data), .out_commit(diff_o.commit), .out_hdr(diff_o.hdr),
    .creg_we(creg_we && creg_sel == 2'd2), .creg_data,
    .busy(node_busy[2]), .fire(node_fire[2]), .out_blocked(node_out_blocked[2]), .creg_applied(node_creg_applied[2])
  );

  // the foreground and difference inputs of the lens wait for the two-Node edge
  // path, so they hold four lines instead of two
  softsonic_node #(.N_IN(3), .NUM_ENGINES(NUM_ENGINES), .WINDOW(1'b0), .KERNEL(K_LENS), .AW(AW),
                   .DEEP_MASK(3'b011), .DEEP_SLOTS(4)) u_lens (
    .clk, .rst_n,
    .in_free(lens_in_free),
    .in_wr_en    ({sobel_o.en,     diff_o.en,     src_en[3]}),
    .in_wr_addr  ({sobel_o.addr,   diff_o.addr,   src_addr[3]}),
    .in_wr_data  ({sobel_o.data,   diff_o.data,   src_data[3]}),
    .in_wr_commit({sobel_o.commit, diff_o.commit, src_commit[3]}),
    .in_wr_hdr   ({sobel_o.hdr,    diff_o.hdr,    src_hdr[3]}),
    .out_free(sink_in_free), .out_wr_en(lens_o.en), .out_wr_addr(lens_o.addr),
    .out_wr_data(lens_o.data), .out_commit(lens_o.commit), .out_hdr(lens_o.hdr),
    .creg_we(creg_we && creg_sel == 2'd3), .creg_data,
    .busy(node_busy[3]), .fire(node_fire[3]), .out_blocked(node_out_blocked[3]), .creg_applied(node_creg_applied[3])
  );

  packet_sink #(.SLOTS(2), .AW(AW)) u_sink (
    .clk, .rst_n,
    .in_free(sink_in_free), .in_wr_en(lens_o.en), .in_wr_addr(lens_o.addr),
    .in_wr_data(lens_o.data), .in_wr_commit(lens_o.commit), .in_wr_hdr(lens_o.hdr),
    .out_valid, .out_ready, .out_data, .out_line, .out_sof, .out_eol
  );

endmodule
