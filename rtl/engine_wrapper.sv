// engine_wrapper - Node Engine Wrapper: firing rule, data sequencer and CReg port.
//
// The wrapper sits between a Node's input buffer(s), its NUM_ENGINES engines
// and the output buffer it writes (the next Node's input buffer when Nodes are
// connected point-to-point).
//
// Firing rule: it starts on a packet only when every input buffer holds a
// packet, the output buffer has a free slot and the engines are idle (the
// previous packet has fully drained). It then streams the packet through the
// engines and, in the cycle the last word is written, commits the output
// packet (header copied from input 0) and releases all input packets.
//
// Sequencing: a buffer word carries BANKS (8) pixels. With E = NUM_ENGINES
// engines each word is served in K = BANKS/E steps of E pixels (serialisation),
// and the E results of each step are gathered back into a word
// (deserialisation) before it is written. Throughput is E pixels per clock;
// a packet of W words takes W*K clocks plus a few to drain, e.g. 1920 + 5
// clocks for an HDTV line with one engine.
//
// Windows (WINDOW = 1): the wrapper keeps the two previous lines of input 0 in
// two line memories used as a ping-pong ring, and the last two pixels of the
// previous word of each row, so every engine gets the 3x3 window of lines
// y-2..y and pixels x-2..x (centred on (x-1, y-1)), with the overlap between
// neighbouring engines handled here. Outside the image the nearest line or
// pixel is repeated (top and left edges). The horizontal 3-pixel part of the
// window of the current line is given to the engines in every mode.
//
// CReg: a write on creg_we/creg_data is held and passed to the engines'
// register only while no packet is in flight, so a packet is always processed
// with one CReg value.
//
// Pipeline, counted from the cycle a word address is issued: +1 the buffer
// and line memory data arrive and are latched, +2 the engines take their
// pixels, +3 the engine results are there and the word is written.
//
// From the platform: the firing rule, the parallel-engine sequencer with
// serialisation and window overlap, the CReg interface located in the wrapper
// with the register inside the engine. The causal window placement, edge
// repetition and the CReg update rule are this design's own choices.
module engine_wrapper
  import softsonic_pkg::*;
#(
  parameter int unsigned N_IN        = 1,          // input buffers, 1..3
  parameter int unsigned NUM_ENGINES = 1,          // 1, 2, 4 or 8
  parameter bit          WINDOW      = 1'b0,       // 3x3 window processing
  parameter kernel_e     KERNEL      = K_INVERT,
  parameter int unsigned AW          = 8,          // word address inside a packet
  parameter int unsigned LM_DEPTH    = 1 << AW     // line memory words
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // input buffers (read side)
  input  logic     [N_IN-1:0]                   in_avail,
  input  pkt_hdr_t [N_IN-1:0]                   in_hdr,
  output logic     [AW-1:0]                     in_rd_addr,
  input  logic     [N_IN-1:0][BANKS-1:0][WORD_W-1:0] in_rd_data,
  output logic                                  in_release,
  // output buffer (write side)
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
  output logic                                  fire,        // a packet was started
  output logic                                  out_blocked, // inputs ready, output full
  output logic                                  creg_applied
);
  localparam int unsigned E  = NUM_ENGINES;
  localparam int unsigned K  = BANKS / E;
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  // ---------------------------------------------------------------- control
  logic          running, issuing;
  logic [AW-1:0] w0;
  logic [SW-1:0] s0;
  logic          last0;
  pkt_hdr_t      hdr_q;
  logic          creg_pend;
  logic [CREG_W-1:0] creg_hold;

  assign fire        = !running && (&in_avail) && out_free;
  assign out_blocked = !running && (&in_avail) && !out_free;
  assign busy        = running;
  assign last0       = issuing && (w0 == AW'(hdr_q.words - 1'b1)) && (s0 == SW'(K - 1));
  assign in_rd_addr  = w0;

  logic v1, v2, v3, last1, last2, last3;
  logic [AW-1:0] w1, w2, w3;
  logic [SW-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      issuing <= 1'b0;
      w0      <= '0;
      s0      <= '0;
      hdr_q   <= '0;
    end else begin
      if (fire) begin
        running <= 1'b1;
        issuing <= 1'b1;
        w0      <= '0;
        s0      <= '0;
        hdr_q   <= in_hdr[0];
      end else begin
        if (issuing) begin
          if (s0 == SW'(K - 1)) begin
            s0 <= '0;
            w0 <= w0 + 1'b1;
          end else begin
            s0 <= s0 + 1'b1;
          end
          if (last0) issuing <= 1'b0;
        end
        if (out_commit) running <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, last1, last2, last3} <= '0;
      {w1, w2, w3, s1, s2, s3}          <= '0;
    end else begin
      v1 <= issuing;  last1 <= last0;  w1 <= w0;  s1 <= s0;
      v2 <= v1;       last2 <= last1;  w2 <= w1;  s2 <= s1;
      v3 <= v2;       last3 <= last2;  w3 <= w2;  s3 <= s2;
    end
  end

  // CReg: hold a write until no packet is in flight
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      creg_pend <= 1'b0;
      creg_hold <= '0;
    end else begin
      if (creg_we) begin
        creg_pend <= 1'b1;
        creg_hold <= creg_data;
      end else if (creg_applied) begin
        creg_pend <= 1'b0;
      end
    end
  end
  assign creg_applied = creg_pend && !running && !creg_we;

  // ------------------------------------------------------- word capture (+1)
  pixel_t rows_in [3][BANKS];        // rows y-2, y-1, y of input 0 as read
  pixel_t cur     [3][BANKS];        // latched rows of input 0
  pixel_t tail    [3][2];            // pixels x-2, x-1 left of the latched word
  pixel_t cur_bc  [2][BANKS];        // latched words of inputs 1 and 2
  logic   sel;                       // line memory holding line y-1

  if (WINDOW) begin : g_lines
    // two line memories, each BANKS block RAMs of LM_DEPTH x PIX_W
    pixel_t lm_q [2][BANKS];

    for (genvar m = 0; m < 2; m++) begin : g_mem
      for (genvar p = 0; p < BANKS; p++) begin : g_bank
        logic [PIX_W-1:0] q;
        bram_bank #(.DEPTH(LM_DEPTH), .WIDTH(PIX_W)) u_ram (
          .clk,
          .we   (v1 && s1 == '0 && sel != 1'(m)),
          .waddr(w1),
          .wdata(in_rd_data[0][p][PIX_W-1:0]),
          .raddr(w0),
          .rdata(q)
        );
        assign lm_q[m][p] = pixel_t'(q);
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          sel <= 1'b0;
      else if (out_commit) sel <= ~sel;
    end

    always_comb begin
      for (int p = 0; p < BANKS; p++) begin
        rows_in[2][p] = word2pix(in_rd_data[0][p]);
        rows_in[1][p] = (hdr_q.line == '0) ? rows_in[2][p] : lm_q[sel][p];
        rows_in[0][p] = (hdr_q.line >= LINE_W'(2)) ? lm_q[~sel][p] : rows_in[1][p];
      end
    end
  end else begin : g_nolines
    assign sel = 1'b0;
    always_comb begin
      for (int p = 0; p < BANKS; p++)
        for (int r = 0; r < 3; r++) rows_in[r][p] = word2pix(in_rd_data[0][p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++) begin
        for (int p = 0; p < BANKS; p++) cur[r][p] <= '0;
        tail[r][0] <= '0;
        tail[r][1] <= '0;
      end
      for (int i = 0; i < 2; i++)
        for (int p = 0; p < BANKS; p++) cur_bc[i][p] <= '0;
    end else if (v1 && s1 == '0) begin
      for (int r = 0; r < 3; r++) begin
        for (int p = 0; p < BANKS; p++) cur[r][p] <= rows_in[r][p];
        if (w1 == '0) begin
          tail[r][0] <= rows_in[r][0];
          tail[r][1] <= rows_in[r][0];
        end else begin
          tail[r][0] <= cur[r][BANKS-2];
          tail[r][1] <= cur[r][BANKS-1];
        end
      end
      for (int i = 0; i < 2; i++)
        for (int p = 0; p < BANKS; p++)
          cur_bc[i][p] <= (i + 1 < N_IN) ? word2pix(in_rd_data[(i + 1 < N_IN) ? i + 1 : 0][p]) : '0;
    end
  end

  // ------------------------------------------------------ engines (+2, +3)
  pixel_t eng_a [E], eng_b [E], eng_c [E], eng_out [E];
  pixel_t eng_win [E][3][3];
  logic   eng_ov [E];

  always_comb begin
    for (int j = 0; j < E; j++) begin
      int p;
      p = int'(s2) * E + j;
      eng_a[j] = cur[2][p];
      eng_b[j] = cur_bc[0][p];
      eng_c[j] = cur_bc[1][p];
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++)
          eng_win[j][r][k] = (p + k < 2) ? tail[r][p + k] : cur[r][p + k - 2];
    end
  end

  for (genvar j = 0; j < E; j++) begin : g_eng
    node_engine #(.KERNEL(KERNEL)) u_engine (
      .clk, .rst_n,
      .creg_we  (creg_applied),
      .creg_data(creg_hold),
      .in_valid (v2),
      .a        (eng_a[j]),
      .b        (eng_b[j]),
      .c        (eng_c[j]),
      .win      (eng_win[j]),
      .out_valid(eng_ov[j]),
      .out      (eng_out[j])
    );
  end

  // ------------------------------------------------- deserialise and write
  pixel_t acc [BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < BANKS; p++) acc[p] <= '0;
    end else if (v3) begin
      for (int j = 0; j < E; j++) acc[int'(s3) * E + j] <= eng_out[j];
    end
  end

  always_comb begin
    for (int p = 0; p < BANKS; p++)
      out_wr_data[p] = (p / E == int'(s3)) ? pix2word(eng_out[p % E]) : pix2word(acc[p]);
  end

  assign out_wr_en   = v3 && (s3 == SW'(K - 1));
  assign out_wr_addr = w3;
  assign out_commit  = v3 && last3;
  assign out_hdr     = hdr_q;
  assign in_release  = out_commit;

  a_engines_in_step: assert property (@(posedge clk) disable iff (!rst_n) eng_ov[0] == v3)
    else $error("engine_wrapper: engine pipeline out of step with the sequencer");

endmodule
