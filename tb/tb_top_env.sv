// tb_top_env - stimulus, reference and scoreboard for softsonic_top.
//
// Builds FRAMES frames of background video (random) and foreground video equal
// to the background except inside a rectangle (the "object"), where it is
// random. Feeds both to the top beat by beat, collects the output video and
// compares every pixel with the chained reference Nodes:
//   blur = 3x3 blur(fg), edge = 3x3 Sobel(blur), diff = |fg - bg|,
//   out  = lens(fg, diff, edge) with the lens threshold in force when the
//          lens Node started that line.
// Also checks line numbers and start-of-frame / end-of-line flags.
//
// With STRESS set, input gaps, output back-pressure and a lens CReg write are
// applied and the env counts how often each mechanism of the design happened
// (every Node firing, a Node stalled by a full downstream buffer, the source
// blocked, the sink held by its consumer, a CReg update, frame restarts);
// a mechanism that never happened counts as a failure. With STRESS clear the
// video streams at full rate and the env checks the line period against the
// 64 frames/s at 133 MHz of the one-engine configuration (at most
// LINE_PIX/E + 4 clocks per line in steady state).
module tb_top_env
  import softsonic_pkg::*;
  import softsonic_ref_pkg::*;
#(
  parameter int W      = 4,     // words per line
  parameter int H      = 6,     // lines per frame
  parameter int FRAMES = 2,
  parameter int E      = 1,     // engines per Node in the top
  parameter bit STRESS = 1'b1
) (
  input  logic                          clk,
  output logic                          rst_n,
  output logic                          in_valid,
  input  logic                          in_ready,
  output logic [BANKS-1:0][WORD_W-1:0]  fg_data,
  output logic [BANKS-1:0][WORD_W-1:0]  bg_data,
  input  logic                          out_valid,
  output logic                          out_ready,
  input  logic [BANKS-1:0][WORD_W-1:0]  out_data,
  input  logic [LINE_W-1:0]             out_line,
  input  logic                          out_sof,
  input  logic                          out_eol,
  output logic                          creg_we,
  output logic [1:0]                    creg_sel,
  output logic [CREG_W-1:0]             creg_data,
  input  logic [3:0]                    node_busy,
  input  logic [3:0]                    node_fire,
  input  logic [3:0]                    node_out_blocked,
  input  logic [3:0]                    node_creg_applied,
  output logic                          done,
  output int                            checks,
  output int                            failures
);
  localparam int WP = W * BANKS;
  localparam int FP = WP * H;
  localparam int NL = FRAMES * H;

  pixel_t fg [], bg [];
  int     lens_creg [NL];
  int     cur_lens_creg = 64, lens_fired = 0;
  int     n_fire [4], n_blocked = 0, n_src_block = 0, n_sink_hold = 0, n_creg = 0, n_sof = 0;
  int     line_end_cycle [NL];
  int     cyc = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    int x0, x1, y0, y1;
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 4; i++) n_fire[i] = 0;
    rand_img(bg, FRAMES * FP);
    rand_img(fg, FRAMES * FP);
    x0 = WP / 4; x1 = WP * 3 / 4; y0 = H / 4; y1 = H * 3 / 4 + 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < WP; x++)
          if (!(y >= y0 && y < y1 && x >= x0 && x < x1)) fg[f * FP + y * WP + x] = bg[f * FP + y * WP + x];
  end

  // event counters
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (node_creg_applied[3]) begin
        cur_lens_creg = int'(creg_hold_q);
        n_creg++;
      end
      if (node_fire[3]) begin
        lens_creg[lens_fired] = cur_lens_creg;
        lens_fired++;
      end
      for (int i = 0; i < 4; i++) if (node_fire[i]) n_fire[i]++;
      if (|node_out_blocked) n_blocked++;
      if (in_valid && !in_ready) n_src_block++;
      if (out_valid && !out_ready) n_sink_hold++;
    end
  end

  // the lens Node's CReg value as written (the top applies it between packets)
  logic [CREG_W-1:0] creg_hold_q;
  always @(posedge clk) if (creg_we && creg_sel == 2'd3) creg_hold_q <= creg_data;

  // input driver
  initial begin
    rst_n = 0; in_valid = 0; fg_data = '0; bg_data = '0;
    creg_we = 0; creg_sel = '0; creg_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++)
      for (int w = 0; w < W; w++) begin
        for (int b = 0; b < BANKS; b++) begin
          fg_data[b] = pix2word(fg[l * WP + w * BANKS + b]);
          bg_data[b] = pix2word(bg[l * WP + w * BANKS + b]);
        end
        in_valid = 1;
        if (STRESS && $urandom_range(9) == 0) begin
          in_valid = 0;
          @(negedge clk);
          in_valid = 1;
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
  end

  // lens threshold change in the middle of the second frame
  initial begin
    if (STRESS) begin
      wait (lens_fired >= H + H / 2);
      @(negedge clk);
      creg_sel = 2'd3; creg_data = CREG_W'(1500); creg_we = 1;
      @(negedge clk);
      creg_we = 0;
    end
  end

  // output collector and checker
  initial begin
    pixel_t blur [], edge_i [], diff [], lens_img [], fa [], fb [], zero [];
    int cached_creg [FRAMES];
    pixel_t outp [];
    outp = new[FRAMES * FP];
    out_ready = 0;
    wait (rst_n);
    for (int l = 0; l < NL; l++)
      for (int w = 0; w < W; w++) begin
        @(negedge clk);
        if (STRESS && w == 0 && l % 4 == 3) begin
          // a long pause of the consumer backs the whole pipeline up
          out_ready = 0;
          repeat (6 * WP) @(negedge clk);
        end
        out_ready = !STRESS || ($urandom_range(4) != 0);
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = !STRESS || ($urandom_range(4) != 0);
          @(posedge clk);
        end
        for (int b = 0; b < BANKS; b++) outp[l * WP + w * BANKS + b] = pixel_t'(out_data[b][PIX_W-1:0]);
        check(int'(out_line) == l % H, $sformatf("line number of line %0d", l));
        check(out_sof == (l % H == 0 && w == 0), $sformatf("start of frame flag, line %0d word %0d", l, w));
        check(out_eol == (w == W - 1), $sformatf("end of line flag, line %0d word %0d", l, w));
        if (out_sof) n_sof++;
        if (w == W - 1) line_end_cycle[l] = cyc;
      end
    @(negedge clk);
    out_ready = 0;
    // reference, frame by frame
    for (int f = 0; f < FRAMES; f++) begin
      int last_creg;
      fa = new[FP]; fb = new[FP]; zero = new[FP];
      for (int k = 0; k < FP; k++) begin
        fa[k] = fg[f * FP + k]; fb[k] = bg[f * FP + k]; zero[k] = '0;
      end
      ref_node(K_BLUR,  1'b1, WP, H, 0, fa, zero, zero, blur);
      ref_node(K_SOBEL, 1'b1, WP, H, 0, blur, zero, zero, edge_i);
      ref_node(K_DIFF,  1'b0, WP, H, 0, fa, fb, zero, diff);
      last_creg = -1;
      for (int y = 0; y < H; y++) begin
        int bad;
        if (lens_creg[f * H + y] != last_creg) begin
          last_creg = lens_creg[f * H + y];
          ref_node(K_LENS, 1'b0, WP, H, last_creg, fa, diff, edge_i, lens_img);
        end
        bad = 0;
        for (int x = 0; x < WP; x++) begin
          checks++;
          if (outp[f * FP + y * WP + x] != lens_img[y * WP + x]) begin
            failures++;
            bad++;
            if (bad < 3 && failures < 10)
              $display("FAIL frame %0d line %0d pixel %0d: got %h expected %h", f, y, x,
                       outp[f * FP + y * WP + x], lens_img[y * WP + x]);
          end
        end
      end
    end
    if (STRESS) begin
      for (int i = 0; i < 4; i++) check(n_fire[i] == NL, $sformatf("node %0d fired %0d times", i, n_fire[i]));
      check(n_blocked > 0,   "no Node was ever stalled by a full downstream buffer");
      check(n_src_block > 0, "the source was never blocked");
      check(n_sink_hold > 0, "the sink was never held by its consumer");
      check(n_creg == 1,     "lens CReg update not applied exactly once");
      check(lens_creg[NL - 1] == 1500, "new lens threshold not in force at the end");
      check(n_sof == FRAMES, "start of frame count");
      $display("E=%0d mechanisms: fires %0d/%0d/%0d/%0d, stalled cycles %0d, source blocked %0d, sink held %0d, creg updates %0d, frames %0d",
               E, n_fire[0], n_fire[1], n_fire[2], n_fire[3], n_blocked, n_src_block, n_sink_hold, n_creg, n_sof);
    end else begin
      // steady-state line period over the second half of the run
      int per;
      per = (line_end_cycle[NL - 1] - line_end_cycle[NL / 2]) / (NL - 1 - NL / 2);
      $display("line period %0d clocks, %0d lines in %0d clocks", per, NL, line_end_cycle[NL - 1]);
      check(per <= WP / E + 4, $sformatf("line period %0d clocks exceeds %0d", per, WP / E + 4));
    end
    done = 1;
  end
endmodule
