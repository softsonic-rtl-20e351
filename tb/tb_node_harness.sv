// tb_node_harness - drives one softsonic_node configuration for tb_softsonic_node.
//
// Upstream producers write FRAMES frames of H random line packets (W words)
// into each of the Node's input buffers, one word per clock with random gaps,
// each waiting for in_free (blocking write). A two-slot downstream buffer model
// takes packets away after random delays. Every output packet is compared
// with softsonic_ref_pkg::ref_node; the harness also checks that an input
// buffer filled up (producer blocked) and that the Node stalled on a full
// output at least once.
module tb_node_harness
  import softsonic_pkg::*;
  import softsonic_ref_pkg::*;
#(
  parameter int      N_IN   = 1,
  parameter int      E      = 1,
  parameter bit      WINDOW = 1'b0,
  parameter kernel_e KERNEL = K_INVERT,
  parameter int      W      = 4,
  parameter int      H      = 4,
  parameter int      FRAMES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WP = W * BANKS;
  localparam int NP = FRAMES * H;
  localparam int K  = BANKS / E;

  logic     [N_IN-1:0]                        in_free, in_wr_en, in_wr_commit;
  logic     [N_IN-1:0][7:0]                   in_wr_addr;
  logic     [N_IN-1:0][BANKS-1:0][WORD_W-1:0] in_wr_data;
  pkt_hdr_t [N_IN-1:0]                        in_wr_hdr;
  logic                                       out_free, out_wr_en, out_commit;
  logic     [7:0]                             out_wr_addr;
  logic     [BANKS-1:0][WORD_W-1:0]           out_wr_data;
  pkt_hdr_t                                   out_hdr;
  logic                                       busy, fire, out_blocked, creg_applied;

  softsonic_node #(.N_IN(N_IN), .NUM_ENGINES(E), .WINDOW(WINDOW), .KERNEL(KERNEL)) dut (
    .clk, .rst_n, .in_free, .in_wr_en, .in_wr_addr, .in_wr_data, .in_wr_commit, .in_wr_hdr,
    .out_free, .out_wr_en, .out_wr_addr, .out_wr_data, .out_commit, .out_hdr,
    .creg_we(1'b0), .creg_data('0), .busy, .fire, .out_blocked, .creg_applied);

  pixel_t img [3][];
  pixel_t res [];
  int     committed = 0, out_count = 0, blocked = 0, in_full = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%s] %s at %0t", KERNEL.name(), msg, $time);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 3; i++) rand_img(img[i], NP * WP);
    res = new[NP * WP];
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_prod
    initial begin
      in_wr_en[i] = 0; in_wr_commit[i] = 0; in_wr_addr[i] = '0; in_wr_data[i] = '0; in_wr_hdr[i] = '0;
      wait (rst_n);
      for (int p = 0; p < NP; p++) begin
        @(negedge clk);
        while (!in_free[i]) begin
          in_full++;
          @(negedge clk);
        end
        for (int w = 0; w < W; w++) begin
          in_wr_en[i] = 1; in_wr_addr[i] = 8'(w);
          for (int b = 0; b < BANKS; b++) in_wr_data[i][b] = pix2word(img[i][p * WP + w * BANKS + b]);
          in_wr_commit[i] = (w == W - 1);
          in_wr_hdr[i] = '{ptype: PKT_LINE, sof: (p % H == 0), line: LINE_W'(p % H), words: WCNT_W'(W)};
          @(negedge clk);
          in_wr_en[i] = 0; in_wr_commit[i] = 0;
          if ($urandom_range(7) == 0) @(negedge clk);
        end
      end
    end
  end

  assign out_free = out_count < 2;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (out_count > 0 && $urandom_range(W * K * 3) == 0) out_count--;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_blocked) blocked++;
      if (out_wr_en) begin
        check(out_free, "write without a free output slot");
        for (int b = 0; b < BANKS; b++) begin
          pixel_t px;
          int     idx;
          px  = pixel_t'(out_wr_data[b][PIX_W-1:0]);
          idx = committed * WP + int'(out_wr_addr) * BANKS + b;
          res[idx] = px;
        end
      end
      if (out_commit) begin
        check(out_hdr.line == LINE_W'(committed % H) && out_hdr.words == WCNT_W'(W),
              $sformatf("header of packet %0d", committed));
        committed++;
        out_count++;
      end
    end
  end

  initial begin
    pixel_t fa [], fb [], fc [], fo [];
    wait (rst_n);
    wait (committed == NP);
    for (int p = 0; p < NP; p++) begin
      int f, y;
      f = p / H; y = p % H;
      fa = new[H * WP]; fb = new[H * WP]; fc = new[H * WP];
      for (int k = 0; k < H * WP; k++) begin
        fa[k] = img[0][f * H * WP + k];
        fb[k] = (N_IN > 1) ? img[1][f * H * WP + k] : '0;
        fc[k] = (N_IN > 2) ? img[2][f * H * WP + k] : '0;
      end
      ref_node(KERNEL, WINDOW, WP, H, (KERNEL == K_ALPHA) ? 512 : 64, fa, fb, fc, fo);
      for (int x = 0; x < WP; x++) begin
        checks++;
        if (res[p * WP + x] != fo[y * WP + x]) begin
          failures++;
          if (failures < 10)
            $display("FAIL [%s] packet %0d pixel %0d got %h expected %h", KERNEL.name(), p, x,
                     res[p * WP + x], fo[y * WP + x]);
        end
      end
    end
    check(blocked > 0, "output-full stall never happened");
    check(in_full > 0, "input buffer never full");
    done = 1;
  end
endmodule
