// tb_wrapper_harness - drives one engine_wrapper configuration for tb_engine_wrapper.
//
// Models the wrapper's surroundings: N_IN input buffers that receive line
// packets at random times (each input on its own schedule) and answer reads
// one clock after the address, and a two-slot output buffer whose packets are
// taken away after random delays. Sends FRAMES frames of H lines of W words of
// random pixels, changes the CReg twice while packets flow, and compares every
// output packet with softsonic_ref_pkg::ref_node for the CReg value in force
// when that packet started. Checks the packet latency (W*K + 3 clocks from
// start to commit, K = 8 / NUM_ENGINES), that the output is only written into
// a free slot, and (with NEED_STALL) that the output-full stall occurred.
module tb_wrapper_harness
  import softsonic_pkg::*;
  import softsonic_ref_pkg::*;
#(
  parameter int      N_IN   = 1,
  parameter int      E      = 1,
  parameter bit      WINDOW = 1'b0,
  parameter kernel_e KERNEL = K_INVERT,
  parameter int      W      = 4,
  parameter int      H      = 4,
  parameter int      FRAMES = 2,
  parameter bit      NEED_STALL = 1'b1   // require an output-full stall
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WP = W * BANKS;        // pixels per line
  localparam int NP = FRAMES * H;       // packets
  localparam int K  = BANKS / E;

  logic     [N_IN-1:0]                        in_avail;
  pkt_hdr_t [N_IN-1:0]                        in_hdr;
  logic     [7:0]                             in_rd_addr;
  logic     [N_IN-1:0][BANKS-1:0][WORD_W-1:0] in_rd_data;
  logic                                       in_release, out_free, out_wr_en, out_commit;
  logic     [7:0]                             out_wr_addr;
  logic     [BANKS-1:0][WORD_W-1:0]           out_wr_data;
  pkt_hdr_t                                   out_hdr;
  logic                                       creg_we, busy, fire, out_blocked, creg_applied;
  logic     [CREG_W-1:0]                      creg_data;

  engine_wrapper #(.N_IN(N_IN), .NUM_ENGINES(E), .WINDOW(WINDOW), .KERNEL(KERNEL)) dut (
    .clk, .rst_n, .in_avail, .in_hdr, .in_rd_addr, .in_rd_data, .in_release,
    .out_free, .out_wr_en, .out_wr_addr, .out_wr_data, .out_commit, .out_hdr,
    .creg_we, .creg_data, .busy, .fire, .out_blocked, .creg_applied);

  pixel_t img [3][];                    // whole input sequences, packet-major
  pixel_t res [];                       // output captured
  int     arrived [N_IN];               // packets delivered to each input buffer
  int     consumed = 0, fired = 0, committed = 0, out_count = 0;
  int     pkt_creg [NP];
  int     fire_cycle [NP];
  int     cur_creg, cyc = 0, blocked = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%s E=%0d] %s at %0t", KERNEL.name(), E, msg, $time);
    end
  endtask

  function automatic pkt_hdr_t hdr_of(int p);
    return '{ptype: PKT_LINE, sof: (p % H == 0), line: LINE_W'(p % H), words: WCNT_W'(W)};
  endfunction

  // input buffer model
  for (genvar i = 0; i < N_IN; i++) begin : g_in
    assign in_avail[i] = (arrived[i] > consumed) && (consumed < NP);
    assign in_hdr[i]   = hdr_of(consumed);
  end

  always @(posedge clk) begin
    for (int i = 0; i < N_IN; i++)
      for (int b = 0; b < BANKS; b++) begin
        logic [5:0] junk;     // spare RAM bits carry noise; the wrapper must ignore them
        pixel_t     px;
        int         idx;
        junk = 6'($urandom_range(63));
        idx  = consumed * WP + int'(in_rd_addr) * BANKS + b;
        px   = (consumed < NP) ? img[i][idx] : '0;
        in_rd_data[i][b] <= {junk, px};
      end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    creg_we = 0; creg_data = '0;
    cur_creg = (KERNEL == K_ALPHA) ? 512 : 64;
    for (int i = 0; i < 3; i++) rand_img(img[i], NP * WP);
    res = new[NP * WP];
    for (int i = 0; i < N_IN; i++) arrived[i] = 0;
  end

  // deliveries: each input gets its next packet after a random wait, at most two ahead
  for (genvar i = 0; i < N_IN; i++) begin : g_deliver
    initial begin
      wait (rst_n);
      while (arrived[i] < NP) begin
        repeat ($urandom_range(0, W * K)) @(posedge clk);
        wait (arrived[i] - consumed < 2);
        @(posedge clk);
        arrived[i]++;
      end
    end
  end

  // CReg writes at two random moments
  initial begin
    wait (rst_n);
    for (int n = 0; n < 2; n++) begin
      repeat ($urandom_range(NP * W * K / 3)) @(posedge clk);
      @(negedge clk);
      creg_data = CREG_W'((KERNEL == K_ALPHA) ? $urandom_range(1024) : $urandom_range(200, 2500));
      creg_we = 1;
      @(negedge clk);
      creg_we = 0;
    end
  end

  // output buffer model: two slots, each taken away after a random delay
  assign out_free = out_count < 2;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (out_count > 0 && $urandom_range(W * K * 4) == 0) out_count--;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (creg_applied) cur_creg = int'(dut.creg_hold);
      if (out_blocked) blocked++;
      if (fire) begin
        pkt_creg[fired] = cur_creg;
        fire_cycle[fired] = cyc;
        fired++;
      end
      if (out_wr_en) begin
        check(out_free, "write without a free output slot");
        for (int b = 0; b < BANKS; b++) begin
          pixel_t px;
          int     idx;
          check(out_wr_data[b][WORD_W-1:PIX_W] == '0, "spare bits");
          px = pixel_t'(out_wr_data[b][PIX_W-1:0]);
          idx = committed * WP + int'(out_wr_addr) * BANKS + b;
          res[idx] = px;
        end
      end
      if (out_commit) begin
        check(out_hdr == hdr_of(committed), $sformatf("header of packet %0d", committed));
        check(cyc - fire_cycle[committed] == W * K + 3,
              $sformatf("packet %0d took %0d clocks, expected %0d", committed, cyc - fire_cycle[committed], W * K + 3));
        check(in_release, "inputs released with the commit");
        committed++;
        out_count++;
      end
      if (in_release) consumed++;
    end
  end

  // compare once everything is through
  initial begin
    pixel_t fa [], fb [], fc [], fo [];
    wait (rst_n);
    wait (committed == NP);
    repeat (5) @(posedge clk);
    check(fired == NP && consumed == NP, "every packet fired and consumed once");
    for (int p = 0; p < NP; p++) begin
      int f, y, bad;
      f = p / H; y = p % H;
      fa = new[H * WP]; fb = new[H * WP]; fc = new[H * WP];
      for (int k = 0; k < H * WP; k++) begin
        fa[k] = img[0][f * H * WP + k];
        fb[k] = (N_IN > 1) ? img[1][f * H * WP + k] : '0;
        fc[k] = (N_IN > 2) ? img[2][f * H * WP + k] : '0;
      end
      ref_node(KERNEL, WINDOW, WP, H, pkt_creg[p], fa, fb, fc, fo);
      bad = 0;
      for (int x = 0; x < WP; x++) begin
        checks++;
        if (res[p * WP + x] != fo[y * WP + x]) begin
          failures++;
          bad++;
          if (bad < 3 && failures < 10)
            $display("FAIL [%s E=%0d] packet %0d pixel %0d got %h expected %h", KERNEL.name(), E, p, x,
                     res[p * WP + x], fo[y * WP + x]);
        end
      end
    end
    if (NEED_STALL) check(blocked > 0, "output-full stall never happened");
    done = 1;
  end
endmodule
