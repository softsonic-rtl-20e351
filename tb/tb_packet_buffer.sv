// tb_packet_buffer - self-checking test of the two-slot packet buffer.
//
// A producer writes 60 packets of random length (1..256 words of 8 random
// 36-bit lanes) in random word order and commits each with a header; a
// consumer with random pauses reads every word (checking the one-clock read
// latency) and the header, then releases. Checks FIFO order, data, headers,
// that wr_free drops when both slots are full and rd_avail when empty.
module tb_packet_buffer;
  import softsonic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NPKT = 60;

  logic                         wr_free, wr_en, wr_commit, rd_avail, rd_release;
  logic [7:0]                   wr_addr, rd_addr;
  logic [BANKS-1:0][WORD_W-1:0] wr_data, rd_data;
  pkt_hdr_t                     wr_hdr, rd_hdr;
  logic [1:0]                   count;

  packet_buffer dut (.clk, .rst_n, .wr_free, .wr_en, .wr_addr, .wr_data, .wr_commit, .wr_hdr,
                     .rd_avail, .rd_hdr, .rd_addr, .rd_data, .rd_release, .count);

  logic [BANKS-1:0][WORD_W-1:0] mem_m [int];   // key pkt*256 + word
  pkt_hdr_t                     hdr_m [NPKT];
  int full_seen = 0, empty_seen = 0;

  function automatic logic [BANKS-1:0][WORD_W-1:0] rnd_word();
    logic [BANKS-1:0][WORD_W-1:0] w;
    for (int b = 0; b < BANKS; b++) w[b] = {$urandom_range(15), $urandom()};
    return w;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // producer
  initial begin
    wr_en = 0; wr_commit = 0; wr_addr = '0; wr_data = '0; wr_hdr = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      int n, order [];
      n = (p % 7 == 0) ? 256 : $urandom_range(1, 256);
      hdr_m[p] = '{ptype: PKT_LINE, sof: p[0], line: LINE_W'(p), words: WCNT_W'(n)};
      order = new[n];
      foreach (order[i]) order[i] = i;
      order.shuffle();
      @(negedge clk);
      while (!wr_free) begin
        full_seen++;
        @(negedge clk);
      end
      for (int i = 0; i < n; i++) begin
        wr_en = 1; wr_addr = 8'(order[i]); wr_data = rnd_word();
        mem_m[p * 256 + order[i]] = wr_data;
        wr_commit = (i == n - 1); wr_hdr = hdr_m[p];
        @(negedge clk);
        wr_en = 0; wr_commit = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
  end

  // consumer
  initial begin
    rd_addr = '0; rd_release = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      int n;
      @(negedge clk);
      while (!rd_avail) begin
        empty_seen++;
        @(negedge clk);
      end
      if ($urandom_range(1) == 0) repeat ($urandom_range(300)) @(negedge clk);  // let the buffer fill
      check(rd_hdr == hdr_m[p], $sformatf("header of packet %0d", p));
      n = int'(rd_hdr.words);
      for (int i = 0; i < n; i++) begin
        rd_addr = 8'(i);
        @(negedge clk);
        check(rd_data == mem_m[p * 256 + i], $sformatf("packet %0d word %0d", p, i));
      end
      rd_release = 1;
      @(negedge clk);
      rd_release = 0;
    end
    check(full_seen > 0, "buffer never full");
    check(empty_seen > 0, "buffer never empty");
    @(negedge clk);
    check(!rd_avail && count == 0, "buffer empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
