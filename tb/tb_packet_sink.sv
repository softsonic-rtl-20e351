// tb_packet_sink - self-checking test of the packet sink.
//
// Writes 30 line packets (random lengths 1..240 words, random data, line
// numbers with start-of-frame flags) into the sink's buffer whenever it has
// room, while the output consumer drops out_ready at random. Checks the order
// and data of every word and the line, start-of-frame and end-of-line flags,
// and, in a final phase with out_ready always high, that a 240-word packet
// streams out at one word per clock.
module tb_packet_sink;
  import softsonic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NPKT = 30;

  logic                         in_free, in_wr_en, in_wr_commit, out_valid, out_ready, out_sof, out_eol;
  logic [7:0]                   in_wr_addr;
  logic [BANKS-1:0][WORD_W-1:0] in_wr_data, out_data;
  pkt_hdr_t                     in_wr_hdr;
  logic [LINE_W-1:0]            out_line;

  packet_sink dut (.clk, .rst_n, .in_free, .in_wr_en, .in_wr_addr, .in_wr_data, .in_wr_commit, .in_wr_hdr,
                   .out_valid, .out_ready, .out_data, .out_line, .out_sof, .out_eol);

  typedef struct { logic [BANKS-1:0][WORD_W-1:0] d; int line; bit sof; bit eol; } beat_t;
  beat_t exp_q [$];
  bit    free_run = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // producer
  initial begin
    in_wr_en = 0; in_wr_commit = 0; in_wr_addr = '0; in_wr_data = '0; in_wr_hdr = '0;
    wait (rst_n);
    for (int p = 0; p <= NPKT; p++) begin
      int n;
      n = (p >= NPKT - 2) ? 240 : $urandom_range(1, 240);
      if (p == NPKT) begin
        wait (exp_q.size() == 0);  // final throughput phase starts empty
        free_run = 1;
      end
      @(negedge clk);
      while (!in_free) @(negedge clk);
      for (int i = 0; i < n; i++) begin
        beat_t bt;
        in_wr_en = 1; in_wr_addr = 8'(i);
        for (int b = 0; b < BANKS; b++) in_wr_data[b] = {$urandom_range(63), $urandom()};
        in_wr_commit = (i == n - 1);
        in_wr_hdr = '{ptype: PKT_LINE, sof: (p % 5 == 0), line: LINE_W'(p % 5), words: WCNT_W'(n)};
        bt.d = in_wr_data; bt.line = p % 5; bt.sof = (p % 5 == 0) && (i == 0); bt.eol = (i == n - 1);
        exp_q.push_back(bt);
        @(negedge clk);
        in_wr_en = 0; in_wr_commit = 0;
      end
    end
  end

  // consumer
  int stalls = 0, got = 0;
  initial begin
    int first_cycle, last_cycle, cyc, nfree;
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0; nfree = 0; first_cycle = 0; last_cycle = 0;
    forever begin
      @(negedge clk);
      cyc++;
      out_ready = free_run || ($urandom_range(2) != 0);
      if (out_valid && !out_ready) stalls++;
      @(posedge clk);
      if (out_valid && out_ready) begin
        beat_t bt;
        bt = exp_q.pop_front();
        check(out_data == bt.d, $sformatf("data of word %0d", got));
        check(int'(out_line) == bt.line && out_sof == bt.sof && out_eol == bt.eol,
              $sformatf("flags of word %0d", got));
        got++;
        if (free_run) begin
          if (nfree == 0) first_cycle = cyc;
          nfree++;
          last_cycle = cyc;
          if (nfree == 240) begin
            check(last_cycle - first_cycle == 239, $sformatf("240 words took %0d clocks", last_cycle - first_cycle + 1));
            check(stalls > 0, "back-pressure never exercised");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
