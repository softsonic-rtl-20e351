// tb_packet_source - self-checking test of the packet source.
//
// Sends 20 lines of random foreground/background words (valid with random
// gaps) while the four outputs' free flags toggle at random. Checks that the
// source accepts a beat only when every output is free, writes each beat to
// all outputs at the right word address with foreground or background data by
// the output mask (spare bits cleared), and commits each line with the right
// header (line number wrapping per frame, start-of-frame flag, word count).
module tb_packet_source;
  import softsonic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LW = 6, FL = 3, NLINES = 20;

  logic                                  in_valid, in_ready, line_done;
  logic     [BANKS-1:0][WORD_W-1:0]      fg, bg;
  logic     [3:0]                        out_free, out_wr_en, out_commit;
  logic     [3:0][7:0]                   out_wr_addr;
  logic     [3:0][BANKS-1:0][WORD_W-1:0] out_wr_data;
  pkt_hdr_t [3:0]                        out_hdr;

  packet_source #(.N_OUT(4), .BG_MASK(4'b0100), .LINE_WORDS_P(LW), .FRAME_LINES_P(FL)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .fg_data(fg), .bg_data(bg), .out_free,
    .out_wr_en, .out_wr_addr, .out_wr_data, .out_commit, .out_hdr, .line_done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic logic [BANKS-1:0][WORD_W-1:0] rnd_word();
    logic [BANKS-1:0][WORD_W-1:0] w;
    for (int b = 0; b < BANKS; b++) w[b] = {$urandom_range(63), $urandom()};
    return w;
  endfunction

  function automatic logic [BANKS-1:0][WORD_W-1:0] clean(logic [BANKS-1:0][WORD_W-1:0] w);
    for (int b = 0; b < BANKS; b++) w[b][WORD_W-1:PIX_W] = '0;
    return w;
  endfunction

  int blocked = 0;

  initial begin
    int line = 0, word = 0;
    in_valid = 0; fg = '0; bg = '0; out_free = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (line < NLINES) begin
      @(negedge clk);
      out_free = ($urandom_range(3) == 0) ? 4'($urandom_range(15)) : 4'hF;
      in_valid = ($urandom_range(4) != 0);
      fg = rnd_word(); bg = rnd_word();
      #1;
      check(in_ready == &out_free, "in_ready follows the outputs' free flags");
      if (in_valid && !in_ready) blocked++;
      for (int i = 0; i < 4; i++) begin
        check(out_wr_en[i] == (in_valid && in_ready), "write enable");
        if (in_valid && in_ready) begin
          check(out_wr_addr[i] == 8'(word), $sformatf("address out %0d", i));
          check(out_wr_data[i] == clean(i == 2 ? bg : fg), $sformatf("data out %0d", i));
          check(out_commit[i] == (word == LW - 1), $sformatf("commit out %0d", i));
          if (word == LW - 1)
            check(out_hdr[i].line == LINE_W'(line % FL) && out_hdr[i].sof == (line % FL == 0)
                  && out_hdr[i].words == WCNT_W'(LW) && out_hdr[i].ptype == PKT_LINE,
                  $sformatf("header out %0d line %0d", i, line));
        end else begin
          check(!out_commit[i], "no commit without a beat");
        end
      end
      if (in_valid && in_ready) begin
        if (word == LW - 1) begin
          word = 0;
          line++;
        end else word++;
      end
    end
    check(blocked > 0, "blocking never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
