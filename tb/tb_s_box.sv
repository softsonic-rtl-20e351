// tb_s_box - self-checking test of the buffer status box.
//
// Drives random commit/release strobes, never committing to a full or
// releasing from an empty buffer, for a 2-slot and a 3-slot S-box, and checks
// count, wr_free, rd_avail and the ring order of the slot pointers against a
// simple counter model every cycle.
module tb_s_box;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       c2, r2, c3, r3;
  logic [0:0] ws2, rs2;
  logic [1:0] ws3, rs3, cnt2, cnt3;
  logic       wf2, ra2, wf3, ra3;

  s_box #(.SLOTS(2)) dut2 (.clk, .rst_n, .commit(c2), .release_i(r2), .wr_slot(ws2), .rd_slot(rs2),
                           .count(cnt2), .wr_free(wf2), .rd_avail(ra2));
  s_box #(.SLOTS(3)) dut3 (.clk, .rst_n, .commit(c3), .release_i(r3), .wr_slot(ws3), .rd_slot(rs3),
                           .count(cnt3), .wr_free(wf3), .rd_avail(ra3));

  int m_cnt2 = 0, m_w2 = 0, m_r2 = 0, m_cnt3 = 0, m_w3 = 0, m_r3 = 0;
  int full_seen = 0, empty_seen = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    {c2, r2, c3, r3} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check("count2", int'(cnt2), m_cnt2);  check("free2", int'(wf2), int'(m_cnt2 < 2));
      check("avail2", int'(ra2), int'(m_cnt2 > 0)); check("wslot2", int'(ws2), m_w2); check("rslot2", int'(rs2), m_r2);
      check("count3", int'(cnt3), m_cnt3);  check("free3", int'(wf3), int'(m_cnt3 < 3));
      check("avail3", int'(ra3), int'(m_cnt3 > 0)); check("wslot3", int'(ws3), m_w3); check("rslot3", int'(rs3), m_r3);
      if (m_cnt2 == 2) full_seen++;
      if (m_cnt2 == 0) empty_seen++;
      c2 = (m_cnt2 < 2) && ($urandom_range(2) != 0);
      r2 = (m_cnt2 > 0) && ($urandom_range(2) != 0);
      c3 = (m_cnt3 < 3) && ($urandom_range(3) != 0);
      r3 = (m_cnt3 > 0) && ($urandom_range(2) != 0);
      if (c2) m_w2 = (m_w2 + 1) % 2;
      if (r2) m_r2 = (m_r2 + 1) % 2;
      m_cnt2 += int'(c2) - int'(r2);
      if (c3) m_w3 = (m_w3 + 1) % 3;
      if (r3) m_r3 = (m_r3 + 1) % 3;
      m_cnt3 += int'(c3) - int'(r3);
    end
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin
      failures++;
      $display("FAIL full or empty state never reached");
    end
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
