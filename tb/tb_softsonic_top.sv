// tb_softsonic_top - end-to-end test of the thermal camouflage pipeline.
//
// Two reduced-size instances of the top (lines of 32 pixels, frames of 6
// lines, two frames each): one with one engine per Node and one with two.
// tb_top_env drives them with input gaps and output back-pressure, changes
// the lens threshold mid-run, checks every output pixel against the chained
// reference Nodes and counts the design's mechanisms.
module tb_softsonic_top;
  import softsonic_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                          rst_n [2], in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  logic [BANKS-1:0][WORD_W-1:0]  fg [2], bg [2], od [2];
  logic [LINE_W-1:0]             ol [2];
  logic                          osof [2], oeol [2], cwe [2], done [2];
  logic [1:0]                    csel [2];
  logic [CREG_W-1:0]             cdata [2];
  logic [3:0]                    busy [2], fire [2], blk [2], app [2];
  int                            ch [2], fl [2];

  for (genvar i = 0; i < 2; i++) begin : g_sys
    softsonic_top #(.NUM_ENGINES(i + 1), .LINE_WORDS_P(4), .FRAME_LINES_P(6)) dut (
      .clk, .rst_n(rst_n[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]), .fg_data(fg[i]), .bg_data(bg[i]),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(od[i]), .out_line(ol[i]),
      .out_sof(osof[i]), .out_eol(oeol[i]), .creg_we(cwe[i]), .creg_sel(csel[i]), .creg_data(cdata[i]),
      .node_busy(busy[i]), .node_fire(fire[i]), .node_out_blocked(blk[i]), .node_creg_applied(app[i]));
    tb_top_env #(.W(4), .H(6), .FRAMES(2), .E(i + 1), .STRESS(1'b1)) env (
      .clk, .rst_n(rst_n[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]), .fg_data(fg[i]), .bg_data(bg[i]),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(od[i]), .out_line(ol[i]),
      .out_sof(osof[i]), .out_eol(oeol[i]), .creg_we(cwe[i]), .creg_sel(csel[i]), .creg_data(cdata[i]),
      .node_busy(busy[i]), .node_fire(fire[i]), .node_out_blocked(blk[i]), .node_creg_applied(app[i]),
      .done(done[i]), .checks(ch[i]), .failures(fl[i]));
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1]);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
