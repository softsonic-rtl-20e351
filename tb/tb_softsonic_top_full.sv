// tb_softsonic_top_full - one full HDTV frame through the top at its default size.
//
// The top is instantiated with its default parameters (1920x1080 frames, one
// engine per Node). tb_top_env streams one frame of foreground and background
// video at full rate, checks every output pixel against the reference Nodes
// and checks that the steady-state line period is at most 1924 clocks, i.e.
// at least 64 frames/s at 133 MHz.
module tb_softsonic_top_full;
  import softsonic_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                          rst_n, in_valid, in_ready, out_valid, out_ready, osof, oeol, cwe, done;
  logic [BANKS-1:0][WORD_W-1:0]  fg, bg, od;
  logic [LINE_W-1:0]             ol;
  logic [1:0]                    csel;
  logic [CREG_W-1:0]             cdata;
  logic [3:0]                    busy, fire, blk, app;
  int                            ch, fl;

  softsonic_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .fg_data(fg), .bg_data(bg),
    .out_valid, .out_ready, .out_data(od), .out_line(ol), .out_sof(osof), .out_eol(oeol),
    .creg_we(cwe), .creg_sel(csel), .creg_data(cdata),
    .node_busy(busy), .node_fire(fire), .node_out_blocked(blk), .node_creg_applied(app));

  tb_top_env #(.W(LINE_WORDS), .H(FRAME_LINES), .FRAMES(1), .E(1), .STRESS(1'b0)) env (
    .clk, .rst_n, .in_valid, .in_ready, .fg_data(fg), .bg_data(bg),
    .out_valid, .out_ready, .out_data(od), .out_line(ol), .out_sof(osof), .out_eol(oeol),
    .creg_we(cwe), .creg_sel(csel), .creg_data(cdata),
    .node_busy(busy), .node_fire(fire), .node_out_blocked(blk), .node_creg_applied(app),
    .done, .checks(ch), .failures(fl));

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", ch, fl);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch, fl + 1);
    $finish;
  end
endmodule
