// tb_kernel_nodes - the Node kernels at full line length with 1, 2, 4 and 8 engines.
//
// Each of the five evaluated kernels (invert colours, image difference, alpha
// blend, 3x3 noise filter, 3x3 Sobel) runs in an engine wrapper with 1, 2, 4
// and 8 engines on 1920-pixel lines (three lines each). Every pixel is
// checked against the reference model, and every packet must take exactly
// 1920/E + 3 clocks from start to commit, i.e. E pixels per clock, so that a
// Node at f MHz reaches f*E/2.0736 frames/s on 1920x1080 video.
module tb_kernel_nodes;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 20;
  logic done [N];
  int   ch [N], fl [N];

  tb_wrapper_harness #(.N_IN(1), .E(1), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_INVERT), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  tb_wrapper_harness #(.N_IN(1), .E(2), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_INVERT), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  tb_wrapper_harness #(.N_IN(1), .E(4), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_INVERT), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  tb_wrapper_harness #(.N_IN(1), .E(8), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_INVERT), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));
  tb_wrapper_harness #(.N_IN(2), .E(1), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_DIFF), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h4 (
    .clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fl[4]));
  tb_wrapper_harness #(.N_IN(2), .E(2), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_DIFF), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h5 (
    .clk, .rst_n, .done(done[5]), .checks(ch[5]), .failures(fl[5]));
  tb_wrapper_harness #(.N_IN(2), .E(4), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_DIFF), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h6 (
    .clk, .rst_n, .done(done[6]), .checks(ch[6]), .failures(fl[6]));
  tb_wrapper_harness #(.N_IN(2), .E(8), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_DIFF), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h7 (
    .clk, .rst_n, .done(done[7]), .checks(ch[7]), .failures(fl[7]));
  tb_wrapper_harness #(.N_IN(2), .E(1), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_ALPHA), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h8 (
    .clk, .rst_n, .done(done[8]), .checks(ch[8]), .failures(fl[8]));
  tb_wrapper_harness #(.N_IN(2), .E(2), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_ALPHA), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h9 (
    .clk, .rst_n, .done(done[9]), .checks(ch[9]), .failures(fl[9]));
  tb_wrapper_harness #(.N_IN(2), .E(4), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_ALPHA), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h10 (
    .clk, .rst_n, .done(done[10]), .checks(ch[10]), .failures(fl[10]));
  tb_wrapper_harness #(.N_IN(2), .E(8), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_ALPHA), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h11 (
    .clk, .rst_n, .done(done[11]), .checks(ch[11]), .failures(fl[11]));
  tb_wrapper_harness #(.N_IN(1), .E(1), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_BLUR), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h12 (
    .clk, .rst_n, .done(done[12]), .checks(ch[12]), .failures(fl[12]));
  tb_wrapper_harness #(.N_IN(1), .E(2), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_BLUR), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h13 (
    .clk, .rst_n, .done(done[13]), .checks(ch[13]), .failures(fl[13]));
  tb_wrapper_harness #(.N_IN(1), .E(4), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_BLUR), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h14 (
    .clk, .rst_n, .done(done[14]), .checks(ch[14]), .failures(fl[14]));
  tb_wrapper_harness #(.N_IN(1), .E(8), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_BLUR), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h15 (
    .clk, .rst_n, .done(done[15]), .checks(ch[15]), .failures(fl[15]));
  tb_wrapper_harness #(.N_IN(1), .E(1), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h16 (
    .clk, .rst_n, .done(done[16]), .checks(ch[16]), .failures(fl[16]));
  tb_wrapper_harness #(.N_IN(1), .E(2), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h17 (
    .clk, .rst_n, .done(done[17]), .checks(ch[17]), .failures(fl[17]));
  tb_wrapper_harness #(.N_IN(1), .E(4), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h18 (
    .clk, .rst_n, .done(done[18]), .checks(ch[18]), .failures(fl[18]));
  tb_wrapper_harness #(.N_IN(1), .E(8), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL), .W(240), .H(3), .FRAMES(1), .NEED_STALL(1'b0)) h19 (
    .clk, .rst_n, .done(done[19]), .checks(ch[19]), .failures(fl[19]));

  function automatic int sum(int v [N]);
    int s = 0;
    for (int i = 0; i < N; i++) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ch), sum(fl));
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    for (int i = 0; i < N; i++) if (!done[i]) $display("FAIL watchdog: configuration %0d unfinished", i);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ch), sum(fl) + 1);
    $finish;
  end
endmodule
