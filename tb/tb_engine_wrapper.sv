// tb_engine_wrapper - self-checking test of the Node Engine Wrapper.
//
// Runs four wrapper configurations side by side, each through
// tb_wrapper_harness: a 3x3 blur with one engine, a 3x3 Sobel with two
// engines, a three-input lens effect with eight engines and a two-input alpha
// blend with four engines. Together they cover serialisation at 8, 4, 2 and 1
// steps per word, window overlap between parallel engines, edge repetition,
// frame restarts, CReg updates and output-full stalls.
module tb_engine_wrapper;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   ch [4], fl [4];

  tb_wrapper_harness #(.N_IN(1), .E(1), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_BLUR),  .W(4), .H(5)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  tb_wrapper_harness #(.N_IN(1), .E(2), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL), .W(3), .H(4)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  tb_wrapper_harness #(.N_IN(3), .E(8), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_LENS),  .W(4), .H(3)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  tb_wrapper_harness #(.N_IN(2), .E(4), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_ALPHA), .W(5), .H(3)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2] + ch[3], fl[0] + fl[1] + fl[2] + fl[3]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2] + ch[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end
endmodule
