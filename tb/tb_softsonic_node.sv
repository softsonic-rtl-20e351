// tb_softsonic_node - self-checking test of complete Nodes (buffers, wrapper, engines).
//
// Three Nodes run side by side through tb_node_harness: a two-input image
// differentiator with one engine, a 3x3 Sobel Node with four engines and an
// invert-colours Node with eight engines, each fed over its input buffers'
// write ports and checked pixel by pixel against the reference model.
module tb_softsonic_node;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [3];
  int   ch [3], fl [3];

  tb_node_harness #(.N_IN(2), .E(1), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_DIFF),   .W(4), .H(3)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  tb_node_harness #(.N_IN(1), .E(4), .WINDOW(1'b1), .KERNEL(softsonic_pkg::K_SOBEL),  .W(5), .H(5)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  tb_node_harness #(.N_IN(1), .E(8), .WINDOW(1'b0), .KERNEL(softsonic_pkg::K_INVERT), .W(6), .H(4)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
