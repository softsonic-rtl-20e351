// tb_node_engine - self-checking test of the engine kernels.
//
// One engine per kernel is fed random pixels and random 3x3 windows; each
// result is compared, one clock later, with the integer reference model.
// The CReg of the alpha-blend and lens engines is rewritten along the way,
// including out-of-range alpha values (saturated to 1024), and the one-clock
// latency of out_valid is checked.
module tb_node_engine;
  import softsonic_pkg::*;
  import softsonic_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NK = 6;
  localparam kernel_e KS [NK] = '{K_INVERT, K_DIFF, K_ALPHA, K_BLUR, K_SOBEL, K_LENS};

  logic              creg_we [NK];
  logic [CREG_W-1:0] creg_data;
  logic              in_valid;
  pixel_t            a, b, c;
  pixel_t            win [3][3];
  logic              ov [NK];
  pixel_t            o  [NK];

  for (genvar k = 0; k < NK; k++) begin : g_k
    node_engine #(.KERNEL(KS[k])) dut (
      .clk, .rst_n, .creg_we(creg_we[k]), .creg_data, .in_valid, .a, .b, .c, .win,
      .out_valid(ov[k]), .out(o[k]));
  end

  int creg_m [NK];

  function automatic int rnd_ch(int mode);
    // mode 0: full range, 1: small values (so edges and differences vary)
    return (mode == 0) ? $urandom_range(1023) : $urandom_range(200);
  endfunction

  initial begin
    pixel_t exp [NK];
    in_valid = 1'b0; creg_data = '0; a = '0; b = '0; c = '0;
    for (int k = 0; k < NK; k++) creg_we[k] = 1'b0;
    for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++) win[r][q] = '0;
    creg_m = '{64, 64, 512, 64, 64, 64};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int mode;
      @(negedge clk);
      // occasionally rewrite the alpha and lens CRegs
      for (int k = 0; k < NK; k++) creg_we[k] = 1'b0;
      if (i % 97 == 5) begin
        creg_data = CREG_W'($urandom_range(1300));
        creg_we[2] = 1'b1; creg_we[5] = 1'b1;
        creg_m[2] = int'(creg_data); creg_m[5] = int'(creg_data);
        in_valid = 1'b0;
        @(negedge clk);
        creg_we[2] = 1'b0; creg_we[5] = 1'b0;
      end
      mode = $urandom_range(1);
      a = mk(rnd_ch(mode), rnd_ch(mode), rnd_ch(mode));
      b = mk(rnd_ch(mode), rnd_ch(mode), rnd_ch(mode));
      c = mk(rnd_ch(mode), rnd_ch(mode), rnd_ch(mode));
      for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++)
        win[r][q] = mk(rnd_ch(mode), rnd_ch(mode), rnd_ch(mode));
      in_valid = 1'b1;
      for (int k = 0; k < NK; k++) exp[k] = ref_pixel(KS[k], a, b, c, win, creg_m[k]);
      @(negedge clk);
      in_valid = 1'b0;
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (!ov[k] || o[k] != exp[k]) begin
          failures++;
          if (failures < 20)
            $display("FAIL kernel %s: got %h valid %0d expected %h", KS[k].name(), o[k], ov[k], exp[k]);
        end
      end
      @(negedge clk);
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (ov[k]) begin
          failures++;
          $display("FAIL kernel %0d: out_valid not a single clock", k);
        end
      end
    end
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
