// node_engine - the user-defined pixel computation of a SoftSONIC Node.
//
// One engine turns one pixel position per cycle into one output pixel. Its
// inputs are the pixels of up to three input packets at that position
// (a, b, c), a 3x3 neighbourhood `win` taken from input a, and its own
// configuration register (CReg). KERNEL selects the computation:
//
//   K_INVERT  each channel 1023 - a
//   K_DIFF    each channel |a - b|                        (image differentiator)
//   K_ALPHA   each channel (a*alpha + b*(1024-alpha)) >> 10, alpha = CReg (0..1024)
//   K_BLUR    3x3 noise filter, weights 1 2 1 / 2 4 2 / 1 2 1, divided by 16
//   K_SOBEL   3x3 Sobel, |Gx| + |Gy| per channel, saturated to 1023
//   K_LENS    lens effect: where the difference image b is "different"
//             (r+g+b of b above the CReg threshold) the output pixel is taken
//             from a pixel 0, 1 or 2 positions to the left, the displacement
//             growing with the edge intensity c (r+g+b >> 9, capped at 2);
//             elsewhere a passes unchanged.
//
// win[row][col]: row 0,1,2 = lines y-2, y-1, y; col 0,1,2 = pixels x-2, x-1, x.
// The window is therefore centred on (x-1, y-1).
//
// Timing: in_valid and the data are registered once; out/out_valid follow one
// clock later, one result per cycle. The CReg is written with creg_we and
// resets to 512 (alpha blend: equal mix) or 64 (lens threshold); the wrapper
// only writes it between packets.
//
// The kernel names come from the platform's evaluated nodes and application;
// the arithmetic of every kernel (weights, scaling, saturation, the lens
// rule) is this design's own, since only the names and purpose are given.
module node_engine
  import softsonic_pkg::*;
#(
  parameter kernel_e KERNEL = K_INVERT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              creg_we,
  input  logic [CREG_W-1:0] creg_data,
  input  logic              in_valid,
  input  pixel_t            a,
  input  pixel_t            b,
  input  pixel_t            c,
  input  pixel_t            win [3][3],
  output logic              out_valid,
  output pixel_t            out
);
  localparam logic [CREG_W-1:0] CREG_RESET = (KERNEL == K_ALPHA) ? CREG_W'(512) : CREG_W'(64);
  localparam int unsigned MAXV = (1 << CH_W) - 1;

  logic [CREG_W-1:0] creg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       creg_q <= CREG_RESET;
    else if (creg_we) creg_q <= creg_data;
  end

  // channel ch of a pixel: 0 = r, 1 = g, 2 = b
  function automatic logic [CH_W-1:0] chan(input pixel_t p, input int ch);
    case (ch)
      0:       return p.r;
      1:       return p.g;
      default: return p.b;
    endcase
  endfunction

  function automatic logic [CH_W-1:0] absdiff(input logic [CH_W-1:0] x, input logic [CH_W-1:0] y);
    return (x > y) ? x - y : y - x;
  endfunction

  function automatic logic [CH_W-1:0] sat(input logic signed [CH_W+4:0] v);
    if (v > (CH_W+5)'(MAXV)) return CH_W'(MAXV);
    return v[CH_W-1:0];
  endfunction

  logic [CH_W-1:0] res [3];
  pixel_t          lens_pix;
  logic [10:0]     alpha;
  logic [CH_W+1:0] b_sum, c_sum;
  logic [1:0]      disp;

  always_comb begin
    alpha = (creg_q > CREG_W'(1024)) ? 11'd1024 : creg_q[10:0];
    b_sum = (CH_W+2)'(b.r) + (CH_W+2)'(b.g) + (CH_W+2)'(b.b);
    c_sum = (CH_W+2)'(c.r) + (CH_W+2)'(c.g) + (CH_W+2)'(c.b);
    disp  = (c_sum >= (CH_W+2)'(1024)) ? 2'd2 : (c_sum >= (CH_W+2)'(512)) ? 2'd1 : 2'd0;
    lens_pix = a;
    if ({4'd0, b_sum} > creg_q) lens_pix = win[2][2 - disp];

    for (int ch = 0; ch < 3; ch++) begin
      logic [CH_W+10:0]       mix;
      logic [CH_W+4:0]        acc;
      logic signed [CH_W+4:0] gx, gy, ax, ay;
      mix = '0; acc = '0; gx = '0; gy = '0; ax = '0; ay = '0;
      res[ch] = '0;
      case (KERNEL)
        K_INVERT: res[ch] = CH_W'(MAXV) - chan(a, ch);
        K_DIFF:   res[ch] = absdiff(chan(a, ch), chan(b, ch));
        K_ALPHA: begin
          mix = (CH_W+11)'(chan(a, ch)) * (CH_W+11)'(alpha)
              + (CH_W+11)'(chan(b, ch)) * (CH_W+11)'(11'd1024 - alpha);
          res[ch] = mix[CH_W+9:10];
        end
        K_BLUR: begin
          for (int r = 0; r < 3; r++)
            for (int k = 0; k < 3; k++)
              acc += (CH_W+5)'(chan(win[r][k], ch)) << ((r == 1 ? 1 : 0) + (k == 1 ? 1 : 0));
          res[ch] = acc[CH_W+3:4];
        end
        K_SOBEL: begin
          gx = $signed((CH_W+5)'(chan(win[0][2], ch)) + ((CH_W+5)'(chan(win[1][2], ch)) << 1) + (CH_W+5)'(chan(win[2][2], ch)))
             - $signed((CH_W+5)'(chan(win[0][0], ch)) + ((CH_W+5)'(chan(win[1][0], ch)) << 1) + (CH_W+5)'(chan(win[2][0], ch)));
          gy = $signed((CH_W+5)'(chan(win[2][0], ch)) + ((CH_W+5)'(chan(win[2][1], ch)) << 1) + (CH_W+5)'(chan(win[2][2], ch)))
             - $signed((CH_W+5)'(chan(win[0][0], ch)) + ((CH_W+5)'(chan(win[0][1], ch)) << 1) + (CH_W+5)'(chan(win[0][2], ch)));
          ax = (gx < 0) ? -gx : gx;
          ay = (gy < 0) ? -gy : gy;
          res[ch] = sat(ax + ay);
        end
        default:  res[ch] = chan(lens_pix, ch);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= '{r: res[0], g: res[1], b: res[2]};
    end
  end

endmodule
