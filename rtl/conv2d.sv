// conv2d: the Two-Dimensional Convolver (2DC) of the spatial processor.
//
// Computes g = sum f(x+i, y+j) * h(i, j) over the window from the NE, with
// kernels taken from a coefficient ROM (kernel_rom in p2ip_pkg: identity,
// Laplacian, Sobel H/V, 5x5 Gaussian, first derivative H/V) or, for kernel
// code 0, the downloaded kernel `user_k` (25 signed coefficients written
// through the configuration tree, a 5x5 kernel when `user_5x5` is set, else
// its centre 3x3; its sum is shifted right by `user_sh`). 25 multiplier
// lanes are shared: a 5x5 kernel in `kern_a` uses all 25 lanes and disables
// output b; otherwise lanes 0..8 compute the 3x3 kernel `kern_a` and lanes
// 9..17 the 3x3 kernel `kern_b` on the same window, in parallel.
// Each sum is normalised by the kernel's factor ((sum*mul) >>> shift, e.g.
// 1/8 for Sobel, 240/65536 ~ 1/273 for the Gaussian) and formatted to 8 bits:
// clamp to 0..255, absolute value, or signed two's complement (-128..127).
// Latency is 10 steps: products, sums, normalisation, formatting, then
// alignment registers; 10 is the figure the document gives for the 2DC.
// Kernel set, sharing of two 3x3 or one 5x5 kernel and latency follow the
// document, as do ROM kernels plus downloadable coefficients; the ROM
// encoding, scaling and output formats are this design's.
module conv2d
  import p2ip_pkg::*;
#(
  parameter int unsigned LATENCY = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       px_en,
  input  window_t    win,
  input  logic [2:0] kern_a,
  input  logic [2:0] kern_b,
  input  logic [1:0] fmt,
  input  kernel_t    user_k,
  input  logic       user_5x5,
  input  logic [4:0] user_sh,
  output pix_t       out_a,
  output pix_t       out_b
);
  localparam int NL = 25;
  typedef logic signed [16:0] prod_t;
  typedef logic signed [22:0] sum_t;

  logic    k5;
  kernel_t ka, kb;
  // a 3x3 kernel only ever uses the centre 3x3 of its 5x5 matrix
  assign k5 = (kern_a == K_USER) ? user_5x5 : kernel_is_5x5(kern_a);
  assign ka = (kern_a == K_USER) ? user_k : kernel_rom(kern_a);
  assign kb = (kern_b == K_USER) ? user_k : kernel_rom(kern_b);

  function automatic logic [4:0] norm_sh(input logic [2:0] id);
    return (id == K_USER) ? user_sh : kernel_norm_shift(id);
  endfunction

  // lane operands
  pix_t  lane_px [NL];
  coef_t lane_cf [NL];
  always_comb begin
    for (int l = 0; l < NL; l++) begin
      if (k5) begin
        lane_px[l] = win[l/5][2 + l%5];
        lane_cf[l] = ka[l/5][l%5];
      end else if (l < 9) begin
        lane_px[l] = win[1 + l/3][3 + l%3];
        lane_cf[l] = ka[1 + l/3][1 + l%3];
      end else if (l < 18) begin
        lane_px[l] = win[1 + (l-9)/3][3 + (l-9)%3];
        lane_cf[l] = kb[1 + (l-9)/3][1 + (l-9)%3];
      end else begin
        lane_px[l] = '0;
        lane_cf[l] = '0;
      end
    end
  end

  // stage 1: products
  prod_t prod [NL];
  logic  k5_1;
  logic [2:0] ka_1, kb_1;
  // stage 2: sums
  sum_t  sa_2, sb_2;
  logic  k5_2;
  logic [2:0] ka_2, kb_2;
  // stage 3: normalised
  logic signed [31:0] na_3, nb_3;
  logic  k5_3;
  // stage 4: formatted
  pix_t  fa_4, fb_4;

  function automatic pix_t fmt8(input logic signed [31:0] v, input logic [1:0] f);
    unique case (f)
      FMT_ABS:    return sat_u8(v < 0 ? -v : v);
      FMT_SIGNED: return (v < -128) ? 8'h80 : (v > 127) ? 8'h7F : v[7:0];
      default:    return sat_u8(v);
    endcase
  endfunction

  sum_t sa_d, sb_d;
  always_comb begin
    sa_d = '0; sb_d = '0;
    for (int l = 0; l < NL; l++) begin
      if (k5_1 || l < 9) sa_d += sum_t'(prod[l]);
      else if (l < 18)   sb_d += sum_t'(prod[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NL; l++) prod[l] <= '0;
      k5_1 <= 1'b0; ka_1 <= '0; kb_1 <= '0;
      sa_2 <= '0; sb_2 <= '0; k5_2 <= 1'b0; ka_2 <= '0; kb_2 <= '0;
      na_3 <= '0; nb_3 <= '0; k5_3 <= 1'b0;
      fa_4 <= '0; fb_4 <= '0;
    end else if (px_en) begin
      for (int l = 0; l < NL; l++) prod[l] <= $signed({1'b0, lane_px[l]}) * lane_cf[l];
      k5_1 <= k5; ka_1 <= kern_a; kb_1 <= kern_b;
      sa_2 <= sa_d; sb_2 <= sb_d; k5_2 <= k5_1; ka_2 <= ka_1; kb_2 <= kb_1;
      na_3 <= (32'(sa_2) * $signed({1'b0, kernel_norm_mul(ka_2)})) >>> norm_sh(ka_2);
      nb_3 <= (32'(sb_2) * $signed({1'b0, kernel_norm_mul(kb_2)})) >>> norm_sh(kb_2);
      k5_3 <= k5_2;
      fa_4 <= fmt8(na_3, fmt);
      fb_4 <= k5_3 ? '0 : fmt8(nb_3, fmt);
    end
  end

  // alignment registers up to the total latency
  localparam int PAD = LATENCY - 4;
  pix_t pad_a [PAD], pad_b [PAD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PAD; i++) begin pad_a[i] <= '0; pad_b[i] <= '0; end
    end else if (px_en) begin
      pad_a[0] <= fa_4; pad_b[0] <= fb_4;
      for (int i = 1; i < PAD; i++) begin pad_a[i] <= pad_a[i-1]; pad_b[i] <= pad_b[i-1]; end
    end
  end
  assign out_a = pad_a[PAD-1];
  assign out_b = pad_b[PAD-1];
endmodule
