// Radix-2 decimation-in-time butterfly.
//
// Computes X = A + W*B and Y = A - W*B on complex two's complement words.
// For an inverse transform the twiddle is conjugated (conj = 1), so the same
// forward twiddle table serves both directions. With halve = 1 both results
// are divided by two (round half to even), which keeps a forward FFT inside the
// input range; with halve = 0 they are not scaled. Results that do not fit
// in W bits saturate and raise ovf for that output word.
//
// The twiddle has TW-2 fraction bits (+1.0 = 2^(TW-2)); the product W*B is
// rounded to the data's precision before the add and subtract.
//
// Timing: two register stages. Inputs sampled with in_valid appear on the
// outputs two clocks later with out_valid. One butterfly per clock.
// The butterfly equation is the published one. Pipeline depth, scaling per
// stage, rounding and saturation are this design's own choices.
module fft_butterfly #(
  parameter int W  = 32,
  parameter int TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 conj,
  input  logic                 halve,
  input  logic signed [W-1:0]  a_re, a_im, b_re, b_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output logic                 out_valid,
  output logic signed [W-1:0]  x_re, x_im, y_re, y_im,
  output logic                 ovf
);
  localparam int PW = W + TW + 1;   // product sum width
  localparam int SW = W + 3;        // butterfly sum width

  // Stage 1: four real products and a delayed copy of A.
  logic signed [W+TW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [W-1:0]    a_re_q, a_im_q;
  logic                   v1, halve1;
  logic signed [TW-1:0]   wi_eff;

  assign wi_eff = conj ? -w_im : w_im;

  always_ff @(posedge clk) begin
    p_rr   <= b_re * w_re;
    p_ii   <= b_im * wi_eff;
    p_ri   <= b_re * wi_eff;
    p_ir   <= b_im * w_re;
    a_re_q <= a_re;
    a_im_q <= a_im;
    halve1 <= halve;
  end

  // Stage 2: complex product, rescale, add/subtract, scale, saturate.
  logic signed [PW-1:0] t_re_full, t_im_full;
  logic signed [SW-1:0] t_re, t_im;
  logic signed [SW-1:0] sx_re, sx_im, sy_re, sy_im;
  logic                 o0, o1, o2, o3;
  logic signed [W-1:0]  q0, q1, q2, q3;

  function automatic logic signed [SW-1:0] rnd_shift(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (TW - 3))) >>> (TW - 2);
    return r[SW-1:0];
  endfunction

  // Halving rounds half to even: a biased rounding would add the same small
  // offset to every spectral bin, which returns as a large error in pixel 0.
  function automatic logic signed [SW-1:0] scale(input logic signed [SW-1:0] v, input logic h);
    logic signed [SW-1:0] t;
    if (!h) return v;
    t = v >>> 1;
    if (v[0] && t[0]) t = t + 1'b1;
    return t;
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [SW-1:0] v, output logic o);
    localparam logic signed [SW-1:0] MAXV = SW'((64'sd1 <<< (W - 1)) - 1);
    localparam logic signed [SW-1:0] MINV = -SW'(64'sd1 <<< (W - 1));
    o = 1'b0;
    if (v > MAXV)      begin o = 1'b1; return MAXV[W-1:0]; end
    else if (v < MINV) begin o = 1'b1; return MINV[W-1:0]; end
    return v[W-1:0];
  endfunction

  always_comb begin
    t_re_full = PW'(p_rr) - PW'(p_ii);
    t_im_full = PW'(p_ri) + PW'(p_ir);
    t_re  = rnd_shift(t_re_full);
    t_im  = rnd_shift(t_im_full);
    sx_re = scale(SW'(a_re_q) + t_re, halve1);
    sx_im = scale(SW'(a_im_q) + t_im, halve1);
    sy_re = scale(SW'(a_re_q) - t_re, halve1);
    sy_im = scale(SW'(a_im_q) - t_im, halve1);
    q0 = sat(sx_re, o0);
    q1 = sat(sx_im, o1);
    q2 = sat(sy_re, o2);
    q3 = sat(sy_im, o3);
  end

  always_ff @(posedge clk) begin
    x_re <= q0;
    x_im <= q1;
    y_re <= q2;
    y_im <= q3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      ovf       <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      ovf       <= v1 & (o0 | o1 | o2 | o3);
    end
  end
endmodule
