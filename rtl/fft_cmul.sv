// fft_cmul: twiddle multiplication of one complex sample.
//
// Computes y = x * W for the forward transform, with W = cos - j*sin, and
// y = x * conj(W) = x * (cos + j*sin) for the inverse transform, where cos
// and sin are the twiddle table values in fixed point with TW_FRAC fraction
// bits. Each part is rounded to nearest (half up) and brought back to the
// sample width W. Purely combinational; the caller registers the result.
// Magnitudes stay within range because |W| <= 1 (plus table rounding) and
// the sample width carries the full growth of the transform.
module fft_cmul #(
  parameter int W       = 28,
  parameter int TW_W    = 18,
  parameter int TW_FRAC = 16,
  parameter bit INVERSE = 1'b0
) (
  input  logic signed [W-1:0]    x_re,
  input  logic signed [W-1:0]    x_im,
  input  logic signed [TW_W-1:0] w_cos,
  input  logic signed [TW_W-1:0] w_sin,
  output logic signed [W-1:0]    y_re,
  output logic signed [W-1:0]    y_im
);
  localparam int PW = W + TW_W + 1;
  logic signed [PW-1:0] rc, is, ic, rs, sum_re, sum_im;
  logic signed [PW-1:0] half;

  always_comb begin
    rc   = PW'(x_re) * PW'(w_cos);
    is   = PW'(x_im) * PW'(w_sin);
    ic   = PW'(x_im) * PW'(w_cos);
    rs   = PW'(x_re) * PW'(w_sin);
    half = PW'(1) <<< (TW_FRAC - 1);
    if (INVERSE) begin
      sum_re = rc - is;
      sum_im = ic + rs;
    end else begin
      sum_re = rc + is;
      sum_im = ic - rs;
    end
    y_re = W'((sum_re + half) >>> TW_FRAC);
    y_im = W'((sum_im + half) >>> TW_FRAC);
  end
endmodule
