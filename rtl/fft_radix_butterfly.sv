// fft_radix_butterfly: radix-4 / radix-2 butterfly of the FFT/IFFT.
//
// Inputs x[0..3] are the already twiddle-multiplied outputs of the four
// (or two) sub-transforms being combined. In radix-4 mode
//   a = x0 + x2, b = x0 - x2, c = x1 + x3, d = x1 - x3
//   y0 = a + c, y2 = a - c, y1 = b - j*d, y3 = b + j*d   (forward)
//   y1 = b + j*d, y3 = b - j*d                           (inverse)
// which uses only the trivial factors at 0, 90, 180 and 270 degrees.
// In radix-2 mode (radix2 = 1) y0 = x0 + x1, y1 = x0 - x1, and y2, y3
// are zero. Purely combinational; no scaling is applied: the sample width W
// carries the full growth of the transform.
// The radix-4 / radix-2 butterflies are those of the document; the
// unscaled fixed-point arithmetic is a choice of this design.
module fft_radix_butterfly #(
  parameter int W       = 28,
  parameter bit INVERSE = 1'b0
) (
  input  logic                radix2,
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  output logic signed [W-1:0] y_re [4],
  output logic signed [W-1:0] y_im [4]
);
  logic signed [W-1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;
  logic signed [W-1:0] jd_re, jd_im;   // j*d

  always_comb begin
    a_re = x_re[0] + x_re[2];  a_im = x_im[0] + x_im[2];
    b_re = x_re[0] - x_re[2];  b_im = x_im[0] - x_im[2];
    c_re = x_re[1] + x_re[3];  c_im = x_im[1] + x_im[3];
    d_re = x_re[1] - x_re[3];  d_im = x_im[1] - x_im[3];
    jd_re = -d_im;
    jd_im = d_re;
    if (radix2) begin
      y_re[0] = x_re[0] + x_re[1];  y_im[0] = x_im[0] + x_im[1];
      y_re[1] = x_re[0] - x_re[1];  y_im[1] = x_im[0] - x_im[1];
      y_re[2] = '0;                 y_im[2] = '0;
      y_re[3] = '0;                 y_im[3] = '0;
    end else begin
      y_re[0] = a_re + c_re;  y_im[0] = a_im + c_im;
      y_re[2] = a_re - c_re;  y_im[2] = a_im - c_im;
      if (INVERSE) begin
        y_re[1] = b_re + jd_re;  y_im[1] = b_im + jd_im;
        y_re[3] = b_re - jd_re;  y_im[3] = b_im - jd_im;
      end else begin
        y_re[1] = b_re - jd_re;  y_im[1] = b_im - jd_im;
        y_re[3] = b_re + jd_re;  y_im[3] = b_im + jd_im;
      end
    end
  end
endmodule
