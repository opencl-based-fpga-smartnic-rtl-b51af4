// tb_fft_radix_butterfly: checks the radix-4 and radix-2 butterflies.
//
// Random inputs drive a forward and an inverse butterfly. The expected
// outputs are computed here directly as 4-point (or 2-point) DFTs,
// y[q] = sum_k x[k] * r**(q*k) with r = -j (forward) or +j (inverse),
// using explicit quarter-turn rotations.
module tb_fft_radix_butterfly;
  localparam int W = 28;
  logic radix2;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic signed [W-1:0] yf_re [4], yf_im [4], yi_re [4], yi_im [4];

  fft_radix_butterfly #(.W(W), .INVERSE(1'b0)) dut_f (.radix2, .x_re, .x_im, .y_re(yf_re), .y_im(yf_im));
  fft_radix_butterfly #(.W(W), .INVERSE(1'b1)) dut_i (.radix2, .x_re, .x_im, .y_re(yi_re), .y_im(yi_im));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiply (re, im) by j**t (t quarter turns, counter-clockwise)
  task automatic rot(input longint re, input longint im, input int t, output longint o_re, output longint o_im);
    case (t % 4)
      0: begin o_re = re;  o_im = im;  end
      1: begin o_re = -im; o_im = re;  end
      2: begin o_re = -re; o_im = -im; end
      default: begin o_re = im; o_im = -re; end
    endcase
  endtask

  initial begin
    longint e_re, e_im, r_re, r_im;
    int n, t;
    for (int it = 0; it < 2000; it++) begin
      radix2 = (it % 3 == 0);
      for (int k = 0; k < 4; k++) begin
        x_re[k] = W'($signed(25'($urandom)));
        x_im[k] = W'($signed(25'($urandom)));
      end
      #1;
      n = radix2 ? 2 : 4;
      for (int inv = 0; inv < 2; inv++) begin
        for (int q = 0; q < 4; q++) begin
          e_re = 0; e_im = 0;
          if (q < n) begin
            for (int k = 0; k < n; k++) begin
              // exponent of -j (forward) is q*k*(4/n) quarter turns clockwise
              t = (q * k * (4 / n)) % 4;
              rot(x_re[k], x_im[k], inv ? t : (4 - t) % 4, r_re, r_im);
              e_re += r_re; e_im += r_im;
            end
          end
          checks++;
          if ((inv ? yi_re[q] : yf_re[q]) != W'(e_re) || (inv ? yi_im[q] : yf_im[q]) != W'(e_im)) begin
            failures++;
            if (failures < 5) $display("FAIL it=%0d inv=%0d q=%0d", it, inv, q);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
