// tb_fft_core: self-checking test of the mixed radix-4/radix-2 FFT/IFFT.
//
// Two cores are instantiated, a forward one (INVERSE = 0) and an inverse one
// (INVERSE = 1), at the default 2048-point maximum. Random symbols of
// 4, 8, 16, 128, 256, 512, 1024 and 2048 points are streamed in with random
// gaps on the input and random back-pressure on the output. Every output is
// compared with a double-precision DFT computed here, scaled by 2**-shift,
// rounded and saturated like the core, within a small tolerance for the
// fixed-point twiddles. With no gaps the time from the last input to the
// first output is checked against the stage timing of the core.
module tb_fft_core;
  import lowphy_pkg::*;
  localparam int LOG2_NMAX = 11;
  localparam int NMAX = 1 << LOG2_NMAX;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] cfg_log2n, cfg_shift;
  logic       s_valid [2], s_ready [2], m_valid [2], m_ready [2], m_last [2], busy [2], calc_r2 [2];
  iq_t        s_data [2], m_data [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    fft_core #(.INVERSE(g == 1)) dut (
      .clk, .rst_n, .cfg_log2n, .cfg_shift,
      .s_valid(s_valid[g]), .s_ready(s_ready[g]), .s_data(s_data[g]),
      .m_valid(m_valid[g]), .m_ready(m_ready[g]), .m_data(m_data[g]), .m_last(m_last[g]),
      .busy(busy[g]), .calc_radix2(calc_r2[g])
    );
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cos_t [NMAX], sin_t [NMAX];
  int  in_re [NMAX], in_im [NMAX];
  int  out_re [NMAX], out_im [NMAX];
  int  r2_cycles = 0;
  always @(posedge clk) if (calc_r2[0] || calc_r2[1]) r2_cycles++;

  function automatic int sat_round(real v, int sh);
    real s = v / real'(64'd1 << sh);
    int r = $rtoi($floor(s + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic run_symbol(input int inv, input int l, input int sh, input bit gaps);
    int n = 1 << l;
    int ni, no, t_last_in, t_first_out, tol, exp_lat, nst, bad;
    real acc_re, acc_im, c, s;
    for (int i = 0; i < n; i++) begin
      in_re[i] = $signed(16'($urandom_range(0, 32767))) - 16384;
      in_im[i] = $signed(16'($urandom_range(0, 32767))) - 16384;
    end
    cfg_log2n = 4'(l);
    cfg_shift = 4'(sh);
    ni = 0; no = 0; t_first_out = -1; t_last_in = 0;
    fork
      begin
        while (ni < n) begin
          s_valid[inv] <= gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;
          s_data[inv].re <= 16'(in_re[ni]);
          s_data[inv].im <= 16'(in_im[ni]);
          @(posedge clk);
          if (s_valid[inv] && s_ready[inv]) begin
            ni++;
            t_last_in = cycle;
          end
        end
        s_valid[inv] <= 1'b0;
      end
      begin
        while (no < n) begin
          m_ready[inv] <= gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
          @(posedge clk);
          if (m_valid[inv] && m_ready[inv]) begin
            if (t_first_out < 0) t_first_out = cycle;
            out_re[no] = m_data[inv].re;
            out_im[no] = m_data[inv].im;
            checks++;
            if (m_last[inv] != (no == n - 1)) begin
              failures++;
              $display("FAIL m_last at %0d", no);
            end
            no++;
          end
        end
        m_ready[inv] <= 1'b0;
      end
    join
    // reference DFT
    tol = 2 + ((l * (1 << (l / 2 + 1))) >> sh);
    bad = 0;
    for (int k = 0; k < n; k++) begin
      acc_re = 0.0; acc_im = 0.0;
      for (int i = 0; i < n; i++) begin
        int e = ((i * k) % n) * (NMAX / n);
        c = cos_t[e];
        s = inv ? sin_t[e] : -sin_t[e];
        acc_re += real'(in_re[i]) * c - real'(in_im[i]) * s;
        acc_im += real'(in_re[i]) * s + real'(in_im[i]) * c;
      end
      checks++;
      if ((out_re[k] - sat_round(acc_re, sh)) > tol || (sat_round(acc_re, sh) - out_re[k]) > tol ||
          (out_im[k] - sat_round(acc_im, sh)) > tol || (sat_round(acc_im, sh) - out_im[k]) > tol) begin
        failures++;
        if (bad < 5)
          $display("FAIL inv=%0d N=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", inv, n, k,
                   out_re[k], out_im[k], sat_round(acc_re, sh), sat_round(acc_im, sh));
        bad++;
      end
    end
    if (!gaps) begin
      nst = (l + 1) / 2;
      exp_lat = (nst - 1) * (n + 7) + ((l % 2 == 1) ? (n + 5) : (n + 7)) + 2;
      checks++;
      if (t_first_out - t_last_in != exp_lat) begin
        failures++;
        $display("FAIL latency N=%0d got %0d expected %0d", n, t_first_out - t_last_in, exp_lat);
      end
    end
    $display("symbol inv=%0d N=%0d shift=%0d gaps=%0d errors=%0d latency=%0d", inv, n, sh, gaps, bad,
             t_first_out - t_last_in);
  endtask

  initial begin
    for (int e = 0; e < NMAX; e++) begin
      cos_t[e] = $cos(2.0 * PI * real'(e) / real'(NMAX));
      sin_t[e] = $sin(2.0 * PI * real'(e) / real'(NMAX));
    end
    for (int g = 0; g < 2; g++) begin
      s_valid[g] = 1'b0; m_ready[g] = 1'b0; s_data[g] = '0;
    end
    cfg_log2n = 4'd11; cfg_shift = 4'd0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // IFFT with 1/N normalisation and FFT with 1/sqrt(N)-like scaling
    run_symbol(1, 2, 2, 1'b0);
    run_symbol(0, 2, 0, 1'b1);
    run_symbol(1, 3, 3, 1'b1);
    run_symbol(0, 4, 2, 1'b0);
    run_symbol(1, 7, 7, 1'b0);
    run_symbol(0, 7, 4, 1'b1);
    run_symbol(1, 8, 8, 1'b1);
    run_symbol(0, 9, 5, 1'b0);
    run_symbol(1, 10, 10, 1'b0);
    run_symbol(1, 11, 11, 1'b0);
    run_symbol(0, 11, 6, 1'b1);
    checks++;
    if (r2_cycles == 0) begin
      failures++;
      $display("FAIL radix-2 stage never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
