// tb_lowphy_workloads: runs the evaluated IFFT/FFT sizes through the full
// Low-PHY top and checks values and symbol rate.
//
// The top runs with its default parameters. For each size of 128, 256, 512,
// 1024 and 2048 points, two downlink symbols go in back to back through the
// network input channel and two uplink symbols with cyclic prefix go in
// back to back on the uplink input, at the same time. Both outputs are never
// back-pressured, so the transforms run at full speed.
// Values: every transmitted downlink sample (prefix included) and every
// uplink output sample is compared with a double-precision DFT, scaled by
// 2**-shift, rounded and saturated, within the fixed-point error bound
// 2 + (log2n * 2**(log2n/2+1)) >> shift.
// Rate: the distance between the ends of the two symbols of one size is
// the steady-state symbol period of the memory-based transform. With S the
// sum of the stage times (N+7 per radix-4 stage, N+5 for the radix-2 stage):
// first output 2 + S clocks after the last input, N-1 more clocks to the
// last output, the next symbol's first input one clock later and N-1 clocks
// to its last input, so the period is exactly 2N + S + 1 clocks
// (16425 for 2048 points).
// The sizes are those of the evaluated configurations; the data is random.
module tb_lowphy_workloads;
  import lowphy_pkg::*;
  localparam int NMAX = 2048;
  localparam real PI = 3.14159265358979323846;
  localparam int LMIN = 7, LMAX = 11, REPS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   dl_log2n = 4'd7, dl_shift = 4'd7, ul_log2n = 4'd7, ul_shift = 4'd7;
  logic         dl_src_sel = 1'b1;
  logic         gm_start = 1'b0, gm_busy;
  logic [33:0]  gm_base_addr = '0;
  logic [23:0]  gm_num_words = '0;
  logic [33:0]  avm_address;
  logic         avm_read;
  logic         avm_waitrequest = 1'b0, avm_readdatavalid = 1'b0;
  logic [1023:0] avm_readdata = '0;
  logic         rx_valid = 1'b0, rx_ready;
  iq_t          rx_data = '0;
  logic         tx_valid, tx_ready = 1'b1, tx_last, tx_cp;
  iq_t          tx_data;
  logic         ul_in_valid = 1'b0, ul_in_ready, ul_out_valid, ul_out_ready = 1'b1, ul_out_last;
  iq_t          ul_in_data = '0, ul_out_data;
  logic         dl_busy, dl_radix2, ul_busy, ul_radix2, ul_cp_dropping, dl_symbol_done;
  logic [6:0]   rx_level, tx_level;

  lowphy_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (600_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- references
  real cos_t [NMAX], sin_t [NMAX];

  function automatic int sat_round(real v, int sh);
    real s = v / real'(64'd1 << sh);
    int r = $rtoi($floor(s + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic int core_period(int l);
    int n = 1 << l;
    int nst = (l + 1) / 2;
    int t = 2 * n + 1;
    for (int s = 0; s < nst; s++) t += ((l % 2 == 1) && (s == nst - 1)) ? n + 5 : n + 7;
    return t;
  endfunction

  function automatic int tol_for(int l, int sh);
    return 2 + ((l * (1 << (l / 2 + 1))) >> sh);
  endfunction

  int d_in_re [NMAX], d_in_im [NMAX], d_out_re [NMAX], d_out_im [NMAX];
  task automatic dft(input int l, input bit inv, input int sh);
    int n = 1 << l;
    real ar, ai, c, s;
    for (int k = 0; k < n; k++) begin
      ar = 0.0; ai = 0.0;
      for (int i = 0; i < n; i++) begin
        int e = ((i * k) % n) * (NMAX / n);
        c = cos_t[e];
        s = inv ? sin_t[e] : -sin_t[e];
        ar += real'(d_in_re[i]) * c - real'(d_in_im[i]) * s;
        ai += real'(d_in_re[i]) * s + real'(d_in_im[i]) * c;
      end
      d_out_re[k] = sat_round(ar, sh);
      d_out_im[k] = sat_round(ai, sh);
    end
  endtask

  // expected streams: value, tolerance, flags
  int dl_er [$], dl_ei [$], dl_tol [$], ul_er [$], ul_ei [$], ul_tol [$];
  bit dl_ecp [$], dl_elast [$], ul_elast [$];
  int dl_bad = 0, ul_bad = 0;

  // stimulus of the symbol being fed
  int dl_sym_re [NMAX], dl_sym_im [NMAX], ul_sym_re [NMAX + NMAX / 8], ul_sym_im [NMAX + NMAX / 8];

  // ---------------------------------------------------------------- monitors
  longint dl_end [$], ul_end [$];

  initial begin
    int er, ei, tl;
    bit ec, el;
    forever begin
      @(negedge clk);
      #1;
      if (tx_valid && tx_ready) begin
        checks++;
        if (dl_er.size() == 0) begin
          failures++;
          $display("FAIL: unexpected downlink sample");
        end else begin
          er = dl_er.pop_front(); ei = dl_ei.pop_front(); tl = dl_tol.pop_front();
          ec = dl_ecp.pop_front(); el = dl_elast.pop_front();
          if ((int'(tx_data.re) - er > tl) || (er - int'(tx_data.re) > tl) ||
              (int'(tx_data.im) - ei > tl) || (ei - int'(tx_data.im) > tl) ||
              (tx_cp != ec) || (tx_last != el)) begin
            failures++;
            if (dl_bad < 10) $display("FAIL: downlink got %0d %0d cp=%b last=%b, expected %0d %0d cp=%b last=%b",
                                      tx_data.re, tx_data.im, tx_cp, tx_last, er, ei, ec, el);
            dl_bad++;
          end
        end
      end
      if (ul_out_valid && ul_out_ready) begin
        checks++;
        if (ul_er.size() == 0) begin
          failures++;
          $display("FAIL: unexpected uplink sample");
        end else begin
          er = ul_er.pop_front(); ei = ul_ei.pop_front(); tl = ul_tol.pop_front();
          el = ul_elast.pop_front();
          if ((int'(ul_out_data.re) - er > tl) || (er - int'(ul_out_data.re) > tl) ||
              (int'(ul_out_data.im) - ei > tl) || (ei - int'(ul_out_data.im) > tl) ||
              (ul_out_last != el)) begin
            failures++;
            if (ul_bad < 10) $display("FAIL: uplink got %0d %0d last=%b, expected %0d %0d last=%b",
                                      ul_out_data.re, ul_out_data.im, ul_out_last, er, ei, el);
            ul_bad++;
          end
        end
      end
      if (dl_symbol_done) dl_end.push_back(cycle);
      if (ul_out_valid && ul_out_ready && ul_out_last) ul_end.push_back(cycle);
    end
  end

  // ---------------------------------------------------------------- drivers
  bit dl_fed = 1'b0, ul_fed = 1'b0;

  initial begin : dl_driver
    int n, cp;
    @(posedge rst_n);
    for (int l = LMIN; l <= LMAX; l++) begin
      for (int r = 0; r < REPS; r++) begin
        n = 1 << l;
        cp = cp_len_for(l);
        for (int i = 0; i < n; i++) begin
          d_in_re[i] = int'($signed(16'($urandom)));
          d_in_im[i] = int'($signed(16'($urandom)));
          dl_sym_re[i] = d_in_re[i];
          dl_sym_im[i] = d_in_im[i];
        end
        dft(l, 1'b1, l);
        for (int i = 0; i < n + cp; i++) begin
          int src;
          src = (i < cp) ? n - cp + i : i - cp;
          dl_er.push_back(d_out_re[src]);
          dl_ei.push_back(d_out_im[src]);
          dl_tol.push_back(tol_for(l, l));
          dl_ecp.push_back(i < cp);
          dl_elast.push_back(i == n + cp - 1);
        end
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          dl_log2n = 4'(l);
          dl_shift = 4'(l);
          rx_valid = 1'b1;
          rx_data.re = 16'(dl_sym_re[i]);
          rx_data.im = 16'(dl_sym_im[i]);
          #2;
          while (!rx_ready) begin
            @(negedge clk);
            #2;
          end
        end
      end
    end
    @(negedge clk);
    rx_valid = 1'b0;
    dl_fed = 1'b1;
  end

  initial begin : ul_driver
    int n, cp, sh;
    @(posedge rst_n);
    for (int l = LMIN; l <= LMAX; l++) begin
      for (int r = 0; r < REPS; r++) begin
        n = 1 << l;
        cp = cp_len_for(l);
        sh = l / 2 + 2;
        for (int i = 0; i < n + cp; i++) begin
          ul_sym_re[i] = int'($signed(16'($urandom)));
          ul_sym_im[i] = int'($signed(16'($urandom)));
        end
        for (int i = 0; i < n; i++) begin
          d_in_re[i] = ul_sym_re[cp + i];
          d_in_im[i] = ul_sym_im[cp + i];
        end
        dft(l, 1'b0, sh);
        for (int i = 0; i < n; i++) begin
          ul_er.push_back(d_out_re[i]);
          ul_ei.push_back(d_out_im[i]);
          ul_tol.push_back(tol_for(l, sh));
          ul_elast.push_back(i == n - 1);
        end
        for (int i = 0; i < n + cp; i++) begin
          @(negedge clk);
          ul_log2n = 4'(l);
          ul_shift = 4'(sh);
          ul_in_valid = 1'b1;
          ul_in_data.re = 16'(ul_sym_re[i]);
          ul_in_data.im = 16'(ul_sym_im[i]);
          #2;
          while (!ul_in_ready) begin
            @(negedge clk);
            #2;
          end
        end
      end
    end
    @(negedge clk);
    ul_in_valid = 1'b0;
    ul_fed = 1'b1;
  end

  // ---------------------------------------------------------------- main
  initial begin : main
    int want, got, k;
    for (int e = 0; e < NMAX; e++) begin
      cos_t[e] = $cos(2.0 * PI * real'(e) / real'(NMAX));
      sin_t[e] = $sin(2.0 * PI * real'(e) / real'(NMAX));
    end
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (dl_fed && ul_fed);
    wait (dl_er.size() == 0 && ul_er.size() == 0);
    repeat (20) @(posedge clk);

    // symbol rate per size
    checks += 2;
    if (dl_end.size() != (LMAX - LMIN + 1) * REPS || ul_end.size() != (LMAX - LMIN + 1) * REPS) begin
      failures++;
      $display("FAIL: %0d downlink and %0d uplink symbols finished", dl_end.size(), ul_end.size());
    end else begin
      for (int l = LMIN; l <= LMAX; l++) begin
        k = (l - LMIN) * REPS;
        want = core_period(l);
        for (int r = 1; r < REPS; r++) begin
          checks += 2;
          got = int'(dl_end[k + r] - dl_end[k + r - 1]);
          $display("%0d points: downlink symbol period %0d clocks (expected %0d)", 1 << l, got, want);
          if (got != want) failures++;
          got = int'(ul_end[k + r] - ul_end[k + r - 1]);
          $display("%0d points: uplink symbol period %0d clocks (expected %0d)", 1 << l, got, want);
          if (got != want) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
