// tb_lowphy_top: end-to-end test of the SmartNIC Low-PHY at full size.
//
// The top runs with its default parameters (2048-point maximum, 1024-bit
// global memory port). A DDR4 read-port model supplies global memory.
// Downlink, in order:
//   S1      2048 points from global memory (split option 2), 64 words
//   S2, S3  two 128-point symbols from global memory in one 8-word transfer
//   S4, S5  two 512-point symbols pushed back to back into the network
//           input channel (split option 7-1), so the channel fills up
//   S6      256 points from the network input channel
// Every transmitted sample is compared with a double-precision inverse DFT
// (scaled by 1/N, rounded, saturated) preceded by its cyclic prefix of
// N*10/128 samples; tx_cp and tx_last are checked too. The transmit side is
// randomly back-pressured.
// Uplink, at the same time: a 2048-point and a 128-point symbol with
// prefix go in; the forward transform of the samples after each prefix is
// checked the same way.
// Each mechanism is counted and must have happened at least once: both
// sources, a source switch, radix-2 and radix-4-only symbols, memory
// waitrequest stalls, transmit back-pressure, a full input channel,
// prefix insertion and prefix removal.
module tb_lowphy_top;
  import lowphy_pkg::*;
  localparam int NMAX = 2048;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   dl_log2n = 4'd11, dl_shift = 4'd11, ul_log2n = 4'd11, ul_shift = 4'd6;
  logic         dl_src_sel = 1'b0;
  logic         gm_start = 1'b0, gm_busy;
  logic [33:0]  gm_base_addr = '0;
  logic [23:0]  gm_num_words = '0;
  logic [33:0]  avm_address;
  logic         avm_read, avm_waitrequest, avm_readdatavalid;
  logic [1023:0] avm_readdata;
  logic         rx_valid = 1'b0, rx_ready;
  iq_t          rx_data = '0;
  logic         tx_valid, tx_ready = 1'b0, tx_last, tx_cp;
  iq_t          tx_data;
  logic         ul_in_valid = 1'b0, ul_in_ready, ul_out_valid, ul_out_ready = 1'b0, ul_out_last;
  iq_t          ul_in_data = '0, ul_out_data;
  logic         dl_busy, dl_radix2, ul_busy, ul_radix2, ul_cp_dropping, dl_symbol_done;
  logic [6:0]   rx_level, tx_level;

  lowphy_top dut (.*);

  ddr4_model #(.ADDR_W(34), .DATA_W(1024), .STALL_PCT(20)) mem (
    .clk, .stall_en(1'b1), .address(avm_address), .read(avm_read && rst_n), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
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

  // DFT of d_in_* (n = 2**l points) into d_out_*, inverse or forward,
  // scaled by 2**-sh. Takes no simulation time.
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

  // expected transmit stream
  int  exp_re [$], exp_im [$];
  bit  exp_cp [$], exp_last [$];
  int  tx_bad = 0;

  // d_in_* holds the frequency-domain symbol
  task automatic expect_dl_symbol(input int l);
    int n = 1 << l;
    int cp = cp_len_for(l);
    dft(l, 1'b1, l);
    for (int i = 0; i < n + cp; i++) begin
      int src = (i < cp) ? n - cp + i : i - cp;
      exp_re.push_back(d_out_re[src]);
      exp_im.push_back(d_out_im[src]);
      exp_cp.push_back(i < cp);
      exp_last.push_back(i == n + cp - 1);
    end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_opt2 = 0, n_opt71 = 0, n_switch = 0, n_r2 = 0, n_r4only = 0, n_wait = 0, n_txstall = 0;
  int n_rxfull = 0, n_cpins = 0, n_cprem = 0, n_dl_done = 0;
  logic r2_q = 1'b0;
  always @(posedge clk) begin
    r2_q <= dl_radix2;
    if (dl_radix2 && !r2_q) n_r2++;
    if (avm_read && avm_waitrequest) n_wait++;
    if (tx_valid && !tx_ready) n_txstall++;
    if (rx_valid && !rx_ready) n_rxfull++;
    if (tx_valid && tx_ready && tx_cp) n_cpins++;
    if (ul_in_valid && ul_in_ready && ul_cp_dropping) n_cprem++;
    if (dl_symbol_done) n_dl_done++;
  end

  // ---------------------------------------------------------------- transmit monitor
  // All stimulus changes at the falling edge; a transfer is recorded when
  // valid and ready are both high just before the rising edge.
  initial begin
    int er, ei;
    bit ec, el;
    forever begin
      @(negedge clk);
      tx_ready = 1'($urandom_range(0, 4) != 0);
      #1;
      if (tx_valid && tx_ready) begin
        checks++;
        if (exp_re.size() == 0) begin
          failures++;
          $display("FAIL unexpected tx sample");
        end else begin
          er = exp_re.pop_front(); ei = exp_im.pop_front();
          ec = exp_cp.pop_front(); el = exp_last.pop_front();
          if (int'(tx_data.re) - er > 2 || er - int'(tx_data.re) > 2 ||
              int'(tx_data.im) - ei > 2 || ei - int'(tx_data.im) > 2 || tx_cp != ec || tx_last != el) begin
            failures++;
            if (tx_bad < 5) $display("FAIL tx got (%0d,%0d,cp%0d,l%0d) exp (%0d,%0d,cp%0d,l%0d)",
                                     tx_data.re, tx_data.im, tx_cp, tx_last, er, ei, ec, el);
            tx_bad++;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- downlink driver
  task automatic gmem_symbols(input logic [33:0] base, input int l, input int count);
    int n = 1 << l;
    logic [15:0] v;
    for (int s = 0; s < count; s++) begin
      for (int i = 0; i < n; i++) begin
        v = 16'(base / 4 + 34'(s * n + i));
        d_in_re[i] = int'($signed(v));
        d_in_im[i] = int'($signed(v ^ 16'h5a5a));
      end
      expect_dl_symbol(l);
    end
    @(negedge clk);
    dl_log2n = 4'(l); dl_shift = 4'(l);
    if (dl_src_sel != 1'b0) n_switch++;
    dl_src_sel = 1'b0;
    gm_base_addr = base;
    gm_num_words = 24'((count * n * 4) / 128);
    gm_start = 1'b1;
    @(negedge clk);
    gm_start = 1'b0;
    n_opt2 += count;
    if (l % 2 == 0) n_r4only += count;
  endtask

  int rx_re [NMAX], rx_im [NMAX];
  task automatic rx_symbol(input int l);
    int n = 1 << l;
    int sent = 0;
    for (int i = 0; i < n; i++) begin
      rx_re[i] = $urandom_range(0, 32767) - 16384;
      rx_im[i] = $urandom_range(0, 32767) - 16384;
      d_in_re[i] = rx_re[i];
      d_in_im[i] = rx_im[i];
    end
    expect_dl_symbol(l);
    @(negedge clk);
    dl_log2n = 4'(l); dl_shift = 4'(l);
    if (dl_src_sel != 1'b1) n_switch++;
    dl_src_sel = 1'b1;
    while (sent < n) begin
      rx_valid = 1'b1;
      rx_data.re = 16'(rx_re[sent]);
      rx_data.im = 16'(rx_im[sent]);
      #1;
      if (rx_valid && rx_ready) sent++;
      @(negedge clk);
    end
    rx_valid = 1'b0;
    n_opt71++;
    if (l % 2 == 0) n_r4only++;
  endtask

  task automatic wait_done(input int total);
    while (n_dl_done < total) @(posedge clk);
  endtask

  // ---------------------------------------------------------------- uplink
  int ul_bad = 0;
  int in_re [NMAX], in_im [NMAX], o_re [NMAX], o_im [NMAX];
  task automatic ul_symbol(input int l);
    int n = 1 << l;
    int cp = cp_len_for(l);
    int sh = (l + 1) / 2;
    int sent = 0, got = 0;
    for (int i = 0; i < n; i++) begin
      in_re[i] = $urandom_range(0, 32767) - 16384;
      in_im[i] = $urandom_range(0, 32767) - 16384;
      d_in_re[i] = in_re[i];
      d_in_im[i] = in_im[i];
    end
    dft(l, 1'b0, sh);
    for (int i = 0; i < n; i++) begin
      o_re[i] = d_out_re[i];
      o_im[i] = d_out_im[i];
    end
    @(negedge clk);
    ul_log2n = 4'(l); ul_shift = 4'(sh);
    fork
      begin
        while (sent < n + cp) begin
          int src = (sent < cp) ? n - cp + sent : sent - cp;
          ul_in_valid = 1'($urandom_range(0, 5) != 0);
          ul_in_data.re = 16'(in_re[src]);
          ul_in_data.im = 16'(in_im[src]);
          #2;
          if (ul_in_valid && ul_in_ready) sent++;
          @(negedge clk);
        end
        ul_in_valid = 1'b0;
      end
      while (got < n) begin
        ul_out_ready = 1'($urandom_range(0, 3) != 0);
        #1;
        if (ul_out_valid && ul_out_ready) begin
          int tol = 2 + ((l * (1 << (l / 2 + 1))) >> sh);
          checks++;
          if (int'(ul_out_data.re) - o_re[got] > tol || o_re[got] - int'(ul_out_data.re) > tol ||
              int'(ul_out_data.im) - o_im[got] > tol || o_im[got] - int'(ul_out_data.im) > tol ||
              ul_out_last != (got == n - 1)) begin
            failures++;
            if (ul_bad < 5) $display("FAIL ul N=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", n, got,
                                     ul_out_data.re, ul_out_data.im, o_re[got], o_im[got]);
            ul_bad++;
          end
          got++;
        end
        @(negedge clk);
      end
    join
    ul_in_valid = 1'b0;
    ul_out_ready = 1'b0;
    $display("uplink symbol N=%0d done", n);
  endtask

  // ---------------------------------------------------------------- sequence
  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (int e = 0; e < NMAX; e++) begin
      cos_t[e] = $cos(2.0 * PI * real'(e) / real'(NMAX));
      sin_t[e] = $sin(2.0 * PI * real'(e) / real'(NMAX));
    end
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    fork
      begin
        gmem_symbols(34'h0_1000_0000, 11, 1);                 // S1
        wait_done(1);
        gmem_symbols(34'h0_2000_0400, 7, 2);                  // S2, S3
        wait_done(3);
        rx_symbol(9);                                         // S4
        rx_symbol(9);                                         // S5
        wait_done(5);
        rx_symbol(8);                                         // S6
        wait_done(6);
        while (exp_re.size() != 0) @(posedge clk);
        $display("downlink done");
      end
      begin
        ul_symbol(11);
        ul_symbol(7);
      end
    join
    repeat (10) @(posedge clk);
    checks++;
    if (tx_valid || exp_re.size() != 0) begin
      failures++;
      $display("FAIL transmit stream not drained");
    end
    $display("mechanisms: opt2=%0d opt71=%0d switch=%0d radix2=%0d radix4only=%0d wait=%0d txstall=%0d rxfull=%0d cpins=%0d cprem=%0d",
             n_opt2, n_opt71, n_switch, n_r2, n_r4only, n_wait, n_txstall, n_rxfull, n_cpins, n_cprem);
    need("split option 2 source", n_opt2);
    need("split option 7-1 source", n_opt71);
    need("source switch", n_switch);
    need("radix-2 last stage", n_r2);
    need("radix-4 only symbol", n_r4only);
    need("global memory waitrequest", n_wait);
    need("transmit back-pressure", n_txstall);
    need("input channel full", n_rxfull);
    need("prefix insertion", n_cpins);
    need("prefix removal", n_cprem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
