// fft_core: memory-based mixed radix-4/radix-2 FFT or IFFT, 4 to 2048 points.
//
// One symbol of N = 2**log2n complex samples is processed in three phases:
//  1. LOAD  - the N input samples (natural order) are written into the
//             working memory at digit-reversed positions (fft_digit_reverse).
//  2. CALC  - ceil(log2n/2) in-place decimation-in-time stages: radix-4
//             stages first (4-, 16-, 64-, ... point sub-transforms) and, when
//             log2n is odd, one radix-2 stage last (128, 512, 2048 points).
//             Each stage reads the memory one sample per clock, multiplies
//             every sample by its twiddle factor (fft_cmul, fft_twiddle_rom),
//             gathers 4 (or 2) samples, applies fft_radix_butterfly and
//             writes the results back to the same addresses, one per clock,
//             while the next group is being read.
//  3. OUT   - the result is read out in natural order. Each part is shifted
//             right by the configured amount (rounded, half up) and
//             saturated to 16 bits.
// INVERSE = 1 gives the IFFT of the downlink, INVERSE = 0 the FFT of the
// uplink. With out_shift = log2n the inverse result is exactly
// (1/N) * sum X(k) exp(+j2*pi*nk/N); internally no scaling is done, the
// samples are IW = 16 + LOG2_NMAX + 1 bits wide, which holds the full growth.
//
// Reset: rst_n is active low and synchronous.
// Interface: valid/ready streams of lowphy_pkg::iq_t. cfg_log2n and
// cfg_shift are sampled with the first sample of each symbol; log2n is
// clamped to 2..LOG2_NMAX. m_last marks the last output sample.
// Timing: s_ready is high during LOAD; each stage takes N + 7 (radix-4)
// or N + 5 (radix-2) clocks including the pipeline drain; the first output
// sample is valid 2 + (sum of stage times) clocks after the last input was
// accepted (12330 clocks for 2048 points); with m_ready held high the
// output takes N clocks. A new symbol is accepted after the last output.
//
// The radix order (radix-4 first, radix-2 last), the reordering step and
// the supported sizes follow the document. The single-port-per-direction
// memory architecture, one sample per clock, and the fixed-point widths are
// choices of this design (the document's kernel is a fully unrolled one).
module fft_core #(
  parameter int LOG2_NMAX = lowphy_pkg::LOG2_NMAX,
  parameter int IN_W      = lowphy_pkg::IQ_W,
  parameter int IW        = IN_W + LOG2_NMAX + 1,
  parameter int TW_W      = 18,
  parameter int TW_FRAC   = 16,
  parameter bit INVERSE   = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       cfg_log2n,
  input  logic [3:0]       cfg_shift,
  input  logic             s_valid,
  output logic             s_ready,
  input  lowphy_pkg::iq_t  s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output lowphy_pkg::iq_t  m_data,
  output logic             m_last,
  output logic             busy,
  output logic             calc_radix2
);
  import lowphy_pkg::*;

  localparam int NMAX = 1 << LOG2_NMAX;
  localparam int AW   = LOG2_NMAX;
  localparam int CW   = LOG2_NMAX + 1;

  typedef enum logic [1:0] {ST_LOAD, ST_CALC, ST_DRAIN, ST_OUT} state_t;
  state_t state;

  logic [3:0]    l_reg, sh_reg, l_in;
  logic [CW-1:0] cnt;
  logic [3:0]    stage;

  // working memory, {im, re}
  logic [2*IW-1:0] mem [NMAX];
  logic [2*IW-1:0] rd_q;
  logic            mem_we, mem_re;
  logic [AW-1:0]   mem_waddr, mem_raddr;
  logic [2*IW-1:0] mem_wdata;

  // ---------------------------------------------------------------- LOAD
  assign l_in = (cnt == '0) ? clamp_log2n(cfg_log2n, 4'(LOG2_NMAX)) : l_reg;

  logic [AW-1:0] load_pos;
  fft_digit_reverse #(.LOG2_NMAX(LOG2_NMAX)) u_rev (
    .idx  (cnt[AW-1:0]),
    .log2n(l_in),
    .pos  (load_pos)
  );

  assign s_ready = (state == ST_LOAD);
  wire load_fire = s_valid && s_ready;
  wire load_last = (cnt == (CW'(1) << l_in) - CW'(1));

  // ---------------------------------------------------------------- CALC address generation
  logic [3:0]    nst;           // number of stages
  logic          is_r2;         // current stage is the radix-2 one
  logic [3:0]    lb, lq;        // log2 of block size and of its quarter/half
  logic [1:0]    lane;
  logic [CW-1:0] grp, jdx, blk;
  logic [AW-1:0] calc_addr;
  logic [AW-1:0] tw_addr;
  logic [CW+1:0] jk;

  always_comb begin
    nst   = (l_reg + 4'd1) >> 1;
    is_r2 = l_reg[0] && (stage == nst - 4'd1);
    lb    = is_r2 ? l_reg : 4'((stage + 4'd1) << 1);
    lq    = is_r2 ? (lb - 4'd1) : (lb - 4'd2);
    lane  = is_r2 ? {1'b0, cnt[0]} : cnt[1:0];
    grp   = is_r2 ? (cnt >> 1) : (cnt >> 2);
    jdx   = grp & ((CW'(1) << lq) - CW'(1));
    blk   = grp >> lq;
    calc_addr = AW'((blk << lb) | (CW'(lane) << lq) | jdx);
    jk    = (CW+2)'(jdx) * (CW+2)'(lane);
    tw_addr = AW'(jk << (4'(LOG2_NMAX) - lb));
  end

  logic signed [TW_W-1:0] tw_cos, tw_sin;
  fft_twiddle_rom #(.LOG2_NMAX(LOG2_NMAX), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_tw (
    .clk  (clk),
    .addr (tw_addr),
    .cos_q(tw_cos),
    .sin_q(tw_sin)
  );

  // pipeline stage 1: memory and twiddle read
  logic          v1, last1, r2_1;
  logic [1:0]    lane1;
  logic [AW-1:0] addr1;
  // pipeline stage 2: twiddle product
  logic          v2, last2, r2_2;
  logic [1:0]    lane2;
  logic [AW-1:0] addr2;
  logic signed [IW-1:0] prod_re, prod_im, mul_re, mul_im;

  fft_cmul #(.W(IW), .TW_W(TW_W), .TW_FRAC(TW_FRAC), .INVERSE(INVERSE)) u_mul (
    .x_re (rd_q[IW-1:0]),
    .x_im (rd_q[2*IW-1:IW]),
    .w_cos(tw_cos),
    .w_sin(tw_sin),
    .y_re (mul_re),
    .y_im (mul_im)
  );

  // gathering registers and butterfly
  logic signed [IW-1:0] g_re [4], g_im [4];
  logic [AW-1:0]        g_addr [4];
  logic signed [IW-1:0] bx_re [4], bx_im [4], by_re [4], by_im [4];
  logic [AW-1:0]        bx_addr [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bx_re[i]   = (lane2 == 2'(i)) ? prod_re : g_re[i];
      bx_im[i]   = (lane2 == 2'(i)) ? prod_im : g_im[i];
      bx_addr[i] = (lane2 == 2'(i)) ? addr2   : g_addr[i];
    end
  end

  fft_radix_butterfly #(.W(IW), .INVERSE(INVERSE)) u_bfly (
    .radix2(r2_2),
    .x_re  (bx_re),
    .x_im  (bx_im),
    .y_re  (by_re),
    .y_im  (by_im)
  );

  // write-back queue
  logic signed [IW-1:0] w_re [4], w_im [4];
  logic [AW-1:0]        w_addr [4];
  logic [2:0]           wpend;
  wire bfly_fire = v2 && last2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; wpend <= '0;
      last1 <= 1'b0; last2 <= 1'b0; r2_1 <= 1'b0; r2_2 <= 1'b0;
      lane1 <= '0; lane2 <= '0; addr1 <= '0; addr2 <= '0;
      prod_re <= '0; prod_im <= '0;
      for (int i = 0; i < 4; i++) begin
        g_re[i] <= '0; g_im[i] <= '0; g_addr[i] <= '0;
        w_re[i] <= '0; w_im[i] <= '0; w_addr[i] <= '0;
      end
    end else begin
      v1    <= (state == ST_CALC);
      lane1 <= lane;
      addr1 <= calc_addr;
      r2_1  <= is_r2;
      last1 <= is_r2 ? (lane == 2'd1) : (lane == 2'd3);
      v2    <= v1;
      lane2 <= lane1;
      addr2 <= addr1;
      r2_2  <= r2_1;
      last2 <= last1;
      prod_re <= mul_re;
      prod_im <= mul_im;
      if (v2) begin
        g_re[lane2]   <= prod_re;
        g_im[lane2]   <= prod_im;
        g_addr[lane2] <= addr2;
      end
      if (bfly_fire) begin
        w_re   <= by_re;
        w_im   <= by_im;
        w_addr <= bx_addr;
        wpend  <= r2_2 ? 3'd2 : 3'd4;
      end else if (wpend != '0) begin
        for (int i = 0; i < 3; i++) begin
          w_re[i]   <= w_re[i+1];
          w_im[i]   <= w_im[i+1];
          w_addr[i] <= w_addr[i+1];
        end
        wpend <= wpend - 3'd1;
      end
    end
  end

  // ---------------------------------------------------------------- OUT
  logic ov, olast;
  wire  out_adv = !ov || m_ready;
  wire  out_more = (cnt < (CW'(1) << l_reg));

  // ---------------------------------------------------------------- memory
  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = w_addr[0];
    mem_wdata = {w_im[0], w_re[0]};
    if (state == ST_LOAD) begin
      mem_we    = load_fire;
      mem_waddr = load_pos;
      mem_wdata = {IW'(s_data.im), IW'(s_data.re)};
    end else if (wpend != '0) begin
      mem_we = 1'b1;
    end
    mem_re    = (state == ST_CALC) || (state == ST_OUT && out_adv && out_more);
    mem_raddr = (state == ST_CALC) ? calc_addr : cnt[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (mem_re) rd_q <= mem[mem_raddr];
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_LOAD;
      cnt    <= '0;
      stage  <= '0;
      l_reg  <= 4'(LOG2_NMAX);
      sh_reg <= '0;
      ov     <= 1'b0;
      olast  <= 1'b0;
    end else begin
      unique case (state)
        ST_LOAD: if (load_fire) begin
          if (cnt == '0) begin
            l_reg  <= l_in;
            sh_reg <= cfg_shift;
          end
          if (load_last) begin
            cnt   <= '0;
            stage <= '0;
            state <= ST_CALC;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        ST_CALC: begin
          if (cnt == (CW'(1) << l_reg) - CW'(1)) begin
            state <= ST_DRAIN;
            cnt   <= '0;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        ST_DRAIN: if (!v1 && !v2 && wpend == '0) begin
          if (stage == nst - 4'd1) begin
            state <= ST_OUT;
          end else begin
            stage <= stage + 4'd1;
            state <= ST_CALC;
          end
        end
        ST_OUT: if (out_adv) begin
          if (out_more) begin
            ov    <= 1'b1;
            olast <= (cnt == (CW'(1) << l_reg) - CW'(1));
            cnt   <= cnt + CW'(1);
          end else begin
            ov    <= 1'b0;
            olast <= 1'b0;
            cnt   <= '0;
            state <= ST_LOAD;
          end
        end
        default: state <= ST_LOAD;
      endcase
    end
  end

  // output scaling: round half up, then saturate to IN_W bits
  function automatic logic signed [IN_W-1:0] scale_sat(input logic signed [IW-1:0] v,
                                                       input logic [3:0] sh);
    logic signed [IW:0] t;
    t = (IW+1)'(v) + ((sh == 4'd0) ? (IW+1)'(0) : ((IW+1)'(1) << (sh - 4'd1)));
    t = t >>> sh;
    if (t > (IW+1)'((1 << (IN_W - 1)) - 1))  return {1'b0, {(IN_W-1){1'b1}}};
    if (t < -(IW+1)'(1 << (IN_W - 1)))        return {1'b1, {(IN_W-1){1'b0}}};
    return t[IN_W-1:0];
  endfunction

  assign m_valid     = ov;
  assign m_last      = olast;
  assign m_data.re   = scale_sat(rd_q[IW-1:0], sh_reg);
  assign m_data.im   = scale_sat(rd_q[2*IW-1:IW], sh_reg);
  assign busy        = (state != ST_LOAD);
  assign calc_radix2 = (state == ST_CALC) && is_r2;

  // stream rule: an output sample that was not accepted is held unchanged
  logic            chk_stall;
  lowphy_pkg::iq_t chk_data;
  always_ff @(posedge clk) begin
    chk_stall <= rst_n && m_valid && !m_ready;
    chk_data  <= m_data;
    if (rst_n && chk_stall) assert (m_valid && m_data == chk_data)
      else $error("fft_core: output changed while stalled");
  end
endmodule
