// cp_insert: cyclic prefix insertion for the downlink.
//
// Receives one time-domain OFDM symbol of N = 2**log2n samples, stores it in
// a symbol buffer, then sends N + CP samples: first a copy of the last CP
// samples of the symbol (the guard interval), then the whole symbol in
// order. The CP length is an input (the top derives it from the transform
// size with lowphy_pkg::cp_len_for, i.e. 10 samples at 128 points up to 160
// at 2048 points). cfg_log2n and cfg_cp_len are sampled with the first
// input sample of each symbol; cfg_cp_len must be below N.
//
// Reset: rst_n active low, synchronous.
// Interface: valid/ready streams of lowphy_pkg::iq_t; m_cp is high on
// prefix samples and m_last on the last sample of the extended symbol.
// Timing: s_ready is high while the buffer is loading (N accepted
// samples); the first output is valid two clocks after the last input was
// accepted, and with m_ready held high the N + CP outputs take N + CP
// clocks. The next symbol is accepted after the last output.
// Inserting the copied tail in front of each symbol follows the document;
// the single store-and-forward buffer is a choice of this design.
module cp_insert #(
  parameter int LOG2_NMAX = lowphy_pkg::LOG2_NMAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           cfg_log2n,
  input  logic [LOG2_NMAX-1:0] cfg_cp_len,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  lowphy_pkg::iq_t      s_data,
  output logic                 m_valid,
  input  logic                 m_ready,
  output lowphy_pkg::iq_t      m_data,
  output logic                 m_last,
  output logic                 m_cp
);
  import lowphy_pkg::*;

  localparam int NMAX = 1 << LOG2_NMAX;
  localparam int AW   = LOG2_NMAX;
  localparam int CW   = LOG2_NMAX + 2;

  typedef enum logic {ST_LOAD, ST_OUT} state_t;
  state_t state;

  iq_t            buf_mem [NMAX];
  iq_t            rd_q;
  logic [3:0]     l_reg, l_in;
  logic [AW-1:0]  cp_reg;
  logic [CW-1:0]  cnt, n_cur, total;
  logic           ov, olast, ocp;

  assign l_in   = (cnt == '0) ? clamp_log2n(cfg_log2n, 4'(LOG2_NMAX)) : l_reg;
  assign n_cur  = CW'(1) << l_reg;
  assign total  = n_cur + CW'(cp_reg);

  assign s_ready = (state == ST_LOAD);
  wire load_fire = s_valid && s_ready;
  wire load_last = (cnt == (CW'(1) << l_in) - CW'(1));
  wire out_adv   = !ov || m_ready;
  wire out_more  = (cnt < total);
  wire in_cp     = (cnt < CW'(cp_reg));
  wire [AW-1:0] rd_addr = in_cp ? AW'(n_cur - CW'(cp_reg) + cnt) : AW'(cnt - CW'(cp_reg));

  always_ff @(posedge clk) begin
    if (load_fire) buf_mem[cnt[AW-1:0]] <= s_data;
    if (state == ST_OUT && out_adv && out_more) rd_q <= buf_mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_LOAD;
      cnt    <= '0;
      l_reg  <= 4'(LOG2_NMAX);
      cp_reg <= '0;
      ov     <= 1'b0;
      olast  <= 1'b0;
      ocp    <= 1'b0;
    end else begin
      unique case (state)
        ST_LOAD: if (load_fire) begin
          if (cnt == '0) begin
            l_reg  <= l_in;
            cp_reg <= cfg_cp_len;
          end
          if (load_last) begin
            cnt   <= '0;
            state <= ST_OUT;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        ST_OUT: if (out_adv) begin
          if (out_more) begin
            ov    <= 1'b1;
            ocp   <= in_cp;
            olast <= (cnt == total - CW'(1));
            cnt   <= cnt + CW'(1);
          end else begin
            ov    <= 1'b0;
            ocp   <= 1'b0;
            olast <= 1'b0;
            cnt   <= '0;
            state <= ST_LOAD;
          end
        end
        default: state <= ST_LOAD;
      endcase
    end
  end

  assign m_valid = ov;
  assign m_data  = rd_q;
  assign m_last  = olast;
  assign m_cp    = ocp;
endmodule
