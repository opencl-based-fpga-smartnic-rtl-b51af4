// cp_remove: cyclic prefix removal for the uplink.
//
// Receives OFDM symbols of N + CP time-domain samples, each starting with
// its cyclic prefix, discards the first CP samples and forwards the N
// samples of the symbol. No storage: the prefix samples are accepted and
// dropped (s_ready = 1 while dropping), the symbol samples pass straight
// through with the output's ready. A symbol counter tracks the position.
// cfg_log2n and cfg_cp_len are sampled with the first sample of each
// symbol; cfg_cp_len must be below N.
//
// Reset: rst_n active low, synchronous.
// Interface: valid/ready streams of lowphy_pkg::iq_t; m_last marks the last
// sample of a symbol; dropping is high while the prefix is being skipped.
// Timing: combinational path from input to output, zero latency; CP clocks
// of dropping per symbol when the input never stalls.
// Removing the prefix before the FFT follows the document; the
// pass-through structure is a choice of this design.
module cp_remove #(
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
  output logic                 dropping
);
  import lowphy_pkg::*;

  localparam int CW = LOG2_NMAX + 2;

  logic [CW-1:0]        cnt;
  logic [3:0]           l_reg, l_cur;
  logic [LOG2_NMAX-1:0] cp_reg, cp_cur;
  logic [CW-1:0]        total;

  // the first sample of a symbol uses the live configuration
  assign l_cur  = (cnt == '0) ? clamp_log2n(cfg_log2n, 4'(LOG2_NMAX)) : l_reg;
  assign cp_cur = (cnt == '0) ? cfg_cp_len : cp_reg;
  assign total  = (CW'(1) << l_cur) + CW'(cp_cur);

  assign dropping = (cnt < CW'(cp_cur));
  assign s_ready  = dropping || m_ready;
  assign m_valid  = s_valid && !dropping;
  assign m_data   = s_data;
  assign m_last   = (cnt == total - CW'(1));

  wire fire = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      l_reg  <= 4'(LOG2_NMAX);
      cp_reg <= '0;
    end else if (fire) begin
      if (cnt == '0) begin
        l_reg  <= l_cur;
        cp_reg <= cp_cur;
      end
      cnt <= (cnt == total - CW'(1)) ? '0 : cnt + CW'(1);
    end
  end
endmodule
