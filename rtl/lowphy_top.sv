// lowphy_top: FPGA SmartNIC Low-PHY of a 5G distributed unit.
//
// Downlink: frequency-domain IQ symbols are turned into time-domain OFDM
// symbols with a cyclic prefix and sent towards the radio unit through the
// network-interface output channel (tx_*):
//   source -> fft_core (IFFT) -> cp_insert -> ocl_channel -> tx
// The source is chosen per symbol by dl_src_sel:
//   0 - functional split option 2: the host has written the symbols into
//       the board's DDR4 global memory; gmem_reader fetches them 128 bytes
//       per clock (gm_* start/base/count, avm_* memory port).
//   1 - functional split option 7-1: symbols arrive from the central unit on
//       the network-interface input channel (rx_*, through an ocl_channel).
// The selection is sampled at the first sample of each symbol, so a switch
// never splits a symbol. Nothing returns to the host.
// Uplink: time-domain symbols with prefix from the radio unit (ul_in_*)
//   -> cp_remove -> fft_core (FFT) -> ul_out_*.
// Sizes: dl_log2n / ul_log2n choose 4..2048 points (clamped); the cyclic
// prefix length follows from the size (lowphy_pkg::cp_len_for, 160 samples
// at 2048 points). dl_shift / ul_shift set the output scaling of the
// transforms (dl_shift = dl_log2n gives the 1/N inverse transform).
//
// Reset: rst_n active low, synchronous. All streams use valid/ready.
// Status: dl_symbol_done pulses when the IFFT hands over the last sample
// of a symbol; rx_level / tx_level are the fill levels of the channels.
// Timing: see fft_core, cp_insert and gmem_reader; downlink and uplink run
// independently of each other.
// The chain of functions, the two split options and the output through a
// network-interface channel follow the document; the host, PCIe, DDR4 and
// the network MAC are outside this RTL and appear here as ports.
module lowphy_top #(
  parameter int LOG2_NMAX = lowphy_pkg::LOG2_NMAX,
  parameter int ADDR_W    = 34,
  parameter int DATA_W    = 1024,
  parameter int CH_DEPTH  = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // downlink configuration
  input  logic [3:0]         dl_log2n,
  input  logic [3:0]         dl_shift,
  input  logic               dl_src_sel,
  // global memory reader control (host side)
  input  logic               gm_start,
  input  logic [ADDR_W-1:0]  gm_base_addr,
  input  logic [23:0]        gm_num_words,
  output logic               gm_busy,
  // DDR4 global memory read port
  output logic [ADDR_W-1:0]  avm_address,
  output logic               avm_read,
  input  logic               avm_waitrequest,
  input  logic [DATA_W-1:0]  avm_readdata,
  input  logic               avm_readdatavalid,
  // network input (split option 7-1, frequency domain)
  input  logic               rx_valid,
  output logic               rx_ready,
  input  lowphy_pkg::iq_t    rx_data,
  // network output to the radio unit (time domain with prefix)
  output logic               tx_valid,
  input  logic               tx_ready,
  output lowphy_pkg::iq_t    tx_data,
  output logic               tx_last,
  output logic               tx_cp,
  // uplink
  input  logic [3:0]         ul_log2n,
  input  logic [3:0]         ul_shift,
  input  logic               ul_in_valid,
  output logic               ul_in_ready,
  input  lowphy_pkg::iq_t    ul_in_data,
  output logic               ul_out_valid,
  input  logic               ul_out_ready,
  output lowphy_pkg::iq_t    ul_out_data,
  output logic               ul_out_last,
  // status
  output logic               dl_busy,
  output logic               dl_radix2,
  output logic               ul_busy,
  output logic               ul_radix2,
  output logic               ul_cp_dropping,
  output logic               dl_symbol_done,
  output logic [$clog2(CH_DEPTH):0] rx_level,
  output logic [$clog2(CH_DEPTH):0] tx_level
);
  import lowphy_pkg::*;

  localparam int CW = LOG2_NMAX + 1;

  // ------------------------------------------------------------ downlink sources
  logic gm_valid, gm_ready;
  iq_t  gm_data;

  gmem_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_gmem (
    .clk, .rst_n,
    .start            (gm_start),
    .base_addr        (gm_base_addr),
    .num_words        (gm_num_words),
    .busy             (gm_busy),
    .avm_address      (avm_address),
    .avm_read         (avm_read),
    .avm_waitrequest  (avm_waitrequest),
    .avm_readdata     (avm_readdata),
    .avm_readdatavalid(avm_readdatavalid),
    .m_valid          (gm_valid),
    .m_ready          (gm_ready),
    .m_data           (gm_data)
  );

  logic ch_rx_valid, ch_rx_ready;
  iq_t  ch_rx_data;

  ocl_channel #(.WIDTH($bits(iq_t)), .DEPTH(CH_DEPTH)) u_rx_ch (
    .clk, .rst_n,
    .s_valid(rx_valid),
    .s_ready(rx_ready),
    .s_data (rx_data),
    .m_valid(ch_rx_valid),
    .m_ready(ch_rx_ready),
    .m_data (ch_rx_data),
    .count  (rx_level)
  );

  // per-symbol source selection
  logic          src_reg, src_cur;
  logic [CW-1:0] src_cnt;
  logic [3:0]    src_l, src_l_cur;
  logic          ifft_s_valid, ifft_s_ready;
  iq_t           ifft_s_data;

  assign src_cur   = (src_cnt == '0) ? dl_src_sel : src_reg;
  assign src_l_cur = (src_cnt == '0) ? clamp_log2n(dl_log2n, 4'(LOG2_NMAX)) : src_l;

  always_comb begin
    ifft_s_valid = src_cur ? ch_rx_valid : gm_valid;
    ifft_s_data  = src_cur ? ch_rx_data  : gm_data;
    gm_ready     = !src_cur && ifft_s_ready;
    ch_rx_ready  =  src_cur && ifft_s_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      src_cnt <= '0;
      src_reg <= 1'b0;
      src_l   <= 4'(LOG2_NMAX);
    end else if (ifft_s_valid && ifft_s_ready) begin
      if (src_cnt == '0) begin
        src_reg <= src_cur;
        src_l   <= src_l_cur;
      end
      src_cnt <= (src_cnt == (CW'(1) << src_l_cur) - CW'(1)) ? '0 : src_cnt + CW'(1);
    end
  end

  // ------------------------------------------------------------ downlink IFFT and CP
  logic ifft_m_valid, ifft_m_ready, ifft_m_last;
  iq_t  ifft_m_data;

  fft_core #(.LOG2_NMAX(LOG2_NMAX), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .cfg_log2n  (dl_log2n),
    .cfg_shift  (dl_shift),
    .s_valid    (ifft_s_valid),
    .s_ready    (ifft_s_ready),
    .s_data     (ifft_s_data),
    .m_valid    (ifft_m_valid),
    .m_ready    (ifft_m_ready),
    .m_data     (ifft_m_data),
    .m_last     (ifft_m_last),
    .busy       (dl_busy),
    .calc_radix2(dl_radix2)
  );

  // the prefix length belongs to the symbol leaving the IFFT: its size is
  // the one the IFFT latched, which equals src_l while that symbol is out
  logic [3:0] cpi_l;
  logic       cpi_valid, cpi_ready, cpi_last, cpi_cp;
  iq_t        cpi_data;
  assign cpi_l = src_l;

  cp_insert #(.LOG2_NMAX(LOG2_NMAX)) u_cpi (
    .clk, .rst_n,
    .cfg_log2n (cpi_l),
    .cfg_cp_len(LOG2_NMAX'(cp_len_for(32'(cpi_l)))),
    .s_valid   (ifft_m_valid),
    .s_ready   (ifft_m_ready),
    .s_data    (ifft_m_data),
    .m_valid   (cpi_valid),
    .m_ready   (cpi_ready),
    .m_data    (cpi_data),
    .m_last    (cpi_last),
    .m_cp      (cpi_cp)
  );

  logic [$bits(iq_t)+1:0] tx_word;

  ocl_channel #(.WIDTH($bits(iq_t) + 2), .DEPTH(CH_DEPTH)) u_tx_ch (
    .clk, .rst_n,
    .s_valid(cpi_valid),
    .s_ready(cpi_ready),
    .s_data ({cpi_last, cpi_cp, cpi_data}),
    .m_valid(tx_valid),
    .m_ready(tx_ready),
    .m_data (tx_word),
    .count  (tx_level)
  );

  assign {tx_last, tx_cp, tx_data} = tx_word;

  // ------------------------------------------------------------ uplink
  logic ul_cpr_valid, ul_cpr_ready, ul_cpr_last;
  iq_t  ul_cpr_data;

  cp_remove #(.LOG2_NMAX(LOG2_NMAX)) u_cpr (
    .clk, .rst_n,
    .cfg_log2n (ul_log2n),
    .cfg_cp_len(LOG2_NMAX'(cp_len_for(32'(clamp_log2n(ul_log2n, 4'(LOG2_NMAX)))))),
    .s_valid   (ul_in_valid),
    .s_ready   (ul_in_ready),
    .s_data    (ul_in_data),
    .m_valid   (ul_cpr_valid),
    .m_ready   (ul_cpr_ready),
    .m_data    (ul_cpr_data),
    .m_last    (ul_cpr_last),
    .dropping  (ul_cp_dropping)
  );

  fft_core #(.LOG2_NMAX(LOG2_NMAX), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n,
    .cfg_log2n  (ul_log2n),
    .cfg_shift  (ul_shift),
    .s_valid    (ul_cpr_valid),
    .s_ready    (ul_cpr_ready),
    .s_data     (ul_cpr_data),
    .m_valid    (ul_out_valid),
    .m_ready    (ul_out_ready),
    .m_data     (ul_out_data),
    .m_last     (ul_out_last),
    .busy       (ul_busy),
    .calc_radix2(ul_radix2)
  );

  assign dl_symbol_done = ifft_m_valid && ifft_m_ready && ifft_m_last;

  // the end of a symbol after prefix removal is where the FFT starts work
  logic ul_sym_end;
  always_ff @(posedge clk) begin
    ul_sym_end <= rst_n && ul_cpr_valid && ul_cpr_ready && ul_cpr_last;
    if (rst_n && ul_sym_end) assert (ul_busy) else $error("lowphy_top: uplink symbol boundary mismatch");
  end

endmodule
