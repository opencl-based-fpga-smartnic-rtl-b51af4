// gmem_reader: global-memory to kernel transfer of frequency-domain IQ data.
//
// Reads a block of num_words consecutive 128-byte words (DATA_W = 1024 bits)
// from the board's DDR4 global memory through a memory-mapped read master,
// one word per clock at most, and streams the 32 IQ samples of each word to
// the kernel one per clock. Sample i of a word occupies bits
// [32*i +: 32], real part in the low 16 bits. Reads are pipelined: a new
// address is issued while earlier reads are still in flight, as long as the
// word buffer (LINES words, an ocl_channel) has room for every outstanding
// read, so a slow consumer never loses data.
//
// Reset: rst_n active low, synchronous.
// Control: start (one-clock pulse, ignored while busy) with base_addr
// (byte address, 128-byte aligned) and num_words; busy stays high until the
// last sample has left.
// Memory side: avm_address/avm_read held while avm_waitrequest is high;
// read data returns in order with avm_readdatavalid, any latency.
// Timing: the first sample leaves two clocks after the first read data
// returns; 32 clocks per word at the output when not stalled.
// The 128-byte-per-clock global memory word follows the document; the
// read-master protocol, buffering and sample packing are choices of this
// design.
module gmem_reader #(
  parameter int ADDR_W = 34,
  parameter int DATA_W = 1024,
  parameter int LINES  = 4,
  parameter int CNT_W  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [CNT_W-1:0]  num_words,
  output logic              busy,
  // memory-mapped read master
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  input  logic              avm_waitrequest,
  input  logic [DATA_W-1:0] avm_readdata,
  input  logic              avm_readdatavalid,
  // sample stream
  output logic              m_valid,
  input  logic              m_ready,
  output lowphy_pkg::iq_t   m_data
);
  import lowphy_pkg::*;

  localparam int SPW     = DATA_W / 32;          // samples per word
  localparam int SW      = $clog2(SPW);
  localparam int BYTES   = DATA_W / 8;
  localparam int LW      = $clog2(LINES) + 1;

  logic [CNT_W-1:0]  to_issue, to_drain;        // words left to request / to emit
  logic [LW-1:0]     inflight;
  logic [LW-1:0]     buf_count;
  logic              buf_valid, buf_pop, buf_ready;
  logic [DATA_W-1:0] buf_word;
  logic [SW-1:0]     sidx;

  wire issue   = avm_read && !avm_waitrequest;
  wire can_req = (to_issue != '0) && ((32'(inflight) + 32'(buf_count)) < LINES);

  ocl_channel #(.WIDTH(DATA_W), .DEPTH(LINES)) u_buf (
    .clk, .rst_n,
    .s_valid(avm_readdatavalid),
    .s_ready(buf_ready),
    .s_data (avm_readdata),
    .m_valid(buf_valid),
    .m_ready(buf_pop),
    .m_data (buf_word),
    .count  (buf_count)
  );

  assign m_valid = buf_valid;
  assign m_data  = iq_t'(buf_word[32*sidx +: 32]);
  assign buf_pop = m_valid && m_ready && (sidx == SW'(SPW - 1));
  assign busy    = (to_drain != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_issue    <= '0;
      to_drain    <= '0;
      inflight    <= '0;
      sidx        <= '0;
      avm_read    <= 1'b0;
      avm_address <= '0;
    end else begin
      if (start && !busy) begin
        to_issue    <= num_words;
        to_drain    <= num_words;
        avm_address <= base_addr;
        sidx        <= '0;
      end else begin
        // request side: hold address/read while waitrequest is high
        if (issue) begin
          avm_address <= avm_address + ADDR_W'(BYTES);
          to_issue    <= to_issue - CNT_W'(1);
        end
        if (m_valid && m_ready) begin
          sidx <= sidx + SW'(1);
          if (buf_pop) to_drain <= to_drain - CNT_W'(1);
        end
      end
      inflight <= inflight + LW'(issue) - LW'(avm_readdatavalid);
      if (avm_read && avm_waitrequest) avm_read <= 1'b1;
      else avm_read <= !(start && !busy) && (issue ? ((to_issue > CNT_W'(1)) &&
                         ((32'(inflight) + 32'(buf_count) + 1) < LINES)) : can_req);
    end
  end

  // every returning word finds room in the buffer
  always_ff @(posedge clk) begin
    if (rst_n) assert (!avm_readdatavalid || buf_ready) else $error("gmem_reader: buffer overrun");
  end
endmodule
