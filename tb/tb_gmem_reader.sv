// tb_gmem_reader: checks the global-memory reader against a DDR4 model.
//
// Transfer 1: 64 words (one 2048-point symbol) from a random aligned base
// with random waitrequest, random read latency and random back-pressure on
// the sample stream; every sample must equal the model's pattern, in order,
// and the buffer must never overrun (assertion in the reader).
// Transfer 2: 16 words with no waitrequest and the stream always ready;
// it must take close to 32 clocks per word (one sample per clock).
// The number of read commands must equal the number of words requested.
module tb_gmem_reader;
  import lowphy_pkg::*;
  localparam int ADDR_W = 34, DATA_W = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy;
  logic [ADDR_W-1:0] base_addr = '0;
  logic [23:0] num_words = '0;
  logic [ADDR_W-1:0] avm_address;
  logic avm_read, avm_waitrequest, avm_readdatavalid;
  logic [DATA_W-1:0] avm_readdata;
  logic m_valid, m_ready = 1'b0;
  iq_t  m_data;
  int   stall_pct = 25;

  gmem_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (
    .clk, .rst_n, .start, .base_addr, .num_words, .busy,
    .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .m_valid, .m_ready, .m_data);

  ddr4_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .STALL_PCT(25)) mem (
    .clk, .stall_en(stall_pct != 0), .address(avm_address), .read(avm_read && rst_n),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transfer(input logic [ADDR_W-1:0] base, input int words, input bit gaps, output int took);
    int no = 0, t0, r0;
    logic [15:0] v;
    r0 = mem.reads;
    @(posedge clk);
    base_addr <= base;
    num_words <= 24'(words);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cycle;
    while (no < words * 32) begin
      m_ready <= gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (m_valid && m_ready) begin
        v = 16'(base / 4 + ADDR_W'(no));
        checks++;
        if (m_data.re != v || m_data.im != (v ^ 16'h5a5a)) begin
          failures++;
          if (failures < 5) $display("FAIL sample %0d got %h", no, m_data);
        end
        no++;
      end
    end
    m_ready <= 1'b0;
    took = cycle - t0;
    @(posedge clk);
    checks++;
    if (busy || mem.reads - r0 != words) begin
      failures++;
      $display("FAIL end of transfer: busy=%0d reads=%0d", busy, mem.reads - r0);
    end
  endtask

  initial begin
    int took;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    stall_pct = 25;
    transfer(34'h1_2345_6780 & ~34'h7f, 64, 1'b1, took);
    stall_pct = 0;
    transfer(34'h0_0000_4000, 16, 1'b0, took);
    checks++;
    if (took > 16 * 32 + 30) begin
      failures++;
      $display("FAIL rate: %0d clocks for 512 samples", took);
    end
    $display("rate transfer took %0d clocks for 512 samples", took);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
