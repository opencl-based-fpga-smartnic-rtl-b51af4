// tb_ocl_channel: checks the channel FIFO against a queue model.
//
// Random writes and reads for 20000 clocks on a 64-word channel. Every word
// read must be the oldest one written, count must equal the model's fill
// level, a full channel must refuse writes and an empty one must not offer
// data. Long write bursts make the channel fill up; the test checks that
// the full condition was reached.
module tb_ocl_channel;
  localparam int WIDTH = 32, DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0;
  logic [WIDTH-1:0] s_data = '0, m_data;
  logic [$clog2(DEPTH):0] count;

  ocl_channel #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst_n, .s_valid, .s_ready, .s_data,
                                                   .m_valid, .m_ready, .m_data, .count);

  int checks = 0, failures = 0, full_seen = 0;
  logic [WIDTH-1:0] q [$];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 20000; t++) begin
      // phases: fill-heavy, drain-heavy, balanced
      s_valid <= ($urandom_range(0, 9) < ((t / 1000) % 3 == 0 ? 9 : ((t / 1000) % 3 == 1 ? 2 : 5)));
      m_ready <= ($urandom_range(0, 9) < ((t / 1000) % 3 == 0 ? 2 : ((t / 1000) % 3 == 1 ? 9 : 5)));
      s_data  <= $urandom;
      #1;
      checks++;
      if (int'(count) != q.size() || s_ready != (q.size() < DEPTH) || m_valid != (q.size() != 0)) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d count=%0d model=%0d", t, count, q.size());
      end
      if (q.size() == DEPTH) full_seen++;
      @(posedge clk);
      if (m_valid && m_ready) begin
        checks++;
        if (m_data != q[0]) begin
          failures++;
          if (failures < 5) $display("FAIL data %h exp %h", m_data, q[0]);
        end
        void'(q.pop_front());
      end
      if (s_valid && s_ready) q.push_back(s_data);
    end
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL channel never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
