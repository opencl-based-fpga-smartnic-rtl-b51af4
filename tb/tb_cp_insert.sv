// tb_cp_insert: checks cyclic prefix insertion.
//
// Symbols of 128, 2048, 4 and 512 points are sent with the prefix lengths
// of the size table (10, 160, 0 and 40). The output must be the last CP
// samples followed by the whole symbol, with m_cp on the prefix samples and
// m_last on the final one. Random input gaps and output back-pressure are
// used on some symbols; on the others the first output must follow the last
// input by two clocks and the N + CP outputs must take N + CP clocks.
module tb_cp_insert;
  import lowphy_pkg::*;
  localparam int LOG2_NMAX = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] cfg_log2n;
  logic [LOG2_NMAX-1:0] cfg_cp_len;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0, m_last, m_cp;
  iq_t  s_data = '0, m_data;

  cp_insert #(.LOG2_NMAX(LOG2_NMAX)) dut (.clk, .rst_n, .cfg_log2n, .cfg_cp_len, .s_valid, .s_ready,
                                          .s_data, .m_valid, .m_ready, .m_data, .m_last, .m_cp);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_t sym [2048];

  task automatic run(input int l, input int cp, input bit gaps);
    int n = 1 << l;
    int ni = 0, no = 0, t_in = 0, t_first = -1, t_end = 0, src;
    for (int i = 0; i < n; i++) sym[i] = iq_t'($urandom);
    cfg_log2n = 4'(l);
    cfg_cp_len = LOG2_NMAX'(cp);
    fork
      begin
        while (ni < n) begin
          s_valid <= gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
          s_data  <= sym[ni];
          @(posedge clk);
          if (s_valid && s_ready) begin ni++; t_in = cycle; end
        end
        s_valid <= 1'b0;
      end
      begin
        while (no < n + cp) begin
          m_ready <= gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
          @(posedge clk);
          if (m_valid && m_ready) begin
            if (t_first < 0) t_first = cycle;
            t_end = cycle;
            src = (no < cp) ? (n - cp + no) : (no - cp);
            checks++;
            if (m_data != sym[src] || m_cp != (no < cp) || m_last != (no == n + cp - 1)) begin
              failures++;
              if (failures < 5) $display("FAIL N=%0d out %0d got %h exp %h cp=%0d last=%0d", n, no, m_data, sym[src], m_cp, m_last);
            end
            no++;
          end
        end
        m_ready <= 1'b0;
      end
    join
    if (!gaps) begin
      checks++;
      if (t_first - t_in != 2 || t_end - t_first != n + cp - 1) begin
        failures++;
        $display("FAIL timing N=%0d first=%0d span=%0d", n, t_first - t_in, t_end - t_first);
      end
    end
  endtask

  initial begin
    cfg_log2n = 4'd7; cfg_cp_len = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(7, cp_len_for(7), 1'b0);
    run(11, cp_len_for(11), 1'b1);
    run(2, 0, 1'b1);
    run(9, cp_len_for(9), 1'b0);
    run(11, cp_len_for(11), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
