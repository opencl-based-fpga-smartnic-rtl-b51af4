// tb_cp_remove: checks cyclic prefix removal.
//
// Back-to-back symbols of N + CP samples (128 + 10, 2048 + 160, 256 + 20
// and 4 + 0) are streamed with random gaps and random output back-pressure.
// Only the N samples after each prefix may come out, in order, with m_last
// on the last one of each symbol; the number of prefix samples dropped is
// counted and checked too.
module tb_cp_remove;
  import lowphy_pkg::*;
  localparam int LOG2_NMAX = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] cfg_log2n;
  logic [LOG2_NMAX-1:0] cfg_cp_len;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0, m_last, dropping;
  iq_t  s_data = '0, m_data;

  cp_remove #(.LOG2_NMAX(LOG2_NMAX)) dut (.clk, .rst_n, .cfg_log2n, .cfg_cp_len, .s_valid, .s_ready,
                                          .s_data, .m_valid, .m_ready, .m_data, .m_last, .dropping);

  int checks = 0, failures = 0, dropped = 0;
  always @(posedge clk) if (s_valid && s_ready && dropping) dropped++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_t sym [2048 + 160];

  task automatic run(input int l, input bit gaps);
    int n = 1 << l;
    int cp = cp_len_for(l);
    int ni = 0, no = 0, d0 = dropped;
    for (int i = 0; i < n + cp; i++) sym[i] = iq_t'($urandom);
    cfg_log2n = 4'(l);
    cfg_cp_len = LOG2_NMAX'(cp);
    fork
      begin
        while (ni < n + cp) begin
          s_valid <= gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;
          s_data  <= sym[ni];
          @(posedge clk);
          if (s_valid && s_ready) ni++;
        end
        s_valid <= 1'b0;
      end
      begin
        while (no < n) begin
          m_ready <= gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
          @(posedge clk);
          if (m_valid && m_ready) begin
            checks++;
            if (m_data != sym[cp + no] || m_last != (no == n - 1)) begin
              failures++;
              if (failures < 5) $display("FAIL N=%0d out %0d got %h exp %h", n, no, m_data, sym[cp + no]);
            end
            no++;
          end
        end
        m_ready <= 1'b0;
      end
    join
    @(posedge clk);
    checks++;
    if (dropped - d0 != cp) begin
      failures++;
      $display("FAIL N=%0d dropped %0d expected %0d", n, dropped - d0, cp);
    end
  endtask

  initial begin
    cfg_log2n = 4'd7; cfg_cp_len = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(7, 1'b1);
    run(11, 1'b0);
    run(8, 1'b1);
    run(2, 1'b1);
    run(7, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
