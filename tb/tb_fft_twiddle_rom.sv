// tb_fft_twiddle_rom: checks every twiddle table entry and the read latency.
//
// Each address is presented once; one clock later cos_q and sin_q must equal
// cos(2*pi*e/2048) and sin(2*pi*e/2048) times 2**16, within one unit.
module tb_fft_twiddle_rom;
  localparam int LOG2_NMAX = 11;
  localparam int NMAX = 1 << LOG2_NMAX;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [LOG2_NMAX-1:0] addr;
  logic signed [17:0] cos_q, sin_q;

  fft_twiddle_rom #(.LOG2_NMAX(LOG2_NMAX), .TW_W(18), .TW_FRAC(16)) dut (.clk, .addr, .cos_q, .sin_q);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s;
    for (int e = 0; e < NMAX; e++) begin
      addr = LOG2_NMAX'(e);
      @(posedge clk);
      #1;
      c = $cos(2.0 * PI * real'(e) / real'(NMAX)) * 65536.0;
      s = $sin(2.0 * PI * real'(e) / real'(NMAX)) * 65536.0;
      checks++;
      if ((real'(cos_q) - c) > 1.0 || (c - real'(cos_q)) > 1.0 ||
          (real'(sin_q) - s) > 1.0 || (s - real'(sin_q)) > 1.0) begin
        failures++;
        if (failures < 5) $display("FAIL e=%0d got (%0d,%0d) exp (%f,%f)", e, cos_q, sin_q, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
