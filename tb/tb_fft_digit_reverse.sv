// tb_fft_digit_reverse: checks the input reordering map for 4..2048 points.
//
// For every size the expected position is built arithmetically: the index
// is split by repeated division into a radix-2 digit (odd log2 sizes) and
// radix-4 digits, and the digits are placed from the top of the position
// downwards with place values N/2 (or N/4), then /4 for each further digit.
// The map is also checked to be a permutation.
module tb_fft_digit_reverse;
  localparam int LOG2_NMAX = 11;
  logic [LOG2_NMAX-1:0] idx, pos;
  logic [3:0] log2n;

  fft_digit_reverse #(.LOG2_NMAX(LOG2_NMAX)) dut (.idx, .log2n, .pos);

  int checks = 0, failures = 0;
  bit seen [1 << LOG2_NMAX];

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, rem, place, expv;
    for (int l = 2; l <= LOG2_NMAX; l++) begin
      n = 1 << l;
      foreach (seen[i]) seen[i] = 1'b0;
      for (int i = 0; i < n; i++) begin
        rem = i; expv = 0; place = n;
        if (l % 2 == 1) begin
          place = place / 2;
          expv += (rem % 2) * place;
          rem = rem / 2;
        end
        while (place > 1) begin
          place = place / 4;
          expv += (rem % 4) * place;
          rem = rem / 4;
        end
        idx = LOG2_NMAX'(i);
        log2n = 4'(l);
        #1;
        checks++;
        if (int'(pos) != expv || seen[pos]) begin
          failures++;
          if (failures < 5) $display("FAIL N=%0d idx=%0d pos=%0d exp=%0d", n, i, pos, expv);
        end
        seen[pos] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
