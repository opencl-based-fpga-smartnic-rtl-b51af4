// fft_digit_reverse: input reordering address map of the mixed-radix FFT.
//
// The transform is decimation in time: radix-4 stages first and, when
// log2(N) is odd, one radix-2 stage last. Its input must be stored in
// digit-reversed order. The natural index n is split, from its least
// significant end, into one radix-2 digit (only when log2n is odd) followed
// by radix-4 digits. The digits are then written into the position from the
// most significant end in the same order, each digit keeping its own bit
// order. For even log2n this is base-4 digit reversal; for odd log2n the LSB
// of n becomes the MSB of the position. Purely combinational.
//
// Ports: idx (natural index, only the low log2n bits are used), log2n
// (transform size, LOG2_NMIN..LOG2_NMAX), pos (memory position).
// The reordering step itself follows the document; the digit layout follows
// from the radix-4-first / radix-2-last stage order it shows.
module fft_digit_reverse #(
  parameter int LOG2_NMAX = lowphy_pkg::LOG2_NMAX
) (
  input  logic [LOG2_NMAX-1:0] idx,
  input  logic [3:0]           log2n,
  output logic [LOG2_NMAX-1:0] pos
);
  always_comb begin
    int unsigned src;   // next bit of idx to consume
    int unsigned dst;   // number of position bits still free at the top
    pos = '0;
    src = 0;
    dst = 32'(log2n);
    if (log2n[0]) begin
      // radix-2 digit: idx bit 0 -> position bit log2n-1
      pos[dst-1] = idx[0];
      src = 1;
      dst = dst - 1;
    end
    for (int d = 0; d < (LOG2_NMAX + 1) / 2; d++) begin
      if (dst >= 2) begin
        pos[dst-1] = idx[src+1];
        pos[dst-2] = idx[src];
        src = src + 2;
        dst = dst - 2;
      end
    end
  end
endmodule
