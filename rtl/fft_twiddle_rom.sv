// fft_twiddle_rom: twiddle factor table W = exp(-j*2*pi*e/NMAX).
//
// Holds cos(2*pi*e/NMAX) and sin(2*pi*e/NMAX) for e = 0..NMAX-1 as signed
// TW_W-bit fixed point with TW_FRAC fraction bits (1.0 = 2**TW_FRAC). The
// table is computed at elaboration from the formula above, so no data file
// is needed. Transforms smaller than NMAX index it with a stride of
// NMAX/N. The read is registered: the value for addr appears one clock
// after it is presented.
//
// The twiddle definition follows the document; table layout, word width
// and rounding to nearest are choices of this design.
module fft_twiddle_rom #(
  parameter int LOG2_NMAX = lowphy_pkg::LOG2_NMAX,
  parameter int TW_W      = 18,
  parameter int TW_FRAC   = 16
) (
  input  logic                        clk,
  input  logic [LOG2_NMAX-1:0]        addr,
  output logic signed [TW_W-1:0]      cos_q,
  output logic signed [TW_W-1:0]      sin_q
);
  localparam int NMAX = 1 << LOG2_NMAX;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef logic [2*TW_W-1:0] entry_t;
  typedef entry_t table_t [NMAX];

  function automatic tw_t quantize(input real v);
    real scaled;
    scaled = v * real'(64'd1 << TW_FRAC);
    return tw_t'($rtoi(scaled + ((scaled >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic table_t build_table();
    table_t t;
    real ang;
    for (int e = 0; e < NMAX; e++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(NMAX);
      t[e] = {quantize($cos(ang)), quantize($sin(ang))};
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    cos_q <= TABLE[addr][2*TW_W-1:TW_W];
    sin_q <= TABLE[addr][TW_W-1:0];
  end
endmodule
