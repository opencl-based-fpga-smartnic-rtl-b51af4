// lowphy_pkg: types and constants shared by the Low-PHY blocks.
//
// An IQ sample is 32 bits: a signed 16-bit real part and a signed 16-bit
// imaginary part, as the data format of the Low-PHY input stream.
// The largest transform is 2048 points (log2 = 11). The cyclic prefix
// length for sizes 128..2048 follows the table of CP lengths used by the
// design (128:10, 256:20, 512:40, 1024:80, 2048:160, i.e. N*10/128).
// For the smaller sizes (4..64 points) the same ratio N*10/128 is used,
// rounded down; this extension is a choice of this design.
package lowphy_pkg;

  localparam int IQ_W      = 16;   // bits per real / imaginary part
  localparam int LOG2_NMAX = 11;   // 2048-point maximum transform
  localparam int LOG2_NMIN = 2;    // 4-point minimum transform

  typedef struct packed {
    logic signed [IQ_W-1:0] im;
    logic signed [IQ_W-1:0] re;
  } iq_t;

  // Cyclic prefix length for an N = 2**log2n point symbol: N*10/128.
  function automatic int unsigned cp_len_for(input int unsigned log2n);
    return ((32'd1 << log2n) * 10) / 128;
  endfunction

  // Transform sizes outside LOG2_NMIN..lmax are clamped into that range.
  function automatic logic [3:0] clamp_log2n(input logic [3:0] v, input logic [3:0] lmax);
    if (v < 4'(LOG2_NMIN)) return 4'(LOG2_NMIN);
    if (v > lmax)           return lmax;
    return v;
  endfunction

endpackage
