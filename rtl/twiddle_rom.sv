// twiddle_rom: read-only table of the twiddle factors W_L^j = exp(-j*2*pi*j/L).
//
// The L entries are computed at elaboration by a constant function (cosine and sine,
// rounded to TW_FRAC fractional bits), so no data file is needed. The read is
// combinational: w is the factor for exponent idx. A twiddle ROM is the usual source of
// the factors in the description; computing it at elaboration is this design's choice.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int L = 2048,
  localparam int AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic [AW-1:0] idx,
  output twid_t         w
);
  typedef logic [2*TW-1:0] table_t [L];

  function automatic table_t build();
    table_t t;
    for (int j = 0; j < L; j++) t[j] = twiddle(j, L);  // packed struct to vector
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign w = twid_t'(TABLE[idx]);
endmodule
