// fft_pkg: types, constants and helper functions shared by the MIMO MDC FFT/IFFT processor.
//
// The processor works on complex samples with DW-bit two's complement real and imaginary
// parts and TW-bit twiddle factors with TW_FRAC fractional bits (1.0 = 2**TW_FRAC). The four
// FFT lengths of the design (2048, 512, 256, 128 points) are selected with fft_len_e.
// The 4-stream, radix-4, 2048-point configuration follows the design description; the word
// lengths, the twiddle format and the stage mapping functions are this design's own choices.
package fft_pkg;

  localparam int NS      = 4;     // concurrent streams = radix
  localparam int N_MAX   = 2048;  // longest FFT
  localparam int DW      = 16;    // data width of a real or imaginary part
  localparam int TW      = 16;    // twiddle width
  localparam int TW_FRAC = 14;    // twiddle fractional bits

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // FFT length select
  typedef enum logic [1:0] {
    LEN_2048 = 2'd0,
    LEN_512  = 2'd1,
    LEN_256  = 2'd2,
    LEN_128  = 2'd3
  } fft_len_e;

  // Number of points for a length code.
  function automatic int unsigned len_points(fft_len_e l);
    case (l)
      LEN_2048: return 2048;
      LEN_512:  return 512;
      LEN_256:  return 256;
      default:  return 128;
    endcase
  endfunction

  // log2 of the number of points.
  function automatic int unsigned len_log2(fft_len_e l);
    case (l)
      LEN_2048: return 11;
      LEN_512:  return 9;
      LEN_256:  return 8;
      default:  return 7;
    endcase
  endfunction

  // First radix-4 stage (0..4) that a frame of this length enters.
  function automatic int unsigned len_entry(fft_len_e l);
    case (l)
      LEN_2048: return 0;
      LEN_512:  return 1;
      LEN_256:  return 1;
      default:  return 2;
    endcase
  endfunction

  // Lengths 2^(2m+1) end with a radix-2 stage; 256 = 4^4 does not.
  function automatic logic len_has_r2(fft_len_e l);
    return l != LEN_256;
  endfunction

  // Twiddle exp(-j*2*pi*j/L), TW_FRAC fractional bits, rounded to nearest.
  function automatic twid_t twiddle(int j, int L);
    real a;
    twid_t w;
    a = 2.0 * 3.14159265358979323846 * real'(j) / real'(L);
    w.re = TW'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
    w.im = TW'($rtoi($floor(-$sin(a) * real'(1 << TW_FRAC) + 0.5)));
    return w;
  endfunction

  // Swap real and imaginary parts: swap(DFT(swap(x))) = N * IDFT(x).
  function automatic cplx_t cswap(cplx_t x);
    cplx_t y;
    y.re = x.im;
    y.im = x.re;
    return y;
  endfunction

endpackage
