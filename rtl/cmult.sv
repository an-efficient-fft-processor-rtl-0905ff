// cmult: complex multiplier for the twiddle multiplication of the MDC stages.
//
// p = a * w where a has DW-bit parts and w has TW-bit parts with TW_FRAC fractional bits.
// Four real products are formed, combined, rounded to nearest (half up) and saturated back
// to DW bits. One register: p is valid one clock after a and w. The description specifies a
// two-input multiplier for the twiddle factors; the rounding and saturation are this
// design's own choices.
module cmult
  import fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t a,
  input  twid_t w,
  output cplx_t p
);
  localparam int PW = DW + TW + 1;

  logic signed [PW-1:0] re_full, im_full;
  logic signed [PW-1:0] re_rnd, im_rnd;

  function automatic logic signed [DW-1:0] sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] s;
    s = v >>> TW_FRAC;
    if (s > PW'(2 ** (DW - 1) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (s < -PW'(2 ** (DW - 1)))     return {1'b1, {(DW-1){1'b0}}};
    return s[DW-1:0];
  endfunction

  always_comb begin
    re_full = PW'(a.re * w.re) - PW'(a.im * w.im);
    im_full = PW'(a.re * w.im) + PW'(a.im * w.re);
    re_rnd  = re_full + PW'(1 << (TW_FRAC - 1));
    im_rnd  = im_full + PW'(1 << (TW_FRAC - 1));
  end

  always_ff @(posedge clk) begin
    p.re <= sat(re_rnd);
    p.im <= sat(im_rnd);
  end
endmodule
