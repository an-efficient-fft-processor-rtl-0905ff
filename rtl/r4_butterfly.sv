// r4_butterfly: radix-4 decimation-in-frequency butterfly, output divided by 4.
//
//   y0 = (x0 + x1 + x2 + x3)/4      y1 = (x0 - j x1 - x2 + j x3)/4
//   y2 = (x0 - x1 + x2 - x3)/4      y3 = (x0 + j x1 - x2 - j x3)/4
// computed in two adder levels: t0 = x0+x2, t1 = x0-x2, t2 = x1+x3, t3 = x1-x3, then
// y0 = t0+t2, y2 = t0-t2, y1 = t1 - j t3, y3 = t1 + j t3. Every one of the 16 real
// additions is an HNG ripple-carry adder of DW+2 bits, so nothing overflows; the final
// divide by 4 rounds to nearest (saturating in the one case that would round past full
// scale). Combinational. The radix-4 butterfly and the HNG adder
// follow the design description; the scaling is this design's choice.
module r4_butterfly
  import fft_pkg::*;
(
  input  cplx_t x [4],
  output cplx_t y [4]
);
  localparam int AW = DW + 2;
  typedef logic [AW-1:0] word_t;

  word_t l1_a [8], l1_b [8], l1_s [8];
  logic  l1_sub [8];
  word_t l2_a [8], l2_b [8], l2_s [8];
  logic  l2_sub [8];

  function automatic word_t ext(logic signed [DW-1:0] v);
    return word_t'(signed'(v));
  endfunction

  // level 1: index 2*k + {0: re, 1: im} for t0..t3
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      cplx_t u, v;
      u = (k < 2) ? x[0] : x[1];
      v = (k < 2) ? x[2] : x[3];
      l1_a[2*k]   = ext(u.re);
      l1_b[2*k]   = ext(v.re);
      l1_a[2*k+1] = ext(u.im);
      l1_b[2*k+1] = ext(v.im);
      l1_sub[2*k]   = k[0];
      l1_sub[2*k+1] = k[0];
    end
  end

  // level 2: index 2*m + {0: re, 1: im} for y0..y3
  // t_k.re = l1_s[2k], t_k.im = l1_s[2k+1]
  always_comb begin
    // y0 = t0 + t2
    l2_a[0] = l1_s[0]; l2_b[0] = l1_s[4]; l2_sub[0] = 1'b0;
    l2_a[1] = l1_s[1]; l2_b[1] = l1_s[5]; l2_sub[1] = 1'b0;
    // y1 = t1 - j t3 : re = t1.re + t3.im, im = t1.im - t3.re
    l2_a[2] = l1_s[2]; l2_b[2] = l1_s[7]; l2_sub[2] = 1'b0;
    l2_a[3] = l1_s[3]; l2_b[3] = l1_s[6]; l2_sub[3] = 1'b1;
    // y2 = t0 - t2
    l2_a[4] = l1_s[0]; l2_b[4] = l1_s[4]; l2_sub[4] = 1'b1;
    l2_a[5] = l1_s[1]; l2_b[5] = l1_s[5]; l2_sub[5] = 1'b1;
    // y3 = t1 + j t3 : re = t1.re - t3.im, im = t1.im + t3.re
    l2_a[6] = l1_s[2]; l2_b[6] = l1_s[7]; l2_sub[6] = 1'b1;
    l2_a[7] = l1_s[3]; l2_b[7] = l1_s[6]; l2_sub[7] = 1'b0;
  end

  for (genvar i = 0; i < 8; i++) begin : g_add
    hng_rca #(.W(AW)) u_l1 (.a(l1_a[i]), .b(l1_b[i]), .sub(l1_sub[i]), .s(l1_s[i]));
    hng_rca #(.W(AW)) u_l2 (.a(l2_a[i]), .b(l2_b[i]), .sub(l2_sub[i]), .s(l2_s[i]));
  end

  // divide by 4 with rounding: (v + 2) >>> 2; only +4*(2^(DW-1)-0.5) can round up past the
  // largest DW-bit value, and that case saturates
  function automatic logic signed [DW-1:0] div4(word_t v);
    logic signed [AW:0] r;
    r = (AW+1)'(signed'(v)) + (AW+1)'(2);
    r = r >>> 2;
    if (r > (AW+1)'(2 ** (DW - 1) - 1)) return {1'b0, {(DW-1){1'b1}}};
    return r[DW-1:0];
  endfunction

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      y[m].re = div4(l2_s[2*m]);
      y[m].im = div4(l2_s[2*m+1]);
    end
  end
endmodule
