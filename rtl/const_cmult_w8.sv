// const_cmult_w8: ROM-less, reconfigurable complex constant multiplier for the twiddle
// factors W_8^k = exp(-j*2*pi*k/8), k = 0..7.
//
// The eight factors are products of a rotation by W_8 (only for odd k) and a rotation by
// (-j)^(k div 2). The first is x*(1-j)/sqrt(2) = ((re+im) + j(im-re)) * 1/sqrt(2), where the
// constant 1/sqrt(2) ~ 11585/2^14 = (2^13+2^11+2^10+2^8+2^6+1)/2^14 is applied with shifts
// and adds; the result is rounded to nearest. The second only swaps and negates parts.
// Multiplexers selected by k reconfigure the multiplier, so no twiddle table and no general
// multiplier is needed. The result saturates to DW bits and is registered: p is valid one
// clock after a and k, exactly like cmult with the same twiddle. Used by the last radix-4
// stage, whose twiddles are all powers of W_8. A shift-and-add constant multiplier without
// twiddle ROM is what the description calls for; the choice of constant and the stage it
// serves are this design's own.
module const_cmult_w8
  import fft_pkg::*;
(
  input  logic       clk,
  input  cplx_t      a,
  input  logic [2:0] k,
  output cplx_t      p
);
  localparam int XW = DW + 2;        // after re+im and negation
  localparam int SW = XW + 15;       // shift-and-add product

  logic signed [XW-1:0] sr, si, ur, ui, vr, vi;

  // v * 11585 / 2^14, rounded to nearest
  function automatic logic signed [XW-1:0] mul_rsqrt2(logic signed [XW-1:0] v);
    logic signed [SW-1:0] x, s;
    x = SW'(v);
    s = (x <<< 13) + (x <<< 11) + (x <<< 10) + (x <<< 8) + (x <<< 6) + x + SW'(1 << 13);
    return XW'(s >>> 14);
  endfunction

  function automatic logic signed [DW-1:0] sat(logic signed [XW-1:0] v);
    if (v > XW'(2 ** (DW - 1) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (v < -XW'(2 ** (DW - 1)))    return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  always_comb begin
    sr = XW'(a.re) + XW'(a.im);
    si = XW'(a.im) - XW'(a.re);
    // odd k: rotate by W_8 first
    if (k[0]) begin
      ur = mul_rsqrt2(sr);
      ui = mul_rsqrt2(si);
    end else begin
      ur = XW'(a.re);
      ui = XW'(a.im);
    end
    // rotate by (-j)^(k div 2)
    case (k[2:1])
      2'd0: begin vr = ur;  vi = ui;  end
      2'd1: begin vr = ui;  vi = -ur; end
      2'd2: begin vr = -ur; vi = -ui; end
      default: begin vr = -ui; vi = ur; end
    endcase
  end

  always_ff @(posedge clk) begin
    p.re <= sat(vr);
    p.im <= sat(vi);
  end
endmodule
