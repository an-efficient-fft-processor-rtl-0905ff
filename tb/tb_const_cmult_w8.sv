// tb_const_cmult_w8: random data (with full-scale corners) times W_8^k for every k through
// the ROM-less constant multiplier; each product, one clock later, is compared with the
// real-valued product x * exp(-j*2*pi*k/8) (factor rounded to 14 fractional bits, as in
// the twiddle tables), saturated to 16 bits, allowing one LSB.
module tb_const_cmult_w8;
  import fft_pkg::*;
  logic       clk = 1'b0;
  cplx_t      a, p;
  logic [2:0] k;
  real        er, ei;
  bit         chk;
  int checks = 0, failures = 0;

  const_cmult_w8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q14(real v);
    return $floor(v * 16384.0 + 0.5) / 16384.0;
  endfunction

  function automatic real clip(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  initial begin
    chk = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      real ang;
      @(negedge clk);
      if (chk) begin
        checks++;
        if ((real'(p.re) - er > 1.0) || (er - real'(p.re) > 1.0) ||
            (real'(p.im) - ei > 1.0) || (ei - real'(p.im) > 1.0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d got (%0d,%0d) expected (%.2f,%.2f)", k, p.re, p.im, er, ei);
        end
      end
      k = 3'(i);
      if (i < 16) begin
        a.re = i[3] ? 16'sh8000 : 16'sh7fff;
        a.im = i[4] ? 16'sh7fff : 16'sh8000;
      end else begin
        a.re = 16'($urandom);
        a.im = 16'($urandom);
      end
      ang = 2.0 * 3.14159265358979 * k / 8.0;
      // factor quantised to 14 fractional bits, as in the twiddle tables
      er = clip(real'(a.re) * q14($cos(ang)) + real'(a.im) * q14($sin(ang)));
      ei = clip(real'(a.im) * q14($cos(ang)) - real'(a.re) * q14($sin(ang)));
      chk = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
