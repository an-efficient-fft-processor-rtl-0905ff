// tb_cmult: random data times random unit-circle twiddles (and the exact values 1, -1, j)
// through the complex multiplier; each product, one clock later, is compared with the
// real-valued product rounded to an integer, allowing one LSB.
module tb_cmult;
  import fft_pkg::*;
  logic  clk = 1'b0;
  cplx_t a, p;
  twid_t w;
  real   er, ei;
  bit    chk;
  int checks = 0, failures = 0;

  cmult dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      real ang, wr, wi, ar, ai;
      @(negedge clk);
      if (chk) begin
        checks++;
        if ((real'(p.re) - er > 1.0) || (er - real'(p.re) > 1.0) ||
            (real'(p.im) - ei > 1.0) || (ei - real'(p.im) > 1.0)) begin
          failures++;
          $display("FAIL got (%0d,%0d) expected (%.2f,%.2f)", p.re, p.im, er, ei);
        end
      end
      a.re = 16'(int'($urandom_range(40000)) - 20000);
      a.im = 16'(int'($urandom_range(40000)) - 20000);
      case (i)
        0:       begin w.re = 16'sd16384;  w.im = 16'sd0;     end
        1:       begin w.re = -16'sd16384; w.im = 16'sd0;     end
        2:       begin w.re = 16'sd0;      w.im = 16'sd16384; end
        default: begin
          ang  = 6.283185307179586 * $urandom_range(9999) / 10000.0;
          w.re = 16'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
          w.im = 16'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
        end
      endcase
      wr = real'(w.re) / 16384.0; wi = real'(w.im) / 16384.0;
      ar = real'(a.re);           ai = real'(a.im);
      er = ar * wr - ai * wi;
      ei = ar * wi + ai * wr;
      if (er > 32767.0) er = 32767.0;
      if (er < -32768.0) er = -32768.0;
      if (ei > 32767.0) ei = 32767.0;
      if (ei < -32768.0) ei = -32768.0;
      chk = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
