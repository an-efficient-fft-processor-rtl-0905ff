// tb_twiddle_rom: reads every entry of 64- and 2048-entry twiddle tables and compares it
// with cos(2 pi j / L) and -sin(2 pi j / L) scaled by 2^14, allowing one LSB.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic [5:0]  i64;
  logic [10:0] i2k;
  twid_t       w64, w2k;
  int checks = 0, failures = 0;

  twiddle_rom #(.L(64))   d64 (.idx(i64), .w(w64));
  twiddle_rom #(.L(2048)) d2k (.idx(i2k), .w(w2k));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int j, int L, twid_t w);
    real c, s;
    c = $cos(2.0 * 3.14159265358979 * j / L) * 16384.0;
    s = -$sin(2.0 * 3.14159265358979 * j / L) * 16384.0;
    checks++;
    if ((real'(w.re) - c > 1.0) || (c - real'(w.re) > 1.0) ||
        (real'(w.im) - s > 1.0) || (s - real'(w.im) > 1.0)) begin
      failures++;
      $display("FAIL L=%0d j=%0d got (%0d,%0d) expected (%.1f,%.1f)", L, j, w.re, w.im, c, s);
    end
  endtask

  initial begin
    for (int j = 0; j < 2048; j++) begin
      i64 = 6'(j); i2k = 11'(j);
      #1;
      if (j < 64) cmp(j, 64, w64);
      cmp(j, 2048, w2k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
