// tb_r4_butterfly: random inputs (including full-scale corners) through the radix-4
// butterfly; each output y_m is compared with sum_j x_j * exp(-j*2*pi*j*m/4) / 4 computed
// in real arithmetic, allowing half an LSB plus rounding (1 LSB).
module tb_r4_butterfly;
  import fft_pkg::*;
  cplx_t x [4], y [4];
  int checks = 0, failures = 0;

  r4_butterfly dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 4; j++) begin
        if (i == 0)      begin x[j].re = 16'sh7fff; x[j].im = 16'sh7fff; end
        else if (i == 1) begin x[j].re = 16'sh8000; x[j].im = 16'sh8000; end
        else if (i == 2) begin x[j].re = j[0] ? 16'sh8000 : 16'sh7fff; x[j].im = j[1] ? 16'sh7fff : 16'sh8000; end
        else begin x[j].re = 16'($urandom); x[j].im = 16'($urandom); end
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        real er, ei;
        er = 0.0; ei = 0.0;
        for (int j = 0; j < 4; j++) begin
          // exp(-j*pi/2*jm): cycles 1, -j, -1, j
          case ((j * m) % 4)
            0: begin er += x[j].re; ei += x[j].im; end
            1: begin er += x[j].im; ei -= x[j].re; end
            2: begin er -= x[j].re; ei -= x[j].im; end
            default: begin er -= x[j].im; ei += x[j].re; end
          endcase
        end
        er = er / 4.0; ei = ei / 4.0;
        checks++;
        if ((real'(y[m].re) - er > 1.0) || (er - real'(y[m].re) > 1.0) ||
            (real'(y[m].im) - ei > 1.0) || (ei - real'(y[m].im) > 1.0)) begin
          failures++;
          $display("FAIL m=%0d got (%0d,%0d) expected (%.2f,%.2f)", m, y[m].re, y[m].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
