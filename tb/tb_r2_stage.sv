// tb_r2_stage: feeds the radix-2 stage in the order the last radix-4 stage produces (lane q,
// cycle t carries point 8*(t/2) + 2q + t%2) with random values and checks, two clocks
// later, that lanes 2p and 2p+1 of output cycle 2g+c hold (x[a] + x[a+1])/2 and
// (x[a] - x[a+1])/2 with a = 8g + 4p + 2c, within one LSB, and that valid and sof follow.
module tb_r2_stage;
  import fft_pkg::*;
  localparam int NP = 64;  // points per run
  logic  clk = 1'b0, rst_n, in_valid, in_sof, out_valid, out_sof;
  cplx_t in_data [4], out_data [4];
  int    xr [NP], xi [NP];
  int checks = 0, failures = 0;

  r2_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      for (int p = 0; p < NP; p++) begin
        xr[p] = int'($urandom_range(65535)) - 32768;
        xi[p] = int'($urandom_range(65535)) - 32768;
      end
      for (int t = 0; t < NP / 4 + 2 + run; t++) begin
        in_valid = (t < NP / 4);
        in_sof   = (t == 0);
        for (int q = 0; q < 4; q++) begin
          automatic int pt = 8 * (t / 2) + 2 * q + t % 2;
          in_data[q].re = (t < NP / 4) ? 16'(xr[pt]) : '0;
          in_data[q].im = (t < NP / 4) ? 16'(xi[pt]) : '0;
        end
        #1;
        if (t >= 2) begin
          automatic int u = t - 2;
          automatic bit v = (u < NP / 4);
          checks++;
          if (out_valid !== v || out_sof !== (u == 0)) begin
            failures++;
            $display("FAIL control run=%0d t=%0d", run, t);
          end
          if (v) begin
            for (int p = 0; p < 2; p++) begin
              automatic int a = 8 * (u / 2) + 4 * p + 2 * (u % 2);
              real sr, si, dr, di;
              sr = (xr[a] + xr[a+1]) / 2.0; si = (xi[a] + xi[a+1]) / 2.0;
              dr = (xr[a] - xr[a+1]) / 2.0; di = (xi[a] - xi[a+1]) / 2.0;
              if (sr > 32767.0) sr = 32767.0;
              if (si > 32767.0) si = 32767.0;
              if (dr > 32767.0) dr = 32767.0;
              if (di > 32767.0) di = 32767.0;
              checks++;
              if ((real'(out_data[2*p].re) - sr > 1.0) || (sr - real'(out_data[2*p].re) > 1.0) ||
                  (real'(out_data[2*p].im) - si > 1.0) || (si - real'(out_data[2*p].im) > 1.0) ||
                  (real'(out_data[2*p+1].re) - dr > 1.0) || (dr - real'(out_data[2*p+1].re) > 1.0) ||
                  (real'(out_data[2*p+1].im) - di > 1.0) || (di - real'(out_data[2*p+1].im) > 1.0)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL run=%0d u=%0d pair %0d: got (%0d,%0d)/(%0d,%0d) exp (%.1f,%.1f)/(%.1f,%.1f)",
                           run, u, p, out_data[2*p].re, out_data[2*p].im, out_data[2*p+1].re,
                           out_data[2*p+1].im, sr, si, dr, di);
              end
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
