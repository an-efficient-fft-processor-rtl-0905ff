// tb_mimo_mdc_fft: end-to-end test of the 4-stream MDC FFT/IFFT processor at its default
// parameters.
//
// Runs, for each of the four lengths, frames of random complex samples on all four streams
// and compares every output with a double-precision DFT (or IDFT) divided by N computed
// here, allowing a few LSB of fixed-point error. Mechanisms that are counted and must each
// occur: every length (2048, 512, 256, 128), the radix-2 bypass (256), the inverse mode,
// back-to-back frames (the second frame's output must start exactly N cycles after the
// first's: full throughput), and input gaps inside a frame. Ends with the TB_RESULT line;
// a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_mimo_mdc_fft;
  import fft_pkg::*;

  localparam int TOL = 6;  // LSB allowed per real part

  logic     clk = 1'b0;
  logic     rst_n;
  fft_len_e cfg_len;
  logic     cfg_inverse;
  logic     in_valid;
  cplx_t    in_data [NS];
  logic     out_valid;
  logic [$clog2(N_MAX)-1:0] out_index;
  cplx_t    out_data [NS];
  logic     busy;

  mimo_mdc_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int max_err = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_len [4];
  int n_inverse = 0, n_r2_bypass = 0, n_back_to_back = 0, n_gaps = 0;

  // watchdog
  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  x_re [2][4][N_MAX], x_im [2][4][N_MAX];
  real c_tab [N_MAX], s_tab [N_MAX];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_phase(fft_len_e l, bit inv, int nf, bit gaps);
    automatic int n = int'(len_points(l));
    longint first_in, out_start [2];
    for (int j = 0; j < n; j++) begin
      c_tab[j] = $cos(2.0 * 3.14159265358979323846 * j / n);
      s_tab[j] = $sin(2.0 * 3.14159265358979323846 * j / n);
    end
    for (int f = 0; f < nf; f++)
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < n; t++) begin
          x_re[f][s][t] = int'($urandom_range(16000)) - 8000;
          x_im[f][s][t] = int'($urandom_range(16000)) - 8000;
        end
    while (busy) @(negedge clk);
    @(negedge clk);
    cfg_len     = l;
    cfg_inverse = inv;
    @(negedge clk);
    fork
      begin : drive
        for (int f = 0; f < nf; f++) begin
          for (int t = 0; t < n; t++) begin
            if (gaps && (t % 97 == 13)) begin
              in_valid = 1'b0;
              @(negedge clk);
              @(negedge clk);
              n_gaps++;
            end
            in_valid = 1'b1;
            for (int s = 0; s < 4; s++) begin
              in_data[s].re = 16'(x_re[f][s][t]);
              in_data[s].im = 16'(x_im[f][s][t]);
            end
            if (f == 0 && t == 0) first_in = cycle;
            @(negedge clk);
          end
        end
        in_valid = 1'b0;
      end
      begin : monitor
        for (int f = 0; f < nf; f++) begin
          while (!out_valid) @(negedge clk);
          out_start[f] = cycle;
          for (int k = 0; k < n; k++) begin
            check($sformatf("valid/index N=%0d f=%0d k=%0d", n, f, k),
                  out_valid && (int'(out_index) == k));
            for (int s = 0; s < 4; s++) begin
              real er, ei;
              int  dr, di;
              er = 0.0; ei = 0.0;
              for (int t = 0; t < n; t++) begin
                automatic int j = (t * k) % n;
                // forward: e^{-j..}; inverse: e^{+j..}
                automatic real sn = inv ? -s_tab[j] : s_tab[j];
                er += x_re[f][s][t] * c_tab[j] + x_im[f][s][t] * sn;
                ei += x_im[f][s][t] * c_tab[j] - x_re[f][s][t] * sn;
              end
              er = er / n; ei = ei / n;
              dr = int'(out_data[s].re) - $rtoi(er + (er < 0 ? -0.5 : 0.5));
              di = int'(out_data[s].im) - $rtoi(ei + (ei < 0 ? -0.5 : 0.5));
              if (dr < 0) dr = -dr;
              if (di < 0) di = -di;
              if (dr > max_err) max_err = dr;
              if (di > max_err) max_err = di;
              check($sformatf("N=%0d inv=%0d f=%0d s=%0d k=%0d got (%0d,%0d) exp (%.1f,%.1f)",
                              n, inv, f, s, k, out_data[s].re, out_data[s].im, er, ei),
                    dr <= TOL && di <= TOL);
            end
            @(negedge clk);
          end
        end
      end
    join
    n_len[int'(l)]++;
    if (inv) n_inverse++;
    if (l == LEN_256) n_r2_bypass++;
    $display("N=%0d inverse=%0d frames=%0d latency=%0d cycles (first input to first output)",
             n, inv, nf, out_start[0] - first_in);
    if (nf == 2 && !gaps) begin
      check($sformatf("back-to-back throughput N=%0d: second frame %0d cycles after first",
                      n, out_start[1] - out_start[0]), out_start[1] - out_start[0] == longint'(n));
      n_back_to_back++;
    end
  endtask

  initial begin
    rst_n       = 1'b0;
    in_valid    = 1'b0;
    cfg_len     = LEN_128;
    cfg_inverse = 1'b0;
    for (int s = 0; s < 4; s++) in_data[s] = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    run_phase(LEN_128,  1'b0, 2, 1'b0);
    run_phase(LEN_256,  1'b0, 2, 1'b0);
    run_phase(LEN_512,  1'b1, 1, 1'b1);
    run_phase(LEN_128,  1'b1, 1, 1'b0);
    run_phase(LEN_2048, 1'b0, 2, 1'b0);
    run_phase(LEN_2048, 1'b1, 1, 1'b1);

    $display("max abs error %0d LSB", max_err);
    $display("mechanisms: len2048=%0d len512=%0d len256(radix-2 bypass)=%0d len128=%0d inverse=%0d back_to_back=%0d input_gaps=%0d",
             n_len[0], n_len[1], n_len[2], n_len[3], n_inverse, n_back_to_back, n_gaps);
    check("mechanism len 2048 seen", n_len[0] > 0);
    check("mechanism len 512 seen",  n_len[1] > 0);
    check("mechanism len 256 seen",  n_len[2] > 0);
    check("mechanism len 128 seen",  n_len[3] > 0);
    check("mechanism radix-2 bypass seen", n_r2_bypass > 0);
    check("mechanism inverse seen", n_inverse > 0);
    check("mechanism back-to-back seen", n_back_to_back > 0);
    check("mechanism input gaps seen", n_gaps > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
