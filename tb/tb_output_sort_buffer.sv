// tb_output_sort_buffer: feeds frames in the order the pipeline produces them, each value
// tagged with (stream, frequency index), and checks that the buffer returns N consecutive
// cycles with out_index = 0..N-1 and out_data[s] tagged (s, out_index). The frequency
// index of a pipeline position is worked out here with a general mixed-radix digit
// reversal (radix 4 for every stage, radix 2 for the last stage of 2048/512/128).
// Runs two back-to-back frames for each of the four lengths.
module tb_output_sort_buffer;
  import fft_pkg::*;
  logic     clk = 1'b0, rst_n, in_valid, in_sof, out_valid, busy;
  fft_len_e cfg_len;
  cplx_t    in_data [NS], out_data [NS];
  logic [$clog2(N_MAX)-1:0] out_index;
  int checks = 0, failures = 0;

  output_sort_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frequency held at in-place position p after a DIF FFT with the given radices
  function automatic int freq_of_pos(int p, int n, bit r2);
    int nst = 0, rad [6], w, k = 0, mul = 1;
    int rem = n;
    while (rem > (r2 ? 2 : 1)) begin rad[nst++] = 4; rem /= 4; end
    if (r2) rad[nst++] = 2;
    w = n;
    for (int i = 0; i < nst; i++) begin
      w = w / rad[i];
      k += ((p / w) % rad[i]) * mul;
      mul *= rad[i];
    end
    return k;
  endfunction

  task automatic run(fft_len_e l, int nf);
    int n = int'(len_points(l));
    bit r2 = (l != LEN_256);
    while (busy) @(negedge clk);
    cfg_len = l;
    @(negedge clk);
    fork
      begin
        for (int f = 0; f < nf; f++)
          for (int w = 0; w < n; w++) begin
            automatic int s = w / (n / 4), tt = w % (n / 4);
            in_valid = 1'b1;
            in_sof   = (w == 0);
            for (int ln = 0; ln < 4; ln++) begin
              automatic int p = r2 ? 8 * (tt / 2) + 2 * (tt % 2) + 4 * (ln / 2) + ln % 2
                                   : 4 * tt + ln;
              in_data[ln].re = 16'(s * 4096 + freq_of_pos(p, n, r2));
              in_data[ln].im = 16'(f);
            end
            @(negedge clk);
          end
        in_valid = 1'b0;
        in_sof   = 1'b0;
      end
      begin
        for (int f = 0; f < nf; f++) begin
          while (!out_valid) @(negedge clk);
          for (int k = 0; k < n; k++) begin
            checks++;
            if (!out_valid || int'(out_index) != k) begin
              failures++;
              if (failures < 10) $display("FAIL N=%0d f=%0d k=%0d index %0d", n, f, k, out_index);
            end
            for (int s = 0; s < 4; s++) begin
              checks++;
              if (out_data[s].re != 16'(s * 4096 + k) || out_data[s].im != 16'(f)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL N=%0d f=%0d k=%0d s=%0d got %0d", n, f, k, s, out_data[s].re);
              end
            end
            @(negedge clk);
          end
        end
      end
    join
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; cfg_len = LEN_128;
    for (int s = 0; s < 4; s++) in_data[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(LEN_128, 2);
    run(LEN_256, 2);
    run(LEN_512, 2);
    run(LEN_2048, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
