// tb_r4_stage: drives a radix-4 stage with span 8 (and 4 in half mode) with random lanes
// over several 4s-point blocks and checks, two clocks later, every output lane q against
// (sum_j x_j exp(-j*pi/2*j*q) / 4) * exp(-j*2*pi*n*q/(4s)) computed in real arithmetic,
// n = cycle since in_sof modulo s, allowing 2 LSB. out_valid and out_sof must follow
// in_valid and in_sof with the same two-clock latency.
module tb_r4_stage;
  import fft_pkg::*;
  localparam int S = 8;
  logic  clk = 1'b0, rst_n, half, in_valid, in_sof, out_valid, out_sof;
  cplx_t in_data [4], out_data [4];
  int checks = 0, failures = 0;

  r4_stage #(.S_MAX(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_re [$], exp_im [$];
  bit  exp_v [$], exp_sof [$];

  task automatic push_expect(int n, int s, bit v, bit sof);
    for (int q = 0; q < 4; q++) begin
      real br, bi, wr, wi, ang;
      br = 0.0; bi = 0.0;
      for (int j = 0; j < 4; j++) begin
        case ((j * q) % 4)
          0: begin br += in_data[j].re; bi += in_data[j].im; end
          1: begin br += in_data[j].im; bi -= in_data[j].re; end
          2: begin br -= in_data[j].re; bi -= in_data[j].im; end
          default: begin br -= in_data[j].im; bi += in_data[j].re; end
        endcase
      end
      br /= 4.0; bi /= 4.0;
      ang = 2.0 * 3.14159265358979 * n * q / (4.0 * s);
      wr = $cos(ang); wi = -$sin(ang);
      exp_re.push_back(br * wr - bi * wi);
      exp_im.push_back(br * wi + bi * wr);
    end
    exp_v.push_back(v);
    exp_sof.push_back(sof);
  endtask

  initial begin
    rst_n = 1'b0; half = 1'b0; in_valid = 1'b0; in_sof = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 2; h++) begin
      automatic int s = h ? S / 2 : S;
      half = 1'(h);
      for (int t = 0; t < 3 * 4 * s + 6; t++) begin
        in_valid = (t < 3 * 4 * s);
        in_sof   = (t == 0);
        for (int q = 0; q < 4; q++) begin
          in_data[q].re = 16'(int'($urandom_range(16000)) - 8000);
          in_data[q].im = 16'(int'($urandom_range(16000)) - 8000);
        end
        push_expect(t % s, s, in_valid, in_sof);
        @(negedge clk);
        if (exp_v.size() > 1) begin
          bit v, sf;
          v = exp_v.pop_front(); sf = exp_sof.pop_front();
          checks++;
          if (out_valid !== v || out_sof !== sf) begin
            failures++;
            $display("FAIL control t=%0d valid %0d/%0d sof %0d/%0d", t, out_valid, v, out_sof, sf);
          end
          for (int q = 0; q < 4; q++) begin
            real er, ei;
            er = exp_re.pop_front(); ei = exp_im.pop_front();
            if (v) begin
              checks++;
              if ((real'(out_data[q].re) - er > 2.0) || (er - real'(out_data[q].re) > 2.0) ||
                  (real'(out_data[q].im) - ei > 2.0) || (ei - real'(out_data[q].im) > 2.0)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL half=%0d t=%0d q=%0d got (%0d,%0d) expected (%.1f,%.1f)",
                           h, t, q, out_data[q].re, out_data[q].im, er, ei);
              end
            end
          end
        end
      end
      exp_re.delete(); exp_im.delete(); exp_v.delete(); exp_sof.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
