// tb_mdc_commutator: feeds a commutator (D_MAX = 4, and D = 2 in half mode) with lanes
// tagged by (lane, cycle since in_sof) for three 4D-cycle groups, twice with an idle gap
// between runs, and checks the 4x4 block transpose: output lane a at cycle 3D + g*4D +
// q*D + b must hold the input of lane q at cycle g*4D + a*D + b. out_valid and out_sof
// must be the inputs delayed by 3D.
module tb_mdc_commutator;
  import fft_pkg::*;
  localparam int DM = 4;
  logic  clk = 1'b0, rst_n, d_half, in_valid, in_sof, out_valid, out_sof;
  cplx_t in_data [4], out_data [4];
  int checks = 0, failures = 0;

  mdc_commutator #(.D_MAX(DM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; d_half = 1'b0; in_valid = 1'b0; in_sof = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      automatic int d = (run >= 2) ? DM / 2 : DM;
      automatic int ngroups = 3;
      d_half = (run >= 2);
      for (int t = 0; t < ngroups * 4 * d + 3 * d + 4 * d; t++) begin
        in_valid = (t < ngroups * 4 * d);
        in_sof   = (t == 0);
        for (int q = 0; q < 4; q++) begin
          in_data[q].re = 16'(q * 1000 + t);
          in_data[q].im = 16'(run);
        end
        #1;
        if (t >= 3 * d) begin
          automatic int u = t - 3 * d;
          automatic bit v = (u < ngroups * 4 * d);
          checks++;
          if (out_valid !== v || out_sof !== (u == 0)) begin
            failures++;
            $display("FAIL control run=%0d t=%0d valid=%0d sof=%0d", run, t, out_valid, out_sof);
          end
          if (v) begin
            automatic int g = u / (4 * d), q = (u % (4 * d)) / d, b = u % d;
            for (int a = 0; a < 4; a++) begin
              automatic int tin = g * 4 * d + a * d + b;
              checks++;
              if (out_data[a].re !== 16'(q * 1000 + tin) || out_data[a].im !== 16'(run)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL run=%0d t=%0d lane %0d got %0d expected %0d", run, t, a,
                           out_data[a].re, q * 1000 + tin);
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
