// tb_input_buffer: writes frames of tagged samples (stream s, sample t) into the input
// buffer, three 128-point frames back to back, one 128-point frame with idle cycles inside,
// and one 2048-point frame, and checks the read stream: N consecutive valid cycles per
// frame with rd_sof on the first, cycle r delivering stream s = r div (N/4) with lane q
// holding sample (r mod N/4) + q*N/4; frame starts on the N/4-cycle grid, and each frame
// starting no later than N/4 + 1 cycles after its last sample was written.
module tb_input_buffer;
  import fft_pkg::*;
  logic     clk = 1'b0, rst_n, wr_valid, rd_valid, rd_sof, busy;
  fft_len_e cfg_len;
  cplx_t    wr_data [NS], rd_data [NS];
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic run(fft_len_e l, int nf, bit gaps);
    int n = int'(len_points(l));
    longint last_wr [4];
    longint first_sof;
    while (busy) @(negedge clk);
    cfg_len = l;
    @(negedge clk);
    fork
      begin
        for (int f = 0; f < nf; f++)
          for (int t = 0; t < n; t++) begin
            if (gaps && t % 29 == 5) begin
              wr_valid = 1'b0;
              @(negedge clk);
            end
            wr_valid = 1'b1;
            for (int s = 0; s < 4; s++) begin
              wr_data[s].re = 16'(s * 4096 + t);
              wr_data[s].im = 16'(f);
            end
            last_wr[f] = cycle;
            @(negedge clk);
          end
        wr_valid = 1'b0;
      end
      begin
        for (int f = 0; f < nf; f++) begin
          while (!rd_valid) @(negedge clk);
          chk(rd_sof, $sformatf("sof at frame %0d start", f));
          if (f == 0) first_sof = cycle;
          chk((cycle - first_sof) % (n / 4) == 0, "frame start off the N/4 grid");
          chk(cycle - last_wr[f] <= longint'(n / 4 + 1),
              $sformatf("frame %0d started %0d cycles after its last write", f, cycle - last_wr[f]));
          for (int r = 0; r < n; r++) begin
            automatic int s = r / (n / 4);
            chk(rd_valid && (rd_sof == (r == 0)), $sformatf("valid/sof f=%0d r=%0d", f, r));
            for (int q = 0; q < 4; q++)
              chk(rd_data[q].re == 16'(s * 4096 + r % (n / 4) + q * n / 4) && rd_data[q].im == 16'(f),
                  $sformatf("N=%0d f=%0d r=%0d lane %0d got %0d", n, f, r, q, rd_data[q].re));
            @(negedge clk);
          end
        end
      end
    join
  endtask

  initial begin
    rst_n = 1'b0; wr_valid = 1'b0; cfg_len = LEN_128;
    for (int s = 0; s < 4; s++) wr_data[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(LEN_128, 3, 1'b0);
    run(LEN_128, 1, 1'b1);
    run(LEN_2048, 1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
