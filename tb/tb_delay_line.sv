// tb_delay_line: feeds a counter into delay lines of maximum length 20 and 1 and checks,
// for every length 0..20 (0 and 1 for the short line), that dout equals din delayed by
// exactly len clocks once the line has filled.
module tb_delay_line;
  localparam int MAXL = 20;
  logic clk = 1'b0, rst_n;
  logic [$clog2(MAXL+1)-1:0] len;
  logic [15:0] din, dout;
  logic [0:0]  len1;
  logic [15:0] dout1;
  logic [15:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.W(16), .MAX_LEN(MAXL)) dut (.clk(clk), .rst_n(rst_n), .len(len), .din(din), .dout(dout));
  delay_line #(.W(16), .MAX_LEN(1), .CLEAR(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .len(len1), .din(din), .dout(dout1));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; len = '0; len1 = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l <= MAXL; l++) begin
      len  = 5'(l);
      len1 = 1'(l % 2);
      hist.delete();
      for (int t = 0; t < 3 * MAXL + 10; t++) begin
        din = 16'($urandom);
        hist.push_back(din);
        #1;
        if (t >= l + 1) begin
          checks++;
          if (dout !== hist[t - l]) begin
            failures++;
            $display("FAIL len=%0d t=%0d got %h expected %h", l, t, dout, hist[t - l]);
          end
        end
        if (t >= 2) begin
          checks++;
          if (dout1 !== hist[t - (l % 2)]) begin
            failures++;
            $display("FAIL short line len=%0d got %h", l % 2, dout1);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
