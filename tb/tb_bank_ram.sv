// tb_bank_ram: writes random words to random addresses of a 64-word bank while reading,
// and compares every read (one clock after the address) with a model array; a read of the
// address written in the same cycle must return the old word.
module tb_bank_ram;
  localparam int W = 32, DEPTH = 64, AW = 6;
  logic clk = 1'b0, we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  expect_q;
  bit            check_q;
  int checks = 0, failures = 0;

  bank_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_q = 1'b0;
    // fill every word first so that all reads are of known data
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; raddr = '0;
      model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (check_q) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL read got %h expected %h", rdata, expect_q);
        end
      end
      we    = 1'($urandom);
      waddr = AW'($urandom);
      wdata = $urandom;
      raddr = (i % 5 == 0) ? waddr : AW'($urandom);
      expect_q = model[raddr];      // old data even if written now
      check_q  = 1'b1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
