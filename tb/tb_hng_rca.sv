// tb_hng_rca: random test of the HNG ripple-carry adder/subtractor at the 4-bit width of
// the description and at the 18-bit width the butterflies use. Each result is compared
// with a + b or a - b modulo 2^W; corner values (all ones, zero) are included.
module tb_hng_rca;
  logic [3:0]  a4, b4, s4;
  logic [17:0] a18, b18, s18;
  logic        sub;
  int checks = 0, failures = 0;

  hng_rca #(.W(4))  dut4  (.a(a4),  .b(b4),  .sub(sub), .s(s4));
  hng_rca #(.W(18)) dut18 (.a(a18), .b(b18), .sub(sub), .s(s18));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive at 4 bits
    for (int i = 0; i < 512; i++) begin
      {sub, a4, b4} = 9'(i);
      a18 = '0; b18 = '0;
      #1;
      checks++;
      if (s4 !== (sub ? 4'(a4 - b4) : 4'(a4 + b4))) begin
        failures++;
        $display("FAIL W=4 a=%0d b=%0d sub=%0d s=%0d", a4, b4, sub, s4);
      end
    end
    // random at 18 bits
    for (int i = 0; i < 2000; i++) begin
      a18 = (i == 0) ? '1 : 18'($urandom);
      b18 = (i == 1) ? '1 : 18'($urandom);
      sub = 1'($urandom);
      #1;
      checks++;
      if (s18 !== (sub ? 18'(a18 - b18) : 18'(a18 + b18))) begin
        failures++;
        $display("FAIL W=18 a=%0d b=%0d sub=%0d s=%0d", a18, b18, sub, s18);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
