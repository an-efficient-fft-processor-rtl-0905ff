// tb_hng_gate: exhaustive test of the HNG gate. For all 16 input patterns it checks
// P = A, Q = B, R = A^B^C and S = ((A^B)C)^(AB)^D against an arithmetic full-adder model
// (with D = 0, R and S are the sum and carry of A+B+C; D = 1 inverts S), and that the 16
// output patterns are all different (the gate is reversible).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  hng_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) seen[i] = 1'b0;
    for (int i = 0; i < 16; i++) begin
      int sum;
      {a, b, c, d} = 4'(i);
      #1;
      sum = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== sum[0] || s !== (sum[1] ^ d)) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeats: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
