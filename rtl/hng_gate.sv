// hng_gate: the reversible 4-input, 4-output HNG gate.
//
// Outputs: P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D. The mapping from
// inputs to outputs is one-to-one, so the inputs can be recovered from the outputs. With
// D = 0 the gate is a full adder: R is the sum and S the carry out of A + B + C.
// Purely combinational. The gate and its use as a full adder follow the design description.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab_x;
  always_comb begin
    ab_x = a ^ b;
    p    = a;
    q    = b;
    r    = ab_x ^ c;
    s    = (ab_x & c) ^ (a & b) ^ d;
  end
endmodule
