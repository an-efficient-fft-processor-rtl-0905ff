// hng_rca: W-bit ripple-carry adder/subtractor made of HNG full adders.
//
// Each bit is an HNG gate with D = 0 used as a full adder; the carry out of bit i is the
// carry in of bit i+1. Bit 0 is a full adder too, whose carry in is the sub control, so
// with sub = 1 the b operand is inverted and one is added: s = a - b. The result wraps
// modulo 2^W (callers size W so that it cannot overflow). Combinational, no clock.
// The ripple structure follows the design description; the subtract control is this
// design's own addition. The carry out of the top bit is not needed by any user and is
// left unconnected.
module hng_rca #(
  parameter int W = 18
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  logic [W:0]   carry;
  logic [W-1:0] bx;
  logic [W-1:0] p_unused, q_unused;

  assign carry[0] = sub;
  assign bx       = b ^ {W{sub}};

  for (genvar i = 0; i < W; i++) begin : g_bit
    hng_gate u_fa (
      .a(a[i]), .b(bx[i]), .c(carry[i]), .d(1'b0),
      .p(p_unused[i]), .q(q_unused[i]), .r(s[i]), .s(carry[i+1])
    );
  end
endmodule
