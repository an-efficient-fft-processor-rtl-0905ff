// r4_stage: one radix-4 decimation-in-frequency stage of the MDC pipeline.
//
// Each cycle the four lanes carry x[n], x[n+s], x[n+2s], x[n+3s] of a block of 4s points,
// where s is the stage span (S_MAX, or S_MAX/2 when half is set for the 256-point mode) and
// n counts cycles since in_sof modulo s. Cycle 1: radix-4 butterfly (divided by 4) into a
// register. Cycle 2: output lane q (q = 1..3) is multiplied by W_{4s}^{n*q}; lane 0 is only
// registered. The factors come from a twiddle_rom into a cmult, except in the last stage
// (S_MAX = 2, factors W_8^k only), which uses the ROM-less const_cmult_w8.
// out_* are therefore in_* delayed by two clocks. The counter runs freely
// after in_sof, so frames that follow each other on a grid of s cycles need no gap.
// Radix 4 with twiddle multiplication follows the description; the register placement and
// the counter are this design's own choices.
module r4_stage
  import fft_pkg::*;
#(
  parameter int S_MAX = 512,
  localparam int L  = 4 * S_MAX,
  localparam int LA = $clog2(L)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  half,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cplx_t in_data [4],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [4]
);
  localparam int CW = $clog2(S_MAX) + 1;

  logic [CW-1:0] cnt, idx;
  logic [LA-1:0] n_mask, n_cur;
  cplx_t         bf_y [4];
  cplx_t         bf_q [4];
  logic [LA-1:0] n_q;
  logic          v_q, sof_q;
  logic [LA-1:0] e [1:3];

  // sample index within the frame; modulo s is taken below
  assign idx    = in_sof ? '0 : cnt;
  assign n_mask = half ? LA'(S_MAX / 2 - 1) : LA'(S_MAX - 1);
  assign n_cur  = LA'(idx) & n_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= idx + CW'(1);
  end

  r4_butterfly u_bf (.x(in_data), .y(bf_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      sof_q <= 1'b0;
      n_q   <= '0;
    end else begin
      v_q   <= in_valid;
      sof_q <= in_sof & in_valid;
      n_q   <= n_cur;
    end
  end

  always_ff @(posedge clk) bf_q <= bf_y;

  // exponent n*q in a table of 4*S_MAX entries; the half-size span doubles it
  for (genvar q = 1; q < 4; q++) begin : g_tw
    assign e[q] = half ? LA'(2 * q * n_q) : LA'(q * n_q);
    if (L == 8) begin : g_const
      // all twiddles are powers of W_8: ROM-less shift-and-add multiplier
      const_cmult_w8 u_mul (.clk(clk), .a(bf_q[q]), .k(e[q]), .p(out_data[q]));
    end else begin : g_rom
      twid_t w;
      twiddle_rom #(.L(L)) u_rom (.idx(e[q]), .w(w));
      cmult u_mul (.clk(clk), .a(bf_q[q]), .w(w), .p(out_data[q]));
    end
  end

  always_ff @(posedge clk) out_data[0] <= bf_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= v_q;
      out_sof   <= sof_q;
    end
  end
endmodule
