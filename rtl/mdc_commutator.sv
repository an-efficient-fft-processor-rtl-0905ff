// mdc_commutator: delay-commutator between two radix-4 MDC stages.
//
// It transposes 4x4 blocks of D samples: the sample that arrives on lane q in block a of a
// group of four blocks leaves on lane a in block q. Lane q is first delayed by q*D, then a
// rotating switch connects output lane a to delayed input lane (c - a) mod 4, where c is
// the number of D-cycle blocks since in_sof modulo 4, and output lane a is then delayed by
// (3 - a)*D. Every sample is delayed by 3*D in total counted from its group's start; valid
// and sof follow the data through a 3*D delay. D is D_MAX, or D_MAX/2 when d_half is set.
// The delays are delay_line FIFOs. The delay-commutator principle follows the description;
// the arrangement of the delays is this design's own choice.
module mdc_commutator
  import fft_pkg::*;
#(
  parameter int D_MAX = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  d_half,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cplx_t in_data [4],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [4]
);
  localparam int LOGD = $clog2(D_MAX);
  localparam int CW   = LOGD + 2;
  localparam int LW   = $clog2(3 * D_MAX + 1);

  logic [CW-1:0] cnt, idx;
  logic [1:0]    c;
  logic [LW-1:0] d;
  cplx_t         pre [4];
  cplx_t         sw  [4];

  assign d   = d_half ? LW'(D_MAX / 2) : LW'(D_MAX);
  assign idx = in_sof ? '0 : cnt;
  assign c   = d_half ? idx[LOGD-1 +: 2] : idx[LOGD +: 2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= idx + CW'(1);
  end

  assign pre[0] = in_data[0];
  for (genvar q = 1; q < 4; q++) begin : g_pre
    delay_line #(.W($bits(cplx_t)), .MAX_LEN(q * D_MAX)) u_pre (
      .clk(clk), .rst_n(rst_n), .len($clog2(q * D_MAX + 1)'(q * d)),
      .din(in_data[q]), .dout(pre[q])
    );
  end

  always_comb begin
    for (int a = 0; a < 4; a++) sw[a] = pre[2'(c - 2'(a))];
  end

  for (genvar a = 0; a < 3; a++) begin : g_post
    delay_line #(.W($bits(cplx_t)), .MAX_LEN((3 - a) * D_MAX)) u_post (
      .clk(clk), .rst_n(rst_n), .len($clog2((3 - a) * D_MAX + 1)'((3 - a) * d)),
      .din(sw[a]), .dout(out_data[a])
    );
  end
  assign out_data[3] = sw[3];

  delay_line #(.W(2), .MAX_LEN(3 * D_MAX), .CLEAR(1'b1)) u_ctl (
    .clk(clk), .rst_n(rst_n), .len(LW'(3 * d)),
    .din({in_valid, in_sof & in_valid}), .dout({out_valid, out_sof})
  );
endmodule
