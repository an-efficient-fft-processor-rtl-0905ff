// r2_stage: closing radix-2 stage for the lengths 2048, 512 and 128 (2 * 4^m points).
//
// After the last radix-4 stage (span 2) lane q carries the points 8g+2q and 8g+2q+1 in two
// consecutive cycles. Lane pairs (0,1) and (2,3) each pass a two-lane delay-commutator with
// D = 1 (lane 1 of the pair delayed one cycle, a switch that crosses on odd cycles counted
// from in_sof, lane 0 delayed one cycle after the switch), so that both points of a radix-2
// butterfly arrive together: in output cycle 2g+c lanes 0/1 carry points 8g+2c and 8g+2c+1
// and lanes 2/3 carry 8g+4+2c and 8g+5+2c. The radix-2 butterfly (sum on the even lane,
// difference on the odd lane, both divided by 2, rounded
// to nearest and saturated at full scale) is registered.
// Latency: two clocks. The radix-2 step is this
// design's own way to reach lengths that are not powers of 4.
module r2_stage
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cplx_t in_data [4],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [4]
);
  logic  par;       // cycle parity counted from in_sof
  logic  c;
  cplx_t pre1 [2];  // lane 1 of each pair, delayed one cycle
  cplx_t post0 [2]; // lane 0 of each pair after the switch, delayed one cycle
  cplx_t u [4];
  logic  v_d, sof_d;

  assign c = in_sof ? 1'b0 : par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par   <= 1'b0;
      v_d   <= 1'b0;
      sof_d <= 1'b0;
    end else begin
      par   <= ~c;
      v_d   <= in_valid;
      sof_d <= in_sof & in_valid;
    end
  end

  for (genvar p = 0; p < 2; p++) begin : g_pair
    cplx_t sw0, sw1;
    // switch: out lane a takes delayed input lane (c - a) mod 2
    assign sw0 = c ? pre1[p] : in_data[2*p];
    assign sw1 = c ? in_data[2*p] : pre1[p];
    always_ff @(posedge clk) begin
      pre1[p]  <= in_data[2*p+1];
      post0[p] <= sw0;
    end
    assign u[2*p]   = post0[p];
    assign u[2*p+1] = sw1;
  end

  function automatic logic signed [DW-1:0] half_rnd(logic signed [DW:0] v);
    logic signed [DW+1:0] r;
    r = (DW+2)'(v) + (DW+2)'(1);
    r = r >>> 1;
    if (r > (DW+2)'(2 ** (DW - 1) - 1)) return {1'b0, {(DW-1){1'b1}}};
    return r[DW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      out_data[2*p].re   <= half_rnd((DW+1)'(u[2*p].re) + (DW+1)'(u[2*p+1].re));
      out_data[2*p].im   <= half_rnd((DW+1)'(u[2*p].im) + (DW+1)'(u[2*p+1].im));
      out_data[2*p+1].re <= half_rnd((DW+1)'(u[2*p].re) - (DW+1)'(u[2*p+1].re));
      out_data[2*p+1].im <= half_rnd((DW+1)'(u[2*p].im) - (DW+1)'(u[2*p+1].im));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= v_d;
      out_sof   <= sof_d;
    end
  end
endmodule
