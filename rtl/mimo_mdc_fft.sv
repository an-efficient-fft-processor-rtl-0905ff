// mimo_mdc_fft: variable-length FFT/IFFT processor for four concurrent MIMO-OFDM streams,
// built as a radix-4 multipath delay-commutator (MDC) pipeline.
//
// Because the radix (4) equals the number of streams (4), a pipeline that takes four
// samples per cycle is fully used when the four streams each deliver one sample per cycle.
// Data path:
//   in_data[0..3] -> (re/im swap for IFFT) -> input_buffer -> radix-4 stages 0..4 with an
//   mdc_commutator between consecutive stages -> r2_stage (lengths 2048/512/128 only) ->
//   output_sort_buffer -> (re/im swap for IFFT) -> out_data[0..3]
// Stage k has span 512/4^k (halved in the 256-point mode). A 2048-point frame enters at
// stage 0, 512 and 256 at stage 1, 128 at stage 2; 256 = 4^4 skips the radix-2 stage.
// Stages ahead of the entry stage see no valid data.
// Every radix-4 stage divides by 4 and the radix-2 stage by 2, so out = DFT(in)/N, or
// IDFT(in) when cfg_inverse is set (the IFFT swaps real and imaginary parts before and
// after the FFT).
//
// Interface: a frame is N cycles with in_valid high (gaps allowed); in cycle t,
// in_data[s] is sample t of stream s. Results leave as N consecutive cycles with out_valid
// high, out_data[s] = X_s[out_index], out_index = 0..N-1. Frames may follow each other
// without gaps: input and output both run at one sample per stream per cycle. cfg_len and
// cfg_inverse may change only while busy is low.
// The 4-stream radix-4 MDC organisation, the lengths and the input and output sorting
// buffers follow the description; the radix-2 closing stage, the stage entry points,
// the scaling, the word lengths and the interface are this design's own choices.
module mimo_mdc_fft
  import fft_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  fft_len_e                 cfg_len,
  input  logic                     cfg_inverse,
  input  logic                     in_valid,
  input  cplx_t                    in_data [NS],
  output logic                     out_valid,
  output logic [$clog2(N_MAX)-1:0] out_index,
  output cplx_t                    out_data [NS],
  output logic                     busy
);
  localparam int NST = 5;  // radix-4 stages for 2048 = 2 * 4^5

  logic  half;
  int unsigned entry;
  assign half  = (cfg_len == LEN_256);
  assign entry = len_entry(cfg_len);

  // input side
  cplx_t in_sw [NS];
  always_comb begin
    for (int s = 0; s < NS; s++) in_sw[s] = cfg_inverse ? cswap(in_data[s]) : in_data[s];
  end

  logic  ib_valid, ib_sof, ib_busy;
  cplx_t ib_data [4];

  input_buffer u_ibuf (
    .clk(clk), .rst_n(rst_n), .cfg_len(cfg_len),
    .wr_valid(in_valid), .wr_data(in_sw),
    .rd_valid(ib_valid), .rd_sof(ib_sof), .rd_data(ib_data), .busy(ib_busy)
  );

  // radix-4 stages and commutators
  logic  st_in_v   [NST], st_in_sof [NST], st_out_v [NST], st_out_sof [NST];
  cplx_t st_in_d   [NST][4];
  cplx_t st_out_d  [NST][4];
  logic  cm_v      [NST-1], cm_sof [NST-1];
  cplx_t cm_d      [NST-1][4];

  for (genvar k = 0; k < NST; k++) begin : g_stage
    if (k == 0) begin : g_first
      assign st_in_v[k]   = ib_valid && (entry == 0);
      assign st_in_sof[k] = ib_sof && (entry == 0);
      assign st_in_d[k]   = ib_data;
    end else begin : g_next
      always_comb begin
        if (entry == k) begin
          st_in_v[k]   = ib_valid;
          st_in_sof[k] = ib_sof;
          st_in_d[k]   = ib_data;
        end else begin
          st_in_v[k]   = cm_v[k-1] && (entry < k);
          st_in_sof[k] = cm_sof[k-1] && (entry < k);
          st_in_d[k]   = cm_d[k-1];
        end
      end
    end

    r4_stage #(.S_MAX(512 >> (2 * k))) u_r4 (
      .clk(clk), .rst_n(rst_n), .half(half),
      .in_valid(st_in_v[k]), .in_sof(st_in_sof[k]), .in_data(st_in_d[k]),
      .out_valid(st_out_v[k]), .out_sof(st_out_sof[k]), .out_data(st_out_d[k])
    );

    if (k < NST - 1) begin : g_comm
      mdc_commutator #(.D_MAX(128 >> (2 * k))) u_cm (
        .clk(clk), .rst_n(rst_n), .d_half(half),
        .in_valid(st_out_v[k]), .in_sof(st_out_sof[k]), .in_data(st_out_d[k]),
        .out_valid(cm_v[k]), .out_sof(cm_sof[k]), .out_data(cm_d[k])
      );
    end
  end

  // closing radix-2 stage
  logic  r2_v, r2_sof;
  cplx_t r2_d [4];
  r2_stage u_r2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(st_out_v[NST-1] && len_has_r2(cfg_len)), .in_sof(st_out_sof[NST-1]),
    .in_data(st_out_d[NST-1]),
    .out_valid(r2_v), .out_sof(r2_sof), .out_data(r2_d)
  );

  logic  ob_in_v, ob_in_sof;
  cplx_t ob_in_d [4];
  always_comb begin
    if (len_has_r2(cfg_len)) begin
      ob_in_v   = r2_v;
      ob_in_sof = r2_sof;
      ob_in_d   = r2_d;
    end else begin
      ob_in_v   = st_out_v[NST-1];
      ob_in_sof = st_out_sof[NST-1];
      ob_in_d   = st_out_d[NST-1];
    end
  end

  // output side
  logic  ob_busy;
  cplx_t ob_data [NS];
  output_sort_buffer u_obuf (
    .clk(clk), .rst_n(rst_n), .cfg_len(cfg_len),
    .in_valid(ob_in_v), .in_sof(ob_in_sof && ob_in_v), .in_data(ob_in_d),
    .out_valid(out_valid), .out_index(out_index), .out_data(ob_data), .busy(ob_busy)
  );

  always_comb begin
    for (int s = 0; s < NS; s++) out_data[s] = cfg_inverse ? cswap(ob_data[s]) : ob_data[s];
  end

  // frames in the pipeline between the buffers
  logic [11:0] in_flight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_flight <= '0;
    else if (ib_sof && ib_valid && !(ob_in_sof && ob_in_v)) in_flight <= in_flight + 1'b1;
    else if (!(ib_sof && ib_valid) && ob_in_sof && ob_in_v) in_flight <= in_flight - 1'b1;
  end

  assign busy = ib_busy || ob_busy || (in_flight != '0);
endmodule
