// input_buffer: collects one N-point symbol of each of the NS = 4 streams and hands it to
// the radix-4 MDC pipeline one stream at a time.
//
// Write side: each cycle with wr_valid, sample t of every stream s arrives (4 samples).
// Read side: for stream s and n = 0..N/4-1 the pipeline needs x_s[n + q*N/4], q = 0..3, in
// one cycle. Both patterns are served by four RAM banks (bank_ram) with
//   bank = (s + t div (N/4)) mod 4,   address = {half, s, t mod (N/4)}
// so the four writes and the four reads of a cycle always fall into four different banks.
// Each bank holds two halves (ping-pong): one frame of 4 x N samples is written into one half
// while the previous frame is read from the other. A complete frame is read out over N
// cycles (N/4 per stream, streams 0..3 in turn), starting on a cycle where a free-running
// counter modulo N/4 is zero; this puts all frames on one N/4-cycle grid, which the
// pipeline's stage counters rely on, and finishes each read before the frame after next
// overwrites it. rd_* appear one clock after the read is issued; rd_sof marks the first
// cycle of a frame. cfg_len may change only while busy is low.
// The input buffer and its RAMs are named in the description; the bank organisation is this
// design's own choice.
module input_buffer
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  fft_len_e cfg_len,
  input  logic     wr_valid,
  input  cplx_t    wr_data [NS],
  output logic     rd_valid,
  output logic     rd_sof,
  output cplx_t    rd_data [NS],
  output logic     busy
);
  localparam int TW_CNT = $clog2(N_MAX);        // sample counter width
  localparam int QW     = $clog2(N_MAX / 4);    // address bits within a quarter
  localparam int AW     = 1 + 2 + QW;

  logic [TW_CNT-1:0] n_last, q_mask;
  logic [3:0]        qlog;

  logic [TW_CNT-1:0] wcnt, rcnt, ph;
  logic              wpp, rpp, reading;
  logic [1:0]        full;
  logic [1:0]        wq, rs, rs_d;

  logic [AW-1:0] waddr [4], raddr;
  cplx_t         wdata [4], rdata [4];
  logic          rd_start, rd_active, rd_last, wr_last;
  logic [TW_CNT-1:0] ridx;

  always_comb begin
    n_last = TW_CNT'(len_points(cfg_len) - 1);
    q_mask = TW_CNT'(len_points(cfg_len) / 4 - 1);
    qlog   = 4'(len_log2(cfg_len) - 2);
  end

  // write side
  assign wq      = 2'(wcnt >> qlog);
  assign wr_last = wr_valid && (wcnt == n_last);
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [1:0] s;
      s        = 2'(b) - wq;
      waddr[b] = {wpp, s, QW'(wcnt & q_mask)};
      wdata[b] = wr_data[s];
    end
  end

  // read side
  assign rd_start  = !reading && full[rpp] && (ph == '0);
  assign rd_active = rd_start || reading;
  assign ridx      = rd_start ? '0 : rcnt;
  assign rs        = 2'(ridx >> qlog);
  assign raddr     = {rpp, rs, QW'(ridx & q_mask)};
  assign rd_last   = rd_active && (ridx == n_last);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    bank_ram #(.W($bits(cplx_t)), .DEPTH(2 ** AW)) u_ram (
      .clk(clk), .we(wr_valid), .waddr(waddr[b]), .wdata(wdata[b]),
      .raddr(raddr), .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      wpp      <= 1'b0;
      rpp      <= 1'b0;
      full     <= '0;
      reading  <= 1'b0;
      rcnt     <= '0;
      ph       <= '0;
      rd_valid <= 1'b0;
      rd_sof   <= 1'b0;
      rs_d     <= '0;
    end else begin
      ph <= (ph == q_mask) ? '0 : ph + 1'b1;
      if (wr_valid) begin
        wcnt <= wr_last ? '0 : wcnt + 1'b1;
        if (wr_last) wpp <= ~wpp;
      end
      if (rd_active) begin
        rcnt    <= ridx + 1'b1;
        reading <= !rd_last;
        if (rd_last) rpp <= ~rpp;
      end
      for (int h = 0; h < 2; h++) begin
        if (wr_last && wpp == h[0])                   full[h] <= 1'b1;
        else if (rd_last && rpp == h[0])              full[h] <= 1'b0;
      end
      rd_valid <= rd_active;
      rd_sof   <= rd_start;
      rs_d     <= rs;
    end
  end

  always_comb begin
    for (int q = 0; q < 4; q++) rd_data[q] = rdata[2'(rs_d + 2'(q))];
  end

  assign busy = reading || (full != '0) || (wcnt != '0);

  // a completed frame must never land on a half that still waits to be read
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_last |-> !full[wpp])
    else $error("input_buffer overflow");
endmodule
