// output_sort_buffer: puts the pipeline results back into natural order and back into
// four parallel streams.
//
// The pipeline delivers one stream at a time, N/4 cycles per stream, four results per cycle,
// in the digit-reversed order of a decimation-in-frequency FFT. For output cycle tt of a
// stream and lane L the frequency index k is (m = number of radix-4 stages):
//   256 points (radix-4 only):  p = 4*tt + L,                          k = rev4(p, m)
//   2*4^m points (radix-2 last): p = 8*(tt/2) + 2*(tt%2) + 4*(L/2) + L%2,
//                                k = (L%2)*N/2 + rev4(p/2, m)
// where rev4 reverses the order of m base-4 digits. Results are written to four RAM banks
// (bank_ram) at bank = (s + k div (N/4)) mod 4, address = {half, s, k mod (N/4)}; the four
// results of a cycle always differ in k div (N/4), so they hit four different banks, and the
// four reads of one index k for the four streams do as well. Each bank is ping-pong double
// buffered. Once a frame (4 streams) is complete it is read out over N cycles: out_data[s]
// is X_s[out_index], out_index = 0..N-1, one clock after the read is issued.
// The output sorting buffer is named in the description; its organisation is this
// design's own choice.
module output_sort_buffer
  import fft_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  fft_len_e                 cfg_len,
  input  logic                     in_valid,
  input  logic                     in_sof,
  input  cplx_t                    in_data [NS],
  output logic                     out_valid,
  output logic [$clog2(N_MAX)-1:0] out_index,
  output cplx_t                    out_data [NS],
  output logic                     busy
);
  localparam int KW = $clog2(N_MAX);
  localparam int QW = $clog2(N_MAX / 4);
  localparam int AW = 1 + 2 + QW;

  logic [KW-1:0] n_last, q_mask;
  logic [3:0]    qlog;

  // reverse m base-4 digits of x
  function automatic logic [KW-1:0] rev4(logic [KW-1:0] x, int unsigned m);
    logic [KW-1:0] r;
    r = '0;
    for (int i = 0; i < 5; i++) begin
      if (i < int'(m)) begin
        r = {r[KW-3:0], x[1:0]};
        x = x >> 2;
      end
    end
    return r;
  endfunction

  // frequency index of lane l in output cycle tt of a stream
  function automatic logic [KW-1:0] freq(fft_len_e len, logic [KW-1:0] tt, int l);
    logic [KW-1:0] p;
    int unsigned   m;
    m = len_log2(len) / 2;
    if (!len_has_r2(len)) begin
      p = (tt << 2) + KW'(l);
      return rev4(p, m);
    end
    p = ((tt >> 1) << 3) + KW'(2 * int'(tt[0])) + KW'(4 * (l / 2)) + KW'(l % 2);
    return (l % 2 == 1 ? KW'(len_points(len) / 2) : KW'(0)) + rev4(p >> 1, m);
  endfunction

  always_comb begin
    n_last = KW'(len_points(cfg_len) - 1);
    q_mask = KW'(len_points(cfg_len) / 4 - 1);
    qlog   = 4'(len_log2(cfg_len) - 2);
  end

  // ---------------- write side ----------------
  logic [KW-1:0] wcnt, widx, tt;
  logic [1:0]    ws;
  logic          wpp, wr_last;
  logic [KW-1:0] k [4];
  logic [1:0]    lane_bank [4];
  logic [AW-1:0] waddr [4];
  cplx_t         wdata [4];
  logic          we [4];

  assign widx    = in_sof ? '0 : wcnt;
  assign ws      = 2'(widx >> qlog);
  assign tt      = widx & q_mask;
  assign wr_last = in_valid && (widx == n_last);

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      k[l]         = freq(cfg_len, tt, l);
      lane_bank[l] = ws + 2'(k[l] >> qlog);
    end
    for (int b = 0; b < 4; b++) begin
      waddr[b] = '0;
      wdata[b] = '0;
      we[b]    = 1'b0;
      for (int l = 0; l < 4; l++) begin
        if (lane_bank[l] == 2'(b)) begin
          waddr[b] = {wpp, ws, QW'(k[l] & q_mask)};
          wdata[b] = in_data[l];
          we[b]    = in_valid;
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic [KW-1:0] rcnt, ridx;
  logic          rpp, reading, rd_start, rd_active, rd_last;
  logic [1:0]    full, rq, rq_d;
  logic [AW-1:0] raddr [4];
  cplx_t         rdata [4];

  assign rd_start  = !reading && full[rpp];
  assign rd_active = rd_start || reading;
  assign ridx      = rd_start ? '0 : rcnt;
  assign rq        = 2'(ridx >> qlog);
  assign rd_last   = rd_active && (ridx == n_last);

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [1:0] s;
      s        = 2'(b) - rq;
      raddr[b] = {rpp, s, QW'(ridx & q_mask)};
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    bank_ram #(.W($bits(cplx_t)), .DEPTH(2 ** AW)) u_ram (
      .clk(clk), .we(we[b]), .waddr(waddr[b]), .wdata(wdata[b]),
      .raddr(raddr[b]), .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      wpp       <= 1'b0;
      rcnt      <= '0;
      rpp       <= 1'b0;
      reading   <= 1'b0;
      full      <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      rq_d      <= '0;
    end else begin
      if (in_valid) begin
        wcnt <= wr_last ? '0 : widx + 1'b1;
        if (wr_last) wpp <= ~wpp;
      end
      if (rd_active) begin
        rcnt    <= ridx + 1'b1;
        reading <= !rd_last;
        if (rd_last) rpp <= ~rpp;
      end
      for (int h = 0; h < 2; h++) begin
        if (wr_last && wpp == h[0])      full[h] <= 1'b1;
        else if (rd_last && rpp == h[0]) full[h] <= 1'b0;
      end
      out_valid <= rd_active;
      out_index <= ridx;
      rq_d      <= rq;
    end
  end

  always_comb begin
    for (int s = 0; s < 4; s++) out_data[s] = rdata[2'(2'(s) + rq_d)];
  end

  assign busy = reading || (full != '0) || (wcnt != '0);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_last |-> !full[wpp])
    else $error("output_sort_buffer overflow");
endmodule
