// delay_line: FIFO used as a programmable delay in the MDC delay-commutators.
//
// dout(t) = din(t - len) for len in 0..MAX_LEN; len = 0 is a plain wire. For len >= 1 the
// word passes through a circular buffer of len-1 entries and then an output register. The
// pointer wraps at len-1; when len changes, the words read during the next len cycles are
// not meaningful, but nothing written after the change is lost.
// The output register and the pointer are reset; the buffer words are reset only when CLEAR
// is set. Data words need no reset, but control bits (valid, start of frame) do: when len
// grows, words beyond the old length are read before they are rewritten, and they must
// not hold a stray valid bit. The FIFO is named in the design description; its organisation is this
// design's own choice.
module delay_line #(
  parameter int W       = 32,
  parameter int MAX_LEN = 384,
  parameter bit CLEAR   = 1'b0,  // reset the buffer words too (for control bits)
  localparam int LW     = $clog2(MAX_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] len,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  localparam int DEPTH = (MAX_LEN > 1) ? MAX_LEN - 1 : 1;
  localparam int PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] ptr, cur;
  logic [W-1:0]  q_reg;
  logic [W-1:0]  rd;
  logic          use_mem;

  // a pointer left beyond the end by a shorter len restarts at 0
  assign use_mem = (len > LW'(1));
  assign cur     = (use_mem && LW'(ptr) <= len - LW'(2)) ? ptr : '0;
  assign rd      = use_mem ? mem[cur] : din;
  assign dout    = (len == '0) ? din : q_reg;

  if (CLEAR) begin : g_clear
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       mem <= '{default: '0};
      else if (use_mem) mem[cur] <= din;
    end
  end else begin : g_plain
    always_ff @(posedge clk) begin
      if (use_mem) mem[cur] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      q_reg <= '0;
    end else begin
      q_reg <= rd;
      if (use_mem && LW'(cur) < len - LW'(2)) ptr <= cur + PW'(1);
      else                               ptr <= '0;
    end
  end
endmodule
