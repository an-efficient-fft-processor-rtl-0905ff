// bank_ram: one memory block of the input and output buffers.
//
// Simple dual-port RAM: one synchronous write port and one synchronous read port. rdata
// shows the word at raddr one clock after it is presented. A read of the address written in
// the same cycle returns the old word. The description calls for dynamic RAM; a DRAM cell
// array is process specific, so this is a static array with the same read/write behaviour.
// Contents are not reset.
module bank_ram #(
  parameter int W     = 32,
  parameter int DEPTH = 4096,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
