// next_state_memory: the memory array that holds the next state of each
// TCAM entry.
//
// Entry i of the TCAM owns word i. A search reads the word at the address
// from the match address encoder; the value becomes the engine's current
// state, closing the state-machine loop. One write port and one read port;
// the read is synchronous (data appear the cycle after re), which is this
// design's own choice. The contents have no reset.
//
// Interface: clk; we, waddr, wdata (write at the rising edge); re, raddr ->
// rdata (registered).
module next_state_memory #(
  parameter int ENTRIES = 4,
  parameter int STATE_W = 8,
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [STATE_W-1:0] wdata,
  input  logic               re,
  input  logic [AW-1:0]      raddr,
  output logic [STATE_W-1:0] rdata
);

  logic [STATE_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
