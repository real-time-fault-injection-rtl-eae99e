// dbg_mem: simple dual-port synchronous RAM (one write port, one read port)
// used for the debugger's two memory banks: the input bank holding the
// campaign script written by the host, and the output bank collecting the
// OCD's messages for later download.
//
// Timing: a write in cycle t is stored at the end of t; read data for the
// address presented in cycle t appears in cycle t+1 (read-before-write when
// both ports use the same address in the same cycle).
module dbg_mem #(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
