// target_mem: the target system's data memory, the object of the injected
// faults.
//
// A true dual-port synchronous RAM of WORDS 32-bit words.  Port A belongs to
// the CPU, port B to the OCD's real-time access port, so the debugger or the
// FI module can read and write while the application runs without stealing
// CPU bus cycles.  Addresses are byte addresses; bits [1:0] are ignored
// (word accesses only).  If both ports write the same word in the same cycle
// the OCD port wins, since that write is the injected fault.  Size, port
// arrangement and collision rule are this design's choices: the document
// only says faults are inserted into the target memory in real time.
//
// Timing: read data of an access in cycle t is on *_rdata in cycle t+1.
module target_mem
  import ocd_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic          clk,
  // port A: CPU
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: OCD real-time access
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  localparam int unsigned IW = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [IW-1:0] ai, bi;

  assign ai = a_addr[IW+1:2];
  assign bi = b_addr[IW+1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[ai] <= a_wdata;
      a_rdata <= mem[ai];
    end
    if (b_en) begin
      if (b_we) mem[bi] <= b_wdata;
      b_rdata <= mem[bi];
    end
  end
endmodule
