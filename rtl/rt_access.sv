// rt_access: the OCD's real-time access port (Nexus Class-3 style memory
// access, added to a Class-2 OCD to make it "Class-2+").
//
// Two requesters share one port: the FI module and the debugger's
// read/write commands.  The port reaches the target memory through its
// debug port (so the running CPU is not stalled) and the CPU register file
// through the CPU's debug register port (meaningful while the CPU is halted).
// The FI module has priority and, from trigger to insertion, owns the port
// (fi_own); a debugger request that arrives meanwhile waits in a one-entry
// holding register and is issued as soon as the port is free.  Commands
// arrive at most once per message (9 or more cycles apart), so one entry is
// enough.  The arbitration and holding register are this design's choice.
//
// Timing: a request issued in cycle t reaches memory/register port in
// cycle t (combinational routing); read data comes back in t+1 and is
// returned to the requester in t+1 (fi_rdata, or dbg_rvalid/dbg_rdata).
// A debugger request waits at least one cycle in the holding register.
module rt_access
  import ocd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // FI module
  input  acc_req_t      fi_req,
  input  logic          fi_own,
  output logic [DW-1:0] fi_rdata,
  // debugger commands (one-cycle request pulse)
  input  acc_req_t      dbg_req,
  output logic          dbg_busy,
  output logic          dbg_rvalid,
  output logic [DW-1:0] dbg_rdata,
  // target memory debug port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata,
  // CPU debug register port
  output logic          reg_en,
  output logic          reg_we,
  output logic [RW-1:0] reg_addr,
  output logic [DW-1:0] reg_wdata,
  input  logic [DW-1:0] reg_rdata
);
  acc_req_t pend;
  acc_req_t cur;
  logic     dbg_go;
  logic     rd_was_dbg, rd_was_reg, rd_pending;

  assign dbg_go = pend.req && !fi_own && !fi_req.req;
  assign cur    = fi_req.req ? fi_req : (dbg_go ? pend : '0);
  assign dbg_busy = pend.req;

  always_comb begin
    mem_en    = cur.req && !cur.space;
    mem_we    = cur.we;
    mem_addr  = cur.addr;
    mem_wdata = cur.wdata;
    reg_en    = cur.req && cur.space;
    reg_we    = cur.we;
    reg_addr  = cur.addr[RW-1:0];
    reg_wdata = cur.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      rd_pending <= 1'b0;
      rd_was_dbg <= 1'b0;
      rd_was_reg <= 1'b0;
    end else begin
      if (dbg_req.req)  pend     <= dbg_req;
      else if (dbg_go)  pend.req <= 1'b0;
      rd_pending <= cur.req && !cur.we;
      rd_was_dbg <= !fi_req.req;
      rd_was_reg <= cur.space;
    end
  end

  assign fi_rdata   = rd_was_reg ? reg_rdata : mem_rdata;
  assign dbg_rdata  = fi_rdata;
  assign dbg_rvalid = rd_pending && rd_was_dbg;

  // a new debugger request must not overwrite one still waiting
  assert property (@(posedge clk) disable iff (!rst_n) dbg_req.req |-> !pend.req || dbg_go);
endmodule
