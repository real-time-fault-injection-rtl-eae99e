// fi_system: single-chip real-time fault-injection environment.
//
// Puts together the three parts of the OCD-based fault-injection setup:
//   debugger   - campaign manager: runs a script from its input bank, reacts
//                to OCD events, stores the OCD's messages in its output bank;
//   ocd_fi     - the target's on-chip debug unit (Nexus Class-2+) with the
//                fault-injection module;
//   target_mem - the target system's data memory, where faults are injected.
// They are joined by the AUX port (MDI bus MDI_W bits wide towards the OCD,
// MDO bus MDO_W bits wide back, plus the evto event pin) and by the OCD's
// real-time access path into the memory's second port.
//
// The target CPU core is not part of this RTL: its fetch, data, branch, halt
// and debug-register signals are ports.  The CPU's data accesses go through
// this module to target_mem port A (read data one cycle later on
// cpu_mem_rdata); the same accesses are watched by the OCD.  The host side
// (script upload, trace download, start/busy/done) is brought out as ports.
//
// Defaults: MDI 8 bits, MDO 8 bits, Plus FI module - the largest of the
// configurations the document evaluates (MDI8_FI+).  Memory and bank sizes
// are this design's.
module fi_system
  import ocd_pkg::*;
#(
  parameter int unsigned MDI_W        = 8,
  parameter int unsigned MDO_W        = 8,
  parameter bit          FI_PLUS      = 1'b1,
  parameter int unsigned MEM_WORDS    = 1024,
  parameter int unsigned SCRIPT_DEPTH = 64,
  parameter int unsigned TRACE_DEPTH  = 256,
  parameter int unsigned OCD_FIFO     = 8,
  localparam int unsigned SAW = $clog2(SCRIPT_DEPTH),
  localparam int unsigned TAW = $clog2(TRACE_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host
  input  logic           hs_we,
  input  logic [SAW-1:0] hs_addr,
  input  script_t        hs_wdata,
  input  logic [TAW-1:0] ht_addr,
  output out_msg_t       ht_rdata,
  output logic [TAW:0]   trace_count,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic           ext_trig,
  // CPU core
  input  logic           cpu_if_valid,
  input  logic [AW-1:0]  cpu_pc,
  input  logic           cpu_mem_re,
  input  logic           cpu_mem_we,
  input  logic [AW-1:0]  cpu_mem_addr,
  input  logic [DW-1:0]  cpu_mem_wdata,
  output logic [DW-1:0]  cpu_mem_rdata,
  input  logic           cpu_br_valid,
  input  logic [AW-1:0]  cpu_br_target,
  output logic           cpu_halt,
  output logic           cpu_reg_en,
  output logic           cpu_reg_we,
  output logic [RW-1:0]  cpu_reg_addr,
  output logic [DW-1:0]  cpu_reg_wdata,
  input  logic [DW-1:0]  cpu_reg_rdata,
  // status
  output logic           fi_armed,
  output logic [15:0]    trace_lost
);
  logic [MDI_W-1:0] mdi;
  logic             mdi_valid;
  logic [MDO_W-1:0] mdo;
  logic             mdo_valid;
  logic             evto;

  logic          dm_en, dm_we;
  logic [AW-1:0] dm_addr;
  logic [DW-1:0] dm_wdata, dm_rdata;

  debugger #(
    .MDI_W(MDI_W), .MDO_W(MDO_W), .SCRIPT_DEPTH(SCRIPT_DEPTH), .TRACE_DEPTH(TRACE_DEPTH)
  ) u_dbg (
    .clk, .rst_n, .hs_we, .hs_addr, .hs_wdata, .ht_addr, .ht_rdata, .trace_count,
    .start, .busy, .done, .ext_trig,
    .mdi, .mdi_valid, .mdo, .mdo_valid, .evto
  );

  ocd_fi #(
    .MDI_W(MDI_W), .MDO_W(MDO_W), .FI_PLUS(FI_PLUS), .TRACE_DEPTH(OCD_FIFO)
  ) u_ocd (
    .clk, .rst_n, .mdi, .mdi_valid, .mdo, .mdo_valid, .evto,
    .cpu_if_valid, .cpu_pc, .cpu_mem_re, .cpu_mem_we, .cpu_mem_addr,
    .cpu_br_valid, .cpu_br_target, .cpu_halt,
    .reg_en(cpu_reg_en), .reg_we(cpu_reg_we), .reg_addr(cpu_reg_addr),
    .reg_wdata(cpu_reg_wdata), .reg_rdata(cpu_reg_rdata),
    .mem_en(dm_en), .mem_we(dm_we), .mem_addr(dm_addr), .mem_wdata(dm_wdata), .mem_rdata(dm_rdata),
    .fi_armed, .trace_lost
  );

  target_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .a_en(cpu_mem_re || cpu_mem_we), .a_we(cpu_mem_we), .a_addr(cpu_mem_addr),
    .a_wdata(cpu_mem_wdata), .a_rdata(cpu_mem_rdata),
    .b_en(dm_en), .b_we(dm_we), .b_addr(dm_addr), .b_wdata(dm_wdata), .b_rdata(dm_rdata)
  );
endmodule
