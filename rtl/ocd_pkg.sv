// ocd_pkg: types and constants shared by the on-chip debug (OCD) unit, its
// fault-injection (FI) module and the fault-injection debugger.
//
// Debugger -> OCD traffic (MDI side of the AUX port) is a fixed 72-bit command
// message: an 8-bit opcode, a 32-bit address/selector and a 32-bit data word,
// sent least significant beat first.  OCD -> debugger traffic (MDO side) is a
// fixed 40-bit message: an 8-bit transfer code and a 32-bit payload.  The
// Nexus 5001 idea of opcode-tagged messages is kept; the exact formats and
// codes are this design's own, since only the message classes are named.
package ocd_pkg;

  localparam int unsigned AW = 32;   // CPU address width (32-bit core)
  localparam int unsigned DW = 32;   // CPU data width
  localparam int unsigned RW = 5;    // CPU register index width (32 registers)

  // ---------------- debugger -> OCD commands ----------------
  typedef enum logic [7:0] {
    CMD_NOP    = 8'h00,
    CMD_WR_CFG = 8'h01,  // write OCD configuration register: addr = cfg index
    CMD_MEM_WR = 8'h02,  // real-time memory write
    CMD_MEM_RD = 8'h03,  // real-time memory read, answered by TC_RD_DATA
    CMD_REG_WR = 8'h04,  // CPU register write (CPU must be halted)
    CMD_REG_RD = 8'h05,  // CPU register read, answered by TC_RD_DATA
    CMD_HALT   = 8'h06,  // run control: halt the CPU
    CMD_RESUME = 8'h07   // run control: resume the CPU
  } cmd_e;

  typedef struct packed {
    logic [DW-1:0] data;
    logic [AW-1:0] addr;
    cmd_e          op;
  } cmd_msg_t;  // 72 bits

  localparam int unsigned CMD_MSG_W = $bits(cmd_msg_t);

  // configuration registers written by CMD_WR_CFG (selected by addr)
  localparam logic [AW-1:0] CFG_WP_ADDR = 32'd0;
  localparam logic [AW-1:0] CFG_WP_CTRL = 32'd1;
  localparam logic [AW-1:0] CFG_FI_ADDR = 32'd2;
  localparam logic [AW-1:0] CFG_FI_DATA = 32'd3;  // faulty value or XOR mask
  localparam logic [AW-1:0] CFG_FI_CTRL = 32'd4;  // writing it arms / disarms FI
  localparam logic [AW-1:0] CFG_MSG_EN  = 32'd5;  // message enables, msg_en_t

  typedef enum logic [1:0] {
    WP_FETCH = 2'd0,  // instruction fetch address
    WP_READ  = 2'd1,  // data read address
    WP_WRITE = 2'd2,  // data write address
    WP_RW    = 2'd3   // data read or write address
  } wp_type_e;

  typedef struct packed {
    logic     brk;    // breakpoint: halt the CPU on a hit
    wp_type_e kind;
    logic     en;
  } wp_ctrl_t;

  typedef struct packed {
    logic rmw;    // Plus only: read target, XOR with mask, write back
    logic space;  // 0: memory (watchpoint trigger), 1: CPU register (breakpoint)
    logic arm;    // armed: inject on the next trigger
  } fi_ctrl_t;

  typedef struct packed {
    logic wp;      // watchpoint-hit messages
    logic branch;  // program trace (branch) messages
  } msg_en_t;      // both set after reset

  // ---------------- OCD -> debugger messages ----------------
  typedef enum logic [7:0] {
    TC_NONE    = 8'h00,
    TC_WP_HIT  = 8'h01,  // payload: address that hit
    TC_RD_DATA = 8'h02,  // payload: data read by CMD_MEM_RD / CMD_REG_RD
    TC_BRANCH  = 8'h03,  // program trace: payload = branch target address
    TC_FI_DONE = 8'h04,  // payload: faulty value written by the FI module
    TC_OVERRUN = 8'h05   // payload: number of messages lost (queue full)
  } tcode_e;

  typedef struct packed {
    logic [DW-1:0] payload;
    tcode_e        tcode;
  } out_msg_t;  // 40 bits

  localparam int unsigned OUT_MSG_W = $bits(out_msg_t);

  // ---------------- real-time access port ----------------
  typedef struct packed {
    logic          req;
    logic          we;
    logic          space;  // 0 memory, 1 CPU register
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } acc_req_t;

  // ---------------- debugger script ----------------
  typedef enum logic [7:0] {
    D_END     = 8'h00,  // campaign finished
    D_SEND    = 8'h01,  // send the entry's command message to the OCD
    D_WAIT_WP = 8'h02,  // wait for a watchpoint event from the OCD
    D_WAIT_EX = 8'h03,  // wait for the external trigger input
    D_DELAY   = 8'h04,  // wait msg.addr clock cycles
    D_FLIP    = 8'h05,  // read msg.addr via OCD, XOR with msg.data, write back
    D_WAIT_FI = 8'h06   // wait for a TC_FI_DONE message from the OCD
  } dop_e;

  typedef struct packed {
    dop_e     dop;
    cmd_msg_t msg;
  } script_t;  // 80 bits

  localparam int unsigned SCRIPT_W = $bits(script_t);

endpackage
