// ocd_fi: Nexus-style Class-2+ on-chip debug unit with a fault-injection
// module (OCD-FI).
//
// Class 2 features: run control (halt/resume), a watchpoint that can act as
// a breakpoint, and program trace messages.  The "+" is real-time access to
// target memory (and register access while halted).  The FI module reuses
// the watchpoint and the access port to insert a fault by itself as soon as
// the trigger fires.
//
// The debugger talks to the unit over the AUX port: commands come in on the
// MDI bus (MDI_W bits per beat, 72-bit messages, beat-valid framing) and
// messages go out on the MDO bus (MDO_W bits per beat, 40-bit messages).  A
// watchpoint hit is also signalled on the evto pin so the debugger can react
// without decoding messages.  See ocd_pkg for the message formats.
//
//   command       effect
//   CMD_WR_CFG    write WP_ADDR, WP_CTRL, FI_ADDR, FI_DATA, FI_CTRL or MSG_EN
//                 (MSG_EN turns watchpoint and branch messages on or off, so
//                 a long campaign does not fill the debugger's trace bank)
//   CMD_MEM_WR/RD real-time target memory access (read answers TC_RD_DATA)
//   CMD_REG_WR/RD CPU register access through the CPU debug port
//   CMD_HALT/RESUME run control
//
// cpu_halt is high from the cycle after a breakpoint access (combinational
// from the registered hit) until a resume command or the FI module's resume.
// Either resume also clears the breakpoint bit (the watchpoint stays on), so
// the CPU is not stopped again by the access it halted on; this one-shot
// breakpoint is this design's choice.
// MDI/MDO widths and the Basic/Plus choice are the configurations the
// document compares; message encoding, framing and register map are this
// design's.
module ocd_fi
  import ocd_pkg::*;
#(
  parameter int unsigned MDI_W       = 8,
  parameter int unsigned MDO_W       = 8,
  parameter bit          FI_PLUS     = 1'b1,
  parameter int unsigned TRACE_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // AUX port
  input  logic [MDI_W-1:0] mdi,
  input  logic             mdi_valid,
  output logic [MDO_W-1:0] mdo,
  output logic             mdo_valid,
  output logic             evto,
  // CPU observation
  input  logic             cpu_if_valid,
  input  logic [AW-1:0]    cpu_pc,
  input  logic             cpu_mem_re,
  input  logic             cpu_mem_we,
  input  logic [AW-1:0]    cpu_mem_addr,
  input  logic             cpu_br_valid,
  input  logic [AW-1:0]    cpu_br_target,
  // CPU run control and debug register port
  output logic             cpu_halt,
  output logic             reg_en,
  output logic             reg_we,
  output logic [RW-1:0]    reg_addr,
  output logic [DW-1:0]    reg_wdata,
  input  logic [DW-1:0]    reg_rdata,
  // target memory debug port
  output logic             mem_en,
  output logic             mem_we,
  output logic [AW-1:0]    mem_addr,
  output logic [DW-1:0]    mem_wdata,
  input  logic [DW-1:0]    mem_rdata,
  // status
  output logic             fi_armed,
  output logic [15:0]      trace_lost
);
  // ---------------- MDI receive and command decode ----------------
  cmd_msg_t cmd;
  logic     cmd_valid;

  aux_des #(.MSG_W(CMD_MSG_W), .BEAT_W(MDI_W)) u_mdi (
    .clk, .rst_n, .beat(mdi), .beat_valid(mdi_valid), .msg(cmd), .msg_valid(cmd_valid)
  );

  logic [AW-1:0] wp_addr, fi_addr;
  logic [DW-1:0] fi_data;
  wp_ctrl_t      wp_ctrl;
  msg_en_t       msg_en;
  fi_ctrl_t      fi_ctrl;
  logic          fi_ctrl_wr;
  acc_req_t      dbg_req;
  logic          halt_q;
  logic          fi_resume;
  logic          wp_hit, brk_hit;
  logic [AW-1:0] hit_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_addr    <= '0;
      wp_ctrl    <= '0;
      msg_en     <= '1;
      fi_addr    <= '0;
      fi_data    <= '0;
      fi_ctrl    <= '0;
      fi_ctrl_wr <= 1'b0;
      dbg_req    <= '0;
      halt_q     <= 1'b0;
    end else begin
      fi_ctrl_wr  <= 1'b0;
      dbg_req.req <= 1'b0;
      if (brk_hit) halt_q <= 1'b1;
      if (fi_resume) begin         // register injection finished:
        halt_q      <= 1'b0;       // let the CPU go and consume the
        wp_ctrl.brk <= 1'b0;       // breakpoint so it does not stop again
      end
      if (cmd_valid) begin
        unique case (cmd.op)
          CMD_WR_CFG: begin
            unique case (cmd.addr)
              CFG_WP_ADDR: wp_addr <= cmd.data;
              CFG_WP_CTRL: wp_ctrl <= wp_ctrl_t'(cmd.data[$bits(wp_ctrl_t)-1:0]);
              CFG_FI_ADDR: fi_addr <= cmd.data;
              CFG_FI_DATA: fi_data <= cmd.data;
              CFG_MSG_EN:  msg_en  <= msg_en_t'(cmd.data[$bits(msg_en_t)-1:0]);
              CFG_FI_CTRL: begin
                fi_ctrl    <= fi_ctrl_t'(cmd.data[$bits(fi_ctrl_t)-1:0]);
                fi_ctrl_wr <= 1'b1;
              end
              default: ;
            endcase
          end
          CMD_MEM_WR: dbg_req <= '{req: 1'b1, we: 1'b1, space: 1'b0, addr: cmd.addr, wdata: cmd.data};
          CMD_MEM_RD: dbg_req <= '{req: 1'b1, we: 1'b0, space: 1'b0, addr: cmd.addr, wdata: cmd.data};
          CMD_REG_WR: dbg_req <= '{req: 1'b1, we: 1'b1, space: 1'b1, addr: cmd.addr, wdata: cmd.data};
          CMD_REG_RD: dbg_req <= '{req: 1'b1, we: 1'b0, space: 1'b1, addr: cmd.addr, wdata: cmd.data};
          CMD_HALT:   halt_q <= 1'b1;
          CMD_RESUME: begin      // like the FI resume: the breakpoint is
            halt_q      <= 1'b0;   // consumed so the CPU does not stop
            wp_ctrl.brk <= 1'b0;   // again at the same access
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- watchpoint / breakpoint ----------------

  watchpoint_unit u_wp (
    .clk, .rst_n, .wp_addr, .wp_ctrl,
    .cpu_if_valid, .cpu_pc, .cpu_mem_re, .cpu_mem_we, .cpu_mem_addr,
    .hit(wp_hit), .brk_hit, .hit_addr
  );

  assign evto     = wp_hit;
  assign cpu_halt = halt_q || brk_hit;

  // ---------------- FI module ----------------
  acc_req_t      fi_acc;
  logic [DW-1:0] fi_rdata;
  logic          fi_own, fi_done;
  logic [DW-1:0] fi_value;

  fi_module #(.PLUS(FI_PLUS)) u_fi (
    .clk, .rst_n, .fi_addr, .fi_data, .fi_ctrl, .ctrl_wr(fi_ctrl_wr),
    .wp_hit, .brk_hit, .acc(fi_acc), .acc_rdata(fi_rdata), .own(fi_own),
    .resume(fi_resume), .armed(fi_armed), .done(fi_done), .done_value(fi_value)
  );

  // ---------------- real-time access port ----------------
  logic          dbg_rvalid;
  logic [DW-1:0] dbg_rdata;

  rt_access u_acc (
    .clk, .rst_n,
    .fi_req(fi_acc), .fi_own, .fi_rdata,
    .dbg_req, .dbg_busy(), .dbg_rvalid, .dbg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .reg_en, .reg_we, .reg_addr, .reg_wdata, .reg_rdata
  );

  // ---------------- trace and MDO transmit ----------------
  out_msg_t omsg;
  logic     omsg_valid, omsg_ready;

  trace_unit #(.DEPTH(TRACE_DEPTH)) u_trace (
    .clk, .rst_n,
    .fi_done, .fi_value,
    .wp_hit(wp_hit && msg_en.wp), .wp_addr(hit_addr),
    .rd_valid(dbg_rvalid), .rd_data(dbg_rdata),
    .br_valid(cpu_br_valid && msg_en.branch), .br_target(cpu_br_target),
    .msg(omsg), .msg_valid(omsg_valid), .msg_ready(omsg_ready),
    .lost_total(trace_lost)
  );

  aux_ser #(.MSG_W(OUT_MSG_W), .BEAT_W(MDO_W)) u_mdo (
    .clk, .rst_n, .msg(omsg), .msg_valid(omsg_valid), .msg_ready(omsg_ready),
    .beat(mdo), .beat_valid(mdo_valid)
  );
endmodule
