// debugger: fault-injection debugger - one controller and two memory banks.
//
// The host loads a campaign script into the input bank (hs_* port) and
// pulses `start`.  The controller then runs the script on its own, with no
// host in the loop: it sends command messages to the OCD over the MDI bus,
// waits for triggers (the OCD's watchpoint event pin or an external signal),
// waits for FI-module completion messages, inserts delays, and can flip bits
// itself by reading a target word through the OCD, XORing it with a mask and
// writing it back.  Every message the OCD sends on MDO is stored in the
// output bank, which the host reads afterwards (ht_* port, trace_count).
//
// Script entry (script_t, 80 bits) = {dop, cmd_msg_t}:
//   D_SEND     send msg to the OCD
//   D_WAIT_WP  wait for an evto pulse (watchpoint hit)
//   D_WAIT_EX  wait for ext_trig high
//   D_DELAY    wait msg.addr+1 cycles
//   D_FLIP     CMD_MEM_RD msg.addr, wait TC_RD_DATA, CMD_MEM_WR msg.addr
//              with (data XOR msg.data)     (step "3B" without predetermination);
//              with msg.op = CMD_REG_WR the same on a CPU register
//              (CMD_REG_RD / CMD_REG_WR), for use while the CPU is halted
//   D_WAIT_FI  wait for a TC_FI_DONE message
//   D_END      stop, pulse done
// The entry after the current one is read while waiting, so a trigger
// starts the next step's message in the following cycle.  The controller /
// two-bank structure and the script-driven reactive behaviour follow the
// document; script format and opcodes are this design's.
module debugger
  import ocd_pkg::*;
#(
  parameter int unsigned MDI_W        = 8,
  parameter int unsigned MDO_W        = 8,
  parameter int unsigned SCRIPT_DEPTH = 64,
  parameter int unsigned TRACE_DEPTH  = 256,
  localparam int unsigned SAW = $clog2(SCRIPT_DEPTH),
  localparam int unsigned TAW = $clog2(TRACE_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host: script upload, trace download, control
  input  logic             hs_we,
  input  logic [SAW-1:0]   hs_addr,
  input  script_t          hs_wdata,
  input  logic [TAW-1:0]   ht_addr,
  output out_msg_t         ht_rdata,
  output logic [TAW:0]     trace_count,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             ext_trig,
  // AUX port
  output logic [MDI_W-1:0] mdi,
  output logic             mdi_valid,
  input  logic [MDO_W-1:0] mdo,
  input  logic             mdo_valid,
  input  logic             evto
);
  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_EXEC, S_SEND, S_WAIT_WP, S_WAIT_EX, S_DELAY,
    S_FLIP_RD, S_FLIP_WAIT, S_WAIT_FI
  } state_e;

  state_e        state;
  logic [SAW-1:0] pc;
  logic [SAW-1:0] sm_raddr;
  script_t       ent;
  logic [AW-1:0] delay_cnt;
  logic [AW-1:0] flip_addr;
  logic [DW-1:0] flip_mask;
  logic          flip_reg;

  // ---------------- input bank (script) ----------------
  assign sm_raddr = (state == S_IDLE) ? '0 : (state == S_EXEC || state == S_FETCH) ? pc : pc + SAW'(1);

  dbg_mem #(.W(SCRIPT_W), .DEPTH(SCRIPT_DEPTH)) u_script (
    .clk, .we(hs_we), .waddr(hs_addr), .wdata(hs_wdata), .raddr(sm_raddr), .rdata(ent)
  );

  // ---------------- AUX transmit / receive ----------------
  cmd_msg_t tx_msg;
  logic     tx_valid, tx_ready;
  out_msg_t rx_msg;
  logic     rx_valid;

  aux_ser #(.MSG_W(CMD_MSG_W), .BEAT_W(MDI_W)) u_mdi (
    .clk, .rst_n, .msg(tx_msg), .msg_valid(tx_valid), .msg_ready(tx_ready),
    .beat(mdi), .beat_valid(mdi_valid)
  );

  aux_des #(.MSG_W(OUT_MSG_W), .BEAT_W(MDO_W)) u_mdo (
    .clk, .rst_n, .beat(mdo), .beat_valid(mdo_valid), .msg(rx_msg), .msg_valid(rx_valid)
  );

  // ---------------- output bank (trace) ----------------
  logic tr_we;
  assign tr_we = rx_valid && (trace_count < (TAW+1)'(TRACE_DEPTH));

  dbg_mem #(.W(OUT_MSG_W), .DEPTH(TRACE_DEPTH)) u_trace (
    .clk, .we(tr_we), .waddr(trace_count[TAW-1:0]), .wdata(rx_msg), .raddr(ht_addr), .rdata(ht_rdata)
  );

  // ---------------- controller ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      tx_msg      <= '0;
      tx_valid    <= 1'b0;
      delay_cnt   <= '0;
      flip_addr   <= '0;
      flip_mask   <= '0;
      flip_reg    <= 1'b0;
      done        <= 1'b0;
      trace_count <= '0;
    end else begin
      done <= 1'b0;
      if (tr_we) trace_count <= trace_count + (TAW+1)'(1);
      unique case (state)
        S_IDLE: if (start) begin
          pc          <= '0;
          trace_count <= '0;
          state       <= S_FETCH;
        end
        S_FETCH: state <= S_EXEC;
        S_EXEC: begin
          unique case (ent.dop)
            D_SEND: begin
              tx_msg   <= ent.msg;
              tx_valid <= 1'b1;
              state    <= S_SEND;
            end
            D_WAIT_WP: state <= S_WAIT_WP;
            D_WAIT_EX: state <= S_WAIT_EX;
            D_WAIT_FI: state <= S_WAIT_FI;
            D_DELAY: begin
              delay_cnt <= ent.msg.addr;
              state     <= S_DELAY;
            end
            D_FLIP: begin
              flip_addr <= ent.msg.addr;
              flip_mask <= ent.msg.data;
              flip_reg  <= (ent.msg.op == CMD_REG_WR);
              tx_msg    <= '{data: '0, addr: ent.msg.addr,
                             op: (ent.msg.op == CMD_REG_WR) ? CMD_REG_RD : CMD_MEM_RD};
              tx_valid  <= 1'b1;
              state     <= S_FLIP_RD;
            end
            default: begin  // D_END and unknown codes end the campaign
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        S_SEND: if (tx_ready) begin
          tx_valid <= 1'b0;
          pc       <= pc + SAW'(1);
          state    <= S_EXEC;
        end
        S_WAIT_WP: if (evto) begin
          pc    <= pc + SAW'(1);
          state <= S_EXEC;
        end
        S_WAIT_EX: if (ext_trig) begin
          pc    <= pc + SAW'(1);
          state <= S_EXEC;
        end
        S_WAIT_FI: if (rx_valid && rx_msg.tcode == TC_FI_DONE) begin
          pc    <= pc + SAW'(1);
          state <= S_EXEC;
        end
        S_DELAY: begin
          if (delay_cnt == '0) begin
            pc    <= pc + SAW'(1);
            state <= S_EXEC;
          end else begin
            delay_cnt <= delay_cnt - AW'(1);
          end
        end
        S_FLIP_RD: if (tx_ready) begin
          tx_valid <= 1'b0;
          state    <= S_FLIP_WAIT;
        end
        S_FLIP_WAIT: if (rx_valid && rx_msg.tcode == TC_RD_DATA) begin
          tx_msg   <= '{data: rx_msg.payload ^ flip_mask, addr: flip_addr,
                        op: flip_reg ? CMD_REG_WR : CMD_MEM_WR};
          tx_valid <= 1'b1;
          state    <= S_SEND;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
