// fi_module: the fault-injection (FI) module added to the OCD (OCD-FI).
//
// The debugger preloads a target address (fi_addr), a value (fi_data) and a
// control word (fi_ctrl) and arms the module.  On the next trigger - a
// watchpoint hit for a memory target, a breakpoint hit for a CPU register
// target - the module takes the OCD's real-time access port and inserts the
// fault without the debugger taking part:
//   Basic (PLUS=0), or Plus with rmw=0: the preloaded value is written
//     (the faulty value was worked out beforehand).
//   Plus with rmw=1: the target is read, XORed with the preloaded mask and the
//     result written back (a bit flip without knowing the value in advance).
// For a register target the CPU is halted by the breakpoint; the module
// pulses `resume` after the write.  It then reports the value written
// (done / done_value) and disarms.  Trigger-to-insertion follows the
// document's cycle counts; the state sequence giving them is this design's.
//
// Timing (trigger = CPU bus cycle t that matched; hit arrives at t+1):
//   memory write on the access port: Basic t+2, Plus/rmw t+4
//   register target: CPU halted from t+1, resume pulse at t+3 (Basic) or
//   t+5 (Plus/rmw), i.e. 3 or 5 halted cycles.
// The read data from the access port is expected one cycle after the read.
module fi_module
  import ocd_pkg::*;
#(
  parameter bit PLUS = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  // preload / arm (from the OCD configuration registers)
  input  logic [AW-1:0] fi_addr,
  input  logic [DW-1:0] fi_data,
  input  fi_ctrl_t      fi_ctrl,
  input  logic          ctrl_wr,   // fi_ctrl written this cycle
  // triggers
  input  logic          wp_hit,
  input  logic          brk_hit,
  // real-time access port
  output acc_req_t      acc,
  input  logic [DW-1:0] acc_rdata,
  output logic          own,       // module owns the access port
  // run control and status
  output logic          resume,
  output logic          armed,
  output logic          done,
  output logic [DW-1:0] done_value
);
  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_READ, S_MODIFY, S_WRITE, S_RESUME} state_e;

  state_e   state;
  fi_ctrl_t ctrl_q;
  logic     do_rmw;
  logic     trig;

  assign do_rmw = PLUS && ctrl_q.rmw;
  assign trig   = ctrl_q.space ? brk_hit : wp_hit;
  assign armed  = (state == S_ARMED);
  assign own    = (state != S_IDLE) && (state != S_ARMED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ctrl_q     <= '0;
      acc        <= '0;
      resume     <= 1'b0;
      done       <= 1'b0;
      done_value <= '0;
    end else begin
      acc.req <= 1'b0;
      resume  <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        S_IDLE, S_ARMED: begin
          if (ctrl_wr) begin
            ctrl_q <= fi_ctrl;
            state  <= fi_ctrl.arm ? S_ARMED : S_IDLE;
          end else if (state == S_ARMED && trig) begin
            acc.space <= ctrl_q.space;
            acc.addr  <= fi_addr;
            if (do_rmw) begin
              acc.req <= 1'b1;
              acc.we  <= 1'b0;
              state   <= S_READ;
            end else begin
              acc.req   <= 1'b1;
              acc.we    <= 1'b1;
              acc.wdata <= fi_data;
              state     <= S_WRITE;
            end
          end
        end
        S_READ:   state <= S_MODIFY;          // read on the port this cycle
        S_MODIFY: begin                       // read data available
          acc.req   <= 1'b1;
          acc.we    <= 1'b1;
          // S_MODIFY is unreachable in Basic; the PLUS term lets synthesis
          // drop the XOR datapath there
          acc.wdata <= PLUS ? (acc_rdata ^ fi_data) : fi_data;
          state     <= S_WRITE;
        end
        S_WRITE: begin                        // write on the port this cycle
          done       <= 1'b1;
          done_value <= acc.wdata;
          resume     <= ctrl_q.space;
          state      <= S_RESUME;
        end
        S_RESUME: begin
          ctrl_q.arm <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the port is only driven while the module owns it
  assert property (@(posedge clk) disable iff (!rst_n) acc.req |-> own);
endmodule
