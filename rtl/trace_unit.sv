// trace_unit: OCD output message generation and queue (MDO side).
//
// Turns OCD events into messages for the debugger: watchpoint hits, read
// data answering debugger read commands, program trace (one message per
// taken branch, carrying the target address) and FI-module completion.
// Each source has a one-message holding register; one message per cycle is
// moved, by fixed priority (FI done, watchpoint, read data, branch), into a
// DEPTH-entry FIFO drained by the MDO serializer.  When a source's holding
// register is still full as its next event arrives, that event is lost and
// counted; the count is sent as an overrun message as soon as the FIFO has
// room, so the debugger knows the trace has a gap.  Trace keeps running
// while the FI module works, as the document requires.  Message classes
// follow the Nexus idea; codes, priorities and queue depth are this
// design's choices.
//
// Timing: an event in cycle t is in the FIFO at t+1 at the earliest and
// offered on msg/msg_valid from t+1.
module trace_unit
  import ocd_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fi_done,
  input  logic [DW-1:0] fi_value,
  input  logic          wp_hit,
  input  logic [AW-1:0] wp_addr,
  input  logic          rd_valid,
  input  logic [DW-1:0] rd_data,
  input  logic          br_valid,
  input  logic [AW-1:0] br_target,
  output out_msg_t      msg,
  output logic          msg_valid,
  input  logic          msg_ready,
  output logic [15:0]   lost_total   // events lost since reset
);
  localparam int unsigned NSRC = 4;
  localparam int unsigned PW   = $clog2(DEPTH);

  out_msg_t        hold [NSRC];
  logic [NSRC-1:0] hold_v;
  logic [NSRC-1:0] ev;
  out_msg_t        ev_msg [NSRC];
  logic [15:0]     lost;

  out_msg_t        fifo [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic [PW:0]     cnt;
  logic            full, push, pop;
  out_msg_t        push_msg;
  logic [NSRC-1:0] take;      // holding register moved into the FIFO
  logic            take_ovr;

  assign ev        = {br_valid, rd_valid, wp_hit, fi_done};
  assign ev_msg[0] = '{payload: fi_value,  tcode: TC_FI_DONE};
  assign ev_msg[1] = '{payload: wp_addr,   tcode: TC_WP_HIT};
  assign ev_msg[2] = '{payload: rd_data,   tcode: TC_RD_DATA};
  assign ev_msg[3] = '{payload: br_target, tcode: TC_BRANCH};

  assign full = (cnt == (PW+1)'(DEPTH));

  always_comb begin
    take     = '0;
    take_ovr = 1'b0;
    push     = 1'b0;
    push_msg = '{payload: '0, tcode: TC_NONE};
    if (!full) begin
      if (lost != '0) begin
        take_ovr = 1'b1;
        push     = 1'b1;
        push_msg = '{payload: DW'(lost), tcode: TC_OVERRUN};
      end else begin
        for (int i = NSRC - 1; i >= 0; i--) begin
          if (hold_v[i]) begin
            take     = '0;
            take[i]  = 1'b1;
            push     = 1'b1;
            push_msg = hold[i];
          end
        end
      end
    end
  end

  assign pop       = msg_valid && msg_ready;
  assign msg_valid = (cnt != '0);
  assign msg       = fifo[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v     <= '0;
      lost       <= '0;
      lost_total <= '0;
      wp         <= '0;
      rp         <= '0;
      cnt        <= '0;
      for (int i = 0; i < NSRC; i++) hold[i] <= '0;
    end else begin
      logic [15:0] nlost;
      logic [2:0]  nnew;
      nlost = take_ovr ? 16'd0 : lost;
      nnew  = '0;
      for (int i = 0; i < NSRC; i++) begin
        if (ev[i]) begin
          if (hold_v[i] && !take[i]) begin
            nlost = nlost + 16'd1;
            nnew  = nnew + 3'd1;
          end else begin
            hold[i]   <= ev_msg[i];
            hold_v[i] <= 1'b1;
          end
        end else if (take[i]) begin
          hold_v[i] <= 1'b0;
        end
      end
      lost       <= nlost;
      lost_total <= lost_total + 16'(nnew);
      if (push) begin
        fifo[wp] <= push_msg;
        wp       <= (wp == PW'(DEPTH - 1)) ? '0 : wp + PW'(1);
      end
      if (pop) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + PW'(1);
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end
endmodule
