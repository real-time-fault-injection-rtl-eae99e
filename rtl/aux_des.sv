// aux_des: message deserializer for one direction of the AUX debug port.
//
// Collects MSG_W/BEAT_W beats, least significant first, while beat_valid is
// high and pulses msg_valid for one cycle, in the cycle after the last beat,
// with the assembled message.  A low beat_valid between messages restarts
// the beat count, so the receiver re-aligns on every message.  Counterpart
// of aux_ser.
module aux_des #(
  parameter int unsigned MSG_W  = 72,
  parameter int unsigned BEAT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BEAT_W-1:0] beat,
  input  logic              beat_valid,
  output logic [MSG_W-1:0]  msg,
  output logic              msg_valid
);
  localparam int unsigned NBEATS = MSG_W / BEAT_W;
  localparam int unsigned CW     = $clog2(NBEATS + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg       <= '0;
      cnt       <= '0;
      msg_valid <= 1'b0;
    end else begin
      msg_valid <= 1'b0;
      if (beat_valid) begin
        msg <= {beat, msg[MSG_W-1:BEAT_W]};
        if (cnt == CW'(NBEATS - 1)) begin
          cnt       <= '0;
          msg_valid <= 1'b1;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end else begin
        cnt <= '0;
      end
    end
  end

  initial assert (MSG_W % BEAT_W == 0) else $error("MSG_W must be a multiple of BEAT_W");
endmodule
