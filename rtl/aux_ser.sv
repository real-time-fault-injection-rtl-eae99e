// aux_ser: message serializer for one direction of the AUX debug port.
//
// A MSG_W-bit message accepted with msg_valid/msg_ready is sent as
// MSG_W/BEAT_W beats on `beat`, least significant beat first, with
// beat_valid high for every beat of the message (the framing role a Nexus
// MSEI/MSEO pin plays).  A new message is accepted on the last beat of the
// previous one, so messages can follow back to back.  Used for the MDI bus
// (debugger side) and the MDO bus (OCD side); the widths come from the
// configuration (MDI 2 or 8 bits, MDO 8 bits), the framing is this design's.
module aux_ser #(
  parameter int unsigned MSG_W  = 72,
  parameter int unsigned BEAT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MSG_W-1:0]  msg,
  input  logic              msg_valid,
  output logic              msg_ready,
  output logic [BEAT_W-1:0] beat,
  output logic              beat_valid
);
  localparam int unsigned NBEATS = MSG_W / BEAT_W;
  localparam int unsigned CW     = $clog2(NBEATS + 1);

  logic [MSG_W-1:0] sh;
  logic [CW-1:0]    left;   // beats still to send, including the current one

  assign msg_ready  = (left <= CW'(1));
  assign beat       = sh[BEAT_W-1:0];
  assign beat_valid = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (msg_valid && msg_ready) begin
      sh   <= msg;
      left <= CW'(NBEATS);
    end else if (left != '0) begin
      sh   <= sh >> BEAT_W;
      left <= left - CW'(1);
    end
  end

  initial assert (MSG_W % BEAT_W == 0) else $error("MSG_W must be a multiple of BEAT_W");
endmodule
