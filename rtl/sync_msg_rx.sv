// sync_msg_rx: receive side of a synchronous line discipline.
//
// A synchronous message is a header of control characters, the message and
// a trailer. The receiver takes the byte stream of one line (already
// assembled into bytes by the line's URT), finds the header, passes the
// message on, detects the trailer and verifies the checkword.
//   - Hunt: NSYN synchronous idles (233 octal) in a row put the receiver in
//     sync. Further idles are skipped; any other byte before the message
//     opens drops sync again.
//   - SOH or STX opens the message. The opening byte is passed on with
//     out_ctl set and is not covered by the checkword.
//   - Every later byte is passed on and added to the checkword, except
//     idles inside the message, which are line fill and are dropped. SOH,
//     STX, ETX and ETB are passed with out_ctl set.
//   - ETX or ETB closes the message. The next two bytes are the checkword,
//     low byte first. On the second one msg_done pulses and msg_ok tells
//     whether it matched.
//   - A message longer than MAXLEN bytes is abandoned: msg_done pulses with
//     msg_ok low and the receiver hunts again.
// Interface: one byte per in_valid clock; out_valid follows one clock after
// the byte that caused it, msg_done one clock after the second checkword
// byte. in_msg is high from the opening byte to the end of the checkword.
// The header/message/trailer structure and checkword verification follow
// the design. The control codes, the CRC-16 checkword (pliu_pkg), the
// idle-stripping rule and the length limit are this design's choice.
module sync_msg_rx
  import pliu_pkg::*;
#(
  parameter int unsigned NSYN   = 2,
  parameter int unsigned MAXLEN = 4096
) (
  input  logic       clk, rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       out_ctl,     // byte is SOH, STX, ETX or ETB
  output logic       in_msg,
  output logic       msg_done,
  output logic       msg_ok
);
  typedef enum logic [2:0] { R_HUNT, R_SYNC, R_TEXT, R_CRC1, R_CRC2 } rstate_e;
  rstate_e st;
  logic [$clog2(NSYN+1)-1:0]   nsyn;
  logic [$clog2(MAXLEN+1)-1:0] len;
  logic [15:0] crc;
  logic [7:0]  crc_lo;
  logic        is_open, is_close, is_ctl;

  assign is_open  = in_byte == CODE_SOH || in_byte == CODE_STX;
  assign is_close = in_byte == CODE_ETX || in_byte == CODE_ETB;
  assign is_ctl   = is_open || is_close;
  assign in_msg   = st == R_TEXT || st == R_CRC1 || st == R_CRC2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_HUNT; nsyn <= '0; len <= '0; crc <= '0; crc_lo <= '0;
      out_valid <= 1'b0; out_byte <= '0; out_ctl <= 1'b0; msg_done <= 1'b0; msg_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0; msg_done <= 1'b0;
      if (in_valid) begin
        unique case (st)
          R_HUNT: begin
            if (in_byte != CODE_IDLE) nsyn <= '0;
            else if (nsyn == ($bits(nsyn))'(NSYN - 1)) begin st <= R_SYNC; nsyn <= '0; end
            else nsyn <= nsyn + 1'b1;
          end
          R_SYNC: begin
            if (is_open) begin
              st <= R_TEXT; crc <= '0; len <= '0;
              out_valid <= 1'b1; out_byte <= in_byte; out_ctl <= 1'b1;
            end else if (in_byte != CODE_IDLE) st <= R_HUNT;
          end
          R_TEXT: begin
            if (in_byte != CODE_IDLE) begin
              crc <= crc16_next(crc, in_byte);
              out_valid <= 1'b1; out_byte <= in_byte; out_ctl <= is_ctl;
              if (is_close) st <= R_CRC1;
              else if (len == ($bits(len))'(MAXLEN)) begin
                st <= R_HUNT; msg_done <= 1'b1; msg_ok <= 1'b0;
              end else len <= len + 1'b1;
            end
          end
          R_CRC1: begin crc_lo <= in_byte; st <= R_CRC2; end
          R_CRC2: begin
            msg_done <= 1'b1; msg_ok <= {in_byte, crc_lo} == crc; st <= R_HUNT;
          end
          default: st <= R_HUNT;
        endcase
      end
    end
  end
endmodule
