// sync_msg_tx: transmit side of a synchronous line discipline.
//
// Wraps a message in a header and a trailer for a synchronous line: NSYN
// synchronous idles (233 octal) and STX, the message bytes, ETX, and the
// two-byte CRC-16 checkword (low byte first), which covers the message and
// the ETX. Between messages nothing is sent; the line's URT inserts idles
// on its own.
// Interface: the message comes in as a valid/ready stream with in_last on
// its final byte; the framed bytes leave as a valid/ready stream. A byte
// moves on each clock where valid and ready are both high. The first header
// byte is offered on the clock after in_valid rises; the framing adds
// NSYN + 4 bytes to each message. The message must not hold the control
// codes or the idle; transparent text (tt_encoder) is the way to send
// arbitrary bytes.
// Framing a message with header, trailer and checkword follows the design;
// the codes, the checkword and the handshake are this design's choice.
module sync_msg_tx
  import pliu_pkg::*;
#(
  parameter int unsigned NSYN = 2
) (
  input  logic       clk, rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_byte,
  input  logic       out_ready
);
  typedef enum logic [2:0] { T_IDLE, T_SYN, T_STX, T_TEXT, T_ETX, T_CRC1, T_CRC2 } tstate_e;
  tstate_e st;
  logic [$clog2(NSYN+1)-1:0] nsyn;
  logic [15:0] crc;
  logic        move;

  always_comb begin
    out_valid = 1'b1; out_byte = '0;
    unique case (st)
      T_IDLE: out_valid = 1'b0;
      T_SYN:  out_byte = CODE_IDLE;
      T_STX:  out_byte = CODE_STX;
      T_TEXT: begin out_valid = in_valid; out_byte = in_byte; end
      T_ETX:  out_byte = CODE_ETX;
      T_CRC1: out_byte = crc[7:0];
      T_CRC2: out_byte = crc[15:8];
      default: out_valid = 1'b0;
    endcase
  end
  assign in_ready = st == T_TEXT && out_ready;
  assign move     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; nsyn <= '0; crc <= '0;
    end else begin
      unique case (st)
        T_IDLE: if (in_valid) begin st <= T_SYN; nsyn <= '0; end
        T_SYN:  if (move) begin
                  if (nsyn == ($bits(nsyn))'(NSYN - 1)) st <= T_STX;
                  else nsyn <= nsyn + 1'b1;
                end
        T_STX:  if (move) begin st <= T_TEXT; crc <= '0; end
        T_TEXT: if (move) begin
                  crc <= crc16_next(crc, in_byte);
                  if (in_last) st <= T_ETX;
                end
        T_ETX:  if (move) begin crc <= crc16_next(crc, CODE_ETX); st <= T_CRC1; end
        T_CRC1: if (move) st <= T_CRC2;
        T_CRC2: if (move) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
