// tt_encoder: transmitter side of transparent text.
//
// Between the non-transparent header and trailer, transparent text may hold
// any byte value. The encoder takes bytes with a command: plain data, begin
// transparent text, or end transparent text. Begin emits DLE STX and enters
// transparent mode; end emits DLE ETX and leaves it. In transparent mode each
// DLE in the data is sent twice, so a single DLE on the line always marks a
// control sequence. Outside transparent mode data passes unchanged.
// Input has a valid/ready handshake (in_ready low while the second byte of a
// pair is being sent); output valid/ready likewise. The doubling rule
// follows the design; DLE as the escape and the DLE STX / DLE ETX sequences
// are this design's choices.
module tt_encoder
  import pliu_pkg::*;
(
  input  logic       clk, rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_cmd,      // 0 data, 1 begin transparent, 2 end transparent
  input  logic [7:0] in_byte,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_byte,
  input  logic       out_ready,
  output logic       transparent,
  output logic [15:0] stuffed     // DLEs doubled so far
);
  logic       pend;          // a second byte is owed
  logic [7:0] pend_byte;
  logic       dbl;

  assign dbl       = in_cmd != 2'd0 || (transparent && in_byte == CODE_DLE);
  assign in_ready  = out_ready && !pend;
  assign out_valid = pend || in_valid;
  assign out_byte  = pend ? pend_byte : (in_cmd != 2'd0 ? CODE_DLE : in_byte);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; pend_byte <= '0; transparent <= 1'b0; stuffed <= '0;
    end else if (out_ready) begin
      if (pend) pend <= 1'b0;
      else if (in_valid && dbl) begin
        pend <= 1'b1;
        unique case (in_cmd)
          2'd1:    begin pend_byte <= CODE_STX; transparent <= 1'b1; end
          2'd2:    begin pend_byte <= CODE_ETX; transparent <= 1'b0; end
          default: begin pend_byte <= CODE_DLE; stuffed <= stuffed + 1'b1; end
        endcase
      end
    end
  end
endmodule
