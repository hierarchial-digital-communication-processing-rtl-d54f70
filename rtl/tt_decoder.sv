// tt_decoder: receiver side of transparent text.
//
// Outside transparent mode bytes pass through as non-transparent (header or
// trailer) bytes, and DLE STX switches to transparent mode (the DLE is
// delivered as the last header byte, the STX is consumed). In transparent
// mode DLE DLE yields one data DLE; a single DLE followed by anything else
// ends transparent mode, and that following byte is delivered as the
// control code that ended it (out_ctrl). The rule that only a lone DLE
// leaves transparent mode follows the design; the codes are this design's.
// One byte in per clock at most; outputs register, one clock later.
module tt_decoder
  import pliu_pkg::*;
(
  input  logic       clk, rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       out_transparent,  // byte is transparent text
  output logic       out_ctrl,         // byte is the control code after a lone DLE
  output logic       transparent,
  output logic       entered, exited   // one clock on a mode change
);
  logic esc;   // previous byte was a DLE not yet paired

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      esc <= 1'b0; transparent <= 1'b0; out_valid <= 1'b0; out_byte <= '0;
      out_transparent <= 1'b0; out_ctrl <= 1'b0; entered <= 1'b0; exited <= 1'b0;
    end else begin
      out_valid <= 1'b0; entered <= 1'b0; exited <= 1'b0; out_ctrl <= 1'b0;
      if (in_valid) begin
        if (!transparent) begin
          if (esc && in_byte == CODE_STX) begin
            esc <= 1'b0; transparent <= 1'b1; entered <= 1'b1;
          end else begin
            esc <= in_byte == CODE_DLE;
            out_valid <= 1'b1; out_byte <= in_byte; out_transparent <= 1'b0;
          end
        end else if (!esc) begin
          if (in_byte == CODE_DLE) esc <= 1'b1;
          else begin out_valid <= 1'b1; out_byte <= in_byte; out_transparent <= 1'b1; end
        end else begin
          esc <= 1'b0;
          if (in_byte == CODE_DLE) begin
            out_valid <= 1'b1; out_byte <= CODE_DLE; out_transparent <= 1'b1;
          end else begin
            transparent <= 1'b0; exited <= 1'b1;
            out_valid <= 1'b1; out_byte <= in_byte; out_transparent <= 1'b0; out_ctrl <= 1'b1;
          end
        end
      end
    end
  end
endmodule
