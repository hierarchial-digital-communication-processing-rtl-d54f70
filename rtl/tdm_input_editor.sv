// tdm_input_editor: edits a time-multiplexed input stream for the CPS.
//
// The stream is framed in periods of NCH+1 bytes: one synchronous idle code
// and then one byte for each of NCH channels. The editor follows the period,
// drops idle codes, sends data bytes (with their channel number) to the
// block for the host, and control bytes (break and other control codes) to
// a separate block for the CPS, so the CPS never sifts through idles or
// data to find control information. A period whose first byte is not the
// idle code is a framing error: the editor then waits for an idle code to
// restart the period. Byte classes are given by pliu_pkg::classify. The
// period, the codes and the two output blocks follow the design; the
// classification rule for codes other than those named and the resync rule
// are this design's. One byte per clock at most; outputs register.
module tdm_input_editor
  import pliu_pkg::*;
#(
  parameter int unsigned NCH = 12
) (
  input  logic       clk, rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       host_valid,
  output logic [7:0] host_byte,
  output logic [3:0] host_chan,
  output logic       ctl_valid,
  output logic [7:0] ctl_byte,
  output logic [3:0] ctl_chan,
  output logic       frame_err,       // one clock per framing error
  output logic       in_sync,
  output logic [15:0] idle_count
);
  logic [3:0] slot;   // 0 = sync position, 1..NCH = channel slot-1
  code_class_e cls;
  assign cls = classify(in_byte);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0; in_sync <= 1'b0; host_valid <= 1'b0; ctl_valid <= 1'b0;
      host_byte <= '0; host_chan <= '0; ctl_byte <= '0; ctl_chan <= '0;
      frame_err <= 1'b0; idle_count <= '0;
    end else begin
      host_valid <= 1'b0; ctl_valid <= 1'b0; frame_err <= 1'b0;
      if (in_valid) begin
        if (slot == 0) begin
          if (cls == CC_IDLE) begin
            slot <= 4'd1; in_sync <= 1'b1;
          end else begin
            if (in_sync) frame_err <= 1'b1;
            in_sync <= 1'b0;
          end
        end else begin
          slot <= (slot == 4'(NCH)) ? 4'd0 : slot + 4'd1;
          unique case (cls)
            CC_DATA: begin host_valid <= 1'b1; host_byte <= in_byte; host_chan <= slot - 4'd1; end
            CC_CTRL: begin ctl_valid  <= 1'b1; ctl_byte  <= in_byte; ctl_chan  <= slot - 4'd1; end
            default: idle_count <= idle_count + 1'b1;
          endcase
        end
      end
    end
  end
endmodule
