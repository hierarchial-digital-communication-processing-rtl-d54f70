// interrupt_logic: interrupt support for the PLIU microprocessor.
//
// Collects NSRC level-sensitive interrupt sources (per line: URT receiver
// ready, transmitter ready, modem status change; and the CPS-to-PLIU flag),
// masks them with a mask register the microprocessor loads a byte at a time,
// and requests an interrupt while any unmasked source is active and none is
// in service. On the acknowledge the lowest-numbered active source is
// latched as the vector and the controller is in service until the
// microprocessor signals end of interrupt. The vector and the pending bits
// can be read back. Source numbering, fixed priority and the single level
// of service are this design's choices.
module interrupt_logic #(
  parameter int unsigned NSRC = 25
) (
  input  logic            clk, rst_n,
  input  logic [NSRC-1:0] src,
  input  logic [3:0]      mask_load,     // load mask byte k
  input  logic [7:0]      mask_d,
  input  logic            int_ack,
  input  logic            eoi,
  output logic            int_req,
  output logic [4:0]      vector,
  output logic            in_service,
  output logic [NSRC-1:0] pending,
  output logic [NSRC-1:0] mask
);
  logic [4:0] first;
  assign pending = src & mask;

  always_comb begin
    first = '0;
    for (int i = NSRC-1; i >= 0; i--) if (pending[i]) first = 5'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0; vector <= '0; in_service <= 1'b0;
    end else begin
      for (int k = 0; k < 4; k++)
        if (mask_load[k])
          for (int b = 0; b < 8; b++)
            if (k*8+b < NSRC) mask[k*8+b] <= mask_d[b];
      if (int_ack && int_req) begin vector <= first; in_service <= 1'b1; end
      else if (eoi)           in_service <= 1'b0;
    end
  end

  assign int_req = (|pending) && !in_service;
endmodule
