// status_bits: inter-processor flags of one PLIU.
//
// Holds the flip-flops the PDP-8 based CPS and the PLIU microprocessor use to
// interrupt and enable each other:
//   dma_enable - set/cleared by the CPS; the PLIU may reach common memory only
//                while it is set (this rule is the design's)
//   pliu_flag  - PLIU-to-CPS interrupt; set by a micro-operation, cleared by CPS
//   cps_flag   - CPS-to-PLIU interrupt; set by the CPS, cleared by a micro-op
//   gp[NGP]    - general flags set, reset and tested by micro-operations
// A test select (set B of the micro-operation decode) returns one flag on
// test_out. Flag numbering is this design's choice:
//   micro-op flop 1 = pliu_flag, 2 = cps_flag, 3.. = gp flags
//   test 1 = pliu_flag, 2 = cps_flag, 3 = dma_enable, 4.. = gp flags.
// All flags clear at reset and change on the clock edge after their strobe.
module status_bits #(
  parameter int unsigned NGP = 8
) (
  input  logic         clk, rst_n,
  input  logic         cps_dma_en_set, cps_dma_en_clr,
  input  logic         cps_flag_set, cps_pliu_flag_clr,
  input  logic [15:1]  flop_set, flop_reset, test_sel,
  output logic         dma_enable, pliu_flag, cps_flag,
  output logic [NGP-1:0] gp,
  output logic         test_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_enable <= 1'b0; pliu_flag <= 1'b0; cps_flag <= 1'b0; gp <= '0;
    end else begin
      if (cps_dma_en_set)      dma_enable <= 1'b1;
      else if (cps_dma_en_clr) dma_enable <= 1'b0;
      if (flop_set[1])            pliu_flag <= 1'b1;
      else if (cps_pliu_flag_clr || flop_reset[1]) pliu_flag <= 1'b0;
      if (cps_flag_set)           cps_flag <= 1'b1;
      else if (flop_reset[2])     cps_flag <= 1'b0;
      for (int i = 0; i < NGP && i < 13; i++) begin
        if (flop_set[i+3])        gp[i] <= 1'b1;
        else if (flop_reset[i+3]) gp[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    test_out = 1'b0;
    if (test_sel[1]) test_out = pliu_flag;
    if (test_sel[2]) test_out = cps_flag;
    if (test_sel[3]) test_out = dma_enable;
    for (int i = 0; i < NGP && i < 12; i++)
      if (test_sel[i+4]) test_out = gp[i];
  end
endmodule
