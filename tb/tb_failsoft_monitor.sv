// Testbench for failsoft_monitor with a short tick (TICK_DIV=4), window
// [8,16] ticks, N=3, M=3. Sequence: the set starts failed, M correct
// windows bring it up, an early enable and missing enables are faults with
// their causes and interrupt, N consecutive faults declare failure, and the
// missing-enable fault fires exactly WIN_MAX ticks after the last enable.
// Manual and self-imposed takeover are checked while the set is running.
// A final phase drives enables at random intervals and compares failed,
// cause, fault_int and takeover every clock with a reference model that
// counts clocks since reset and since the last window start.
`include "tb/tb_check.svh"
module tb_failsoft_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enable, int_select, int_clr, manual, self_fail, fault_int, failed, takeover; logic [1:0] cause; logic [7:0] fault_count;
  failsoft_monitor #(.TICK_DIV(4), .WIN_MIN(8), .WIN_MAX(16), .N_FAULT(3), .M_GOOD(3)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  task automatic pulse_after(int clocks);
    repeat (clocks) @(negedge clk);
    enable = 1; @(negedge clk); enable = 0;
  endtask
  int t0, t1;
  // Reference model: ticks fall on clocks 0, TICK_DIV, 2*TICK_DIV, ... after
  // reset; m_t is whole ticks since the window started.
  bit m_run = 0;
  int m_cyc, m_t, m_nf, m_ng, m_cnt;
  bit m_failed, m_int; logic [1:0] m_cause;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_cyc = 0; m_t = 0; m_nf = 0; m_ng = 0; m_failed = 1; m_int = 0; m_cause = 0;
    end else begin
      bit tk, e, l;
      tk = (m_cyc % 4) == 0;
      e = enable && m_t < 8;
      l = !enable && tk && m_t == 16;
      if (m_run) begin
        `CHK(failed == m_failed && cause == m_cause && fault_int == m_int, "matches model")
        `CHK(takeover == (m_failed || manual || self_fail), "takeover matches model")
      end
      if (e || l) begin
        m_cause = {l, e}; if (int_select) m_int = 1; m_ng = 0;
        if (m_failed) m_nf = 0;
        else begin m_nf++; if (m_nf == 3) begin m_failed = 1; m_nf = 0; end end
      end else if (enable) begin
        m_nf = 0;
        if (m_failed) begin m_ng++; if (m_ng == 3) begin m_failed = 0; m_ng = 0; end end
        else m_ng = 0;
      end
      if (int_clr && !(e || l)) m_int = 0;
      if (enable || l) m_t = 0; else if (tk) m_t++;
      m_cyc++;
    end
  end
  initial begin
    enable = 0; int_select = 1; int_clr = 0; manual = 0; self_fail = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    `CHK(failed && takeover, "starts failed")
    pulse_after(5);               // first enable starts the window (early if t<8: counts as fault)
    pulse_after(12*4);            // correct windows
    #1 `CHK(failed, "still failed after one correct window")
    pulse_after(12*4);
    #1 `CHK(failed, "still failed after two correct windows")
    pulse_after(12*4);
    pulse_after(12*4);
    #1 `CHK(!failed && !takeover, "running after M correct windows")
    manual = 1; #1 `CHK(takeover && !failed, "manual takeover")
    manual = 0; self_fail = 1; #1 `CHK(takeover && !failed, "self-imposed takeover")
    self_fail = 0; #1 `CHK(!takeover, "takeover released")
    @(negedge clk); int_clr = 1; @(negedge clk); int_clr = 0;
    `CHK(!fault_int, "interrupt cleared")
    pulse_after(3*4);             // early
    #1 `CHK(fault_int && cause == 2'b01, "early enable fault")
    `CHK(!failed, "one fault is not a failure")
    // now let enables go missing; measure the time to the first late fault
    @(negedge clk); int_clr = 1; @(negedge clk); int_clr = 0;
    t0 = 0;
    while (!fault_int) begin @(negedge clk); t0++; end
    `CHK(cause == 2'b10, "missing enable cause")
    `CHK(t0 >= 15*4 && t0 <= 17*4, $sformatf("late fault after %0d clocks", t0))
    t1 = 0;
    while (!failed && t1 < 1000) begin @(negedge clk); t1++; end
    `CHK(failed && takeover, "N consecutive faults declare failure")
    `CHK(fault_count >= 3, "fault count")
    // interrupt not raised when not selected
    int_select = 0; @(negedge clk); int_clr = 1; @(negedge clk); int_clr = 0;
    repeat (20*4) @(negedge clk);
    `CHK(!fault_int, "no interrupt when not selected")
    // random phase against the reference model
    rst_n = 0; int_select = 1; @(negedge clk); rst_n = 1;
    m_run = 1;
    for (int k = 0; k < 400; k++) begin
      int gap;
      gap = (k % 50 < 25) ? 1 + $urandom_range(0, 10 * 4) : 8 * 4 + $urandom_range(0, 10 * 4);
      repeat (gap) @(negedge clk);
      enable = ($urandom_range(0, 7) != 0);
      int_clr = ($urandom_range(0, 3) == 0);
      manual = ($urandom_range(0, 31) == 0);
      self_fail = ($urandom_range(0, 31) == 0);
      @(negedge clk); enable = 0; int_clr = 0; manual = 0; self_fail = 0;
    end
    m_run = 0;
    `DONE
  end
endmodule
