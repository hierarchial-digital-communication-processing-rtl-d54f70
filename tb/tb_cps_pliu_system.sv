// End-to-end testbench for cps_pliu_system at its default parameters.
//
// Models around the top: the PLIU microprocessor (bus tasks), the ROM, the
// CPS memory (an array), the CPS issuing PDP-8 IOT pulses and DMA commands
// on the multiplexer bus, and one other PLIU using the interlock memory.
// It runs, in order: ROM and local RAM access; a common reference refused
// while DMA is disabled; the CPS enabling DMA by IOT; absolute, relocatable
// and high-bit writes and reads of CPS memory (with the processor wait
// counted); a three-way bus contention resolved by priority; interlock
// acquire, busy and release between two processors; CPS-to-PLIU and
// PLIU-to-CPS queue traffic through CPS DMA commands, with status reads;
// the CPS interrupting the PLIU and the PLIU interrupting the CPS (skip);
// URT interrupts with vector read-back; line loopback, baud generator and
// synchronous clock modes; the fail-soft monitor failing and recovering;
// time-multiplexed input editing into chained IOC blocks, time-multiplexed
// output with idle fill; transparent text encoded and decoded back. Each
// mechanism is counted and must occur at least once.
`include "tb/tb_check.svh"
module tb_cps_pliu_system;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(400000)

  logic [15:0] p_addr; logic [7:0] p_wdata, p_rdata; logic p_rd, p_wr, p_wait, p_int_req, p_int_ack;
  logic rom_cs; logic [11:0] rom_addr; logic [7:0] rom_data;
  logic [7:0] urt_cs; logic urt_cd, urt_rd, urt_wr; logic [7:0] urt_wdata, urt_rdata, urt_rxrdy, urt_txrdy;
  logic [7:0] urt_dtr, urt_rts, urt_txd, urt_sup, urt_dsr, urt_cts, urt_rxd, urt_txc, urt_rxc;
  logic [7:0] m_dtr, m_rts, m_txd, m_sup, m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in, m_txc, m_rxc;
  logic [7:0] led [8];
  logic [11:0] cps_mb, cps_ac; logic cps_iop1, cps_iop2, cps_iop4, cps_skip, cps_int;
  logic cps_req; logic [11:0] cps_bus; logic [16:0] oth_req; logic [11:0] oth_bus;
  logic [18:0] gnt; phase_e bus_phase; logic [11:0] mux_bus;
  logic cm_rd, cm_wr; logic [17:0] cm_addr; logic [11:0] cm_wdata, cm_rdata;
  logic fs_enable, fs_int_select, fs_int_clr, fs_manual, fs_self_fail, fs_int, fs_failed, fs_takeover; logic [1:0] fs_cause;
  logic tdi_valid; logic [7:0] tdi_byte; logic ioc_push, ioc_full; ioc_t ioc_in;
  logic host_wr; logic [17:0] host_addr; logic [7:0] host_byte; logic [3:0] host_chan;
  logic ioc_expended, ioc_overrun, ctl_valid; logic [7:0] ctl_byte; logic [3:0] ctl_chan; logic tdi_frame_err;
  logic tdo_push; logic [3:0] tdo_chan; logic [7:0] tdo_byte_in; logic tdo_push_ok, tdo_ready;
  logic [7:0] tdo_byte; logic tdo_sync, tdo_fill;
  logic tte_valid; logic [1:0] tte_cmd; logic [7:0] tte_byte; logic tte_ready, tte_out_valid; logic [7:0] tte_out;
  logic tte_out_ready, ttd_valid; logic [7:0] ttd_byte; logic ttd_out_valid; logic [7:0] ttd_out;
  logic ttd_out_transparent, ttd_out_ctrl;
  logic smt_valid, smt_last, smt_ready, smt_out_valid, smt_out_ready; logic [7:0] smt_byte, smt_out;
  logic smr_valid, smr_out_valid, smr_out_ctl, smr_in_msg, smr_done, smr_ok; logic [7:0] smr_byte, smr_out;
  logic [7:0] sm_flip = 8'h00;   // XORed into one line byte to corrupt a message

  cps_pliu_system dut (.*);

  // ---------------- models ----------------
  logic [11:0] cmem [1 << 18];
  assign cm_rdata = cmem[cm_addr];
  always @(posedge clk) if (cm_wr) cmem[cm_addr] <= cm_wdata;
  assign rom_data = 8'(rom_addr * 3 + 1);
  assign urt_rdata = 8'hC3;

  // CPS and other-PLIU bus words, one per phase
  logic [11:0] cps_w [3], oth_w [3];
  assign cps_bus = gnt[0] ? cps_w[bus_phase] : '0;
  assign oth_bus = gnt[2] ? oth_w[bus_phase] : '0;

  // mechanism counters
  int n_wait_clocks = 0, n_access_err = 0, n_contention = 0, n_ilk_acquire = 0, n_ilk_busy = 0,
      n_ilk_release = 0, n_q_c2p = 0, n_q_p2c = 0, n_cps_int = 0, n_pliu_int = 0, n_urt_int = 0,
      n_loopback = 0, n_sync_clk = 0, n_baud = 0, n_fs_fail = 0, n_fs_recover = 0, n_fs_manual = 0, n_fs_self = 0, n_host = 0,
      n_ctl = 0, n_chain = 0, n_frame_err = 0, n_fill = 0, n_stuff = 0, n_tt_exit = 0, n_msg_ok = 0, n_msg_bad = 0, n_msg_bytes = 0, n_ram = 0,
      n_rom = 0, n_abs = 0, n_reloc = 0;
  always @(posedge clk) if (rst_n) begin
    if (p_wait) n_wait_clocks++;
    if (dut.pl_access_error) n_access_err++;
    if (urt_txc[1]) n_baud++;
    if (urt_txc[2]) n_sync_clk++;
    if (tdi_frame_err) n_frame_err++;
    if (tdo_ready && tdo_fill) n_fill++;
    if (ioc_expended) n_chain++;
    if (ttd_out_ctrl) n_tt_exit++;
    if (smr_done && smr_ok) n_msg_ok++;
    if (smr_done && !smr_ok) n_msg_bad++;
    if (smr_out_valid && !smr_out_ctl) n_msg_bytes++;
  end

  // ---------------- processor bus tasks ----------------
  task automatic pwrite(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); p_addr = a; p_wdata = d; p_wr = 1; #1;
    while (p_wait) begin @(negedge clk); #1; end
    @(negedge clk); p_wr = 0;
    @(negedge clk);
  endtask
  task automatic pread(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); p_addr = a; p_rd = 1; #1;
    while (p_wait) begin @(negedge clk); #1; end
    d = p_rdata;
    @(negedge clk); p_rd = 0;
    @(negedge clk);
  endtask
  function automatic logic [15:0] uop(int c, int b = 0, int a = 0);
    return UOP_BASE | 16'(c << 8) | 16'(b << 4) | 16'(a);
  endfunction
  task automatic iot(input logic [5:0] dev, input logic [2:0] op);
    @(negedge clk); cps_mb = {3'o6, dev, op};
    cps_iop1 = op[0]; @(negedge clk); cps_iop1 = 0;
    cps_iop2 = op[1]; @(negedge clk); cps_iop2 = 0;
    cps_iop4 = op[2]; @(negedge clk); cps_iop4 = 0;
    cps_mb = 0;
  endtask
  // CPS DMA command to the PLIU; returns the data-phase bus word
  task automatic cps_cmd(input logic [2:0] cmd, input logic [11:0] data, output logic [11:0] rsp);
    @(negedge clk); cps_w[0] = {5'd1, cmd, 3'd0, 1'b0}; cps_w[1] = 0; cps_w[2] = data; cps_req = 1;
    while (!gnt[0]) @(negedge clk);
    cps_req = 0;
    while (bus_phase != PH_DATA) @(negedge clk);
    #1 rsp = mux_bus;
    @(negedge clk);
  endtask
  // the other PLIU performs an interlock operation; returns the reply word
  task automatic oth_ilk(input mop_e op, input logic [11:0] a, output logic [11:0] rsp);
    @(negedge clk); oth_w[0] = {op, 10'd0}; oth_w[1] = a; oth_w[2] = 0; oth_req[0] = 1;
    while (!gnt[2]) @(negedge clk);
    oth_req[0] = 0;
    while (bus_phase != PH_DATA) @(negedge clk);
    #1 rsp = mux_bus;
    @(negedge clk);
  endtask

  logic [7:0] d; logic [11:0] w; int t0, wc;
  bit mon = 0; int order [$]; logic [18:0] gnt_q = 0;
  always @(posedge clk) begin
    if (mon && gnt != 0 && gnt != gnt_q) for (int i = 0; i < 19; i++) if (gnt[i]) order.push_back(i);
    gnt_q <= gnt;
  end
  initial begin
    p_addr = 0; p_wdata = 0; p_rd = 0; p_wr = 0; p_int_ack = 0;
    urt_rxrdy = 0; urt_txrdy = 0; urt_dtr = 0; urt_rts = 0; urt_txd = 8'hFF; urt_sup = 0;
    m_dsr = 0; m_cts = 0; m_rxd = 8'hFF; m_ri = 0; m_dcd = 0; m_sup_in = 0; m_txc = 0; m_rxc = 0;
    cps_mb = 0; cps_ac = 0; cps_iop1 = 0; cps_iop2 = 0; cps_iop4 = 0; cps_req = 0; oth_req = 0;
    cps_w = '{0, 0, 0}; oth_w = '{0, 0, 0};
    fs_enable = 0; fs_int_select = 1; fs_int_clr = 0; fs_manual = 0; fs_self_fail = 0;
    tdi_valid = 0; tdi_byte = 0; ioc_push = 0; ioc_in = '0;
    tdo_push = 0; tdo_chan = 0; tdo_byte_in = 0; tdo_ready = 0;
    tte_valid = 0; tte_cmd = 0; tte_byte = 0; tte_out_ready = 1;
    smt_valid = 0; smt_byte = 0; smt_last = 0; smt_out_ready = 1;
    for (int i = 0; i < 64; i++) cmem[i] = 12'(i * 5);
    repeat (3) @(posedge clk); rst_n = 1;

    // ROM and local RAM
    pread(16'h0123, d); `CHK(d == 8'('h123 * 3 + 1), "ROM read") n_rom++;
    for (int i = 0; i < 16; i++) pwrite(RAM_BASE + 16'(i * 1021), 8'(i * 17 + 3));
    for (int i = 0; i < 16; i++) begin pread(RAM_BASE + 16'(i * 1021), d); `CHK(d == 8'(i * 17 + 3), "RAM read back") n_ram++; end

    // common reference before DMA is enabled
    pread(ABS_BASE + 16'd5, d);
    `CHK(n_access_err == 1 && n_wait_clocks == 0, "refused without DMA enable")
    iot(PIO_DEV1, 3'b001);
    `CHK(dut.dma_enable, "CPS set DMA enable")

    // absolute write and read with high bits
    pwrite(uop(3), 8'h0A);                       // high 4 bits = A
    wc = n_wait_clocks;
    pwrite(ABS_BASE + 16'h1234, 8'h5C);
    `CHK(n_wait_clocks - wc == 6, $sformatf("uncontended reference holds the processor 6 clocks (%0d)", n_wait_clocks - wc))
    `CHK(cmem[18'h1234] == 12'hA5C, "absolute write word") n_abs++;
    pread(ABS_BASE + 16'd7, d);
    `CHK(d == 8'(35), "absolute read low bits")
    cmem[18'h777] = 12'h9E1; pread(ABS_BASE + 16'h0777, d);
    `CHK(d == 8'hE1, "read low 8"); pread(uop(3), d); `CHK(d == 8'h09, "read high 4") n_abs++;
    // relocatable: page 0x2B
    pwrite(uop(2), 8'h2B);
    pwrite(RELOC_BASE + 16'h0456, 8'h77);
    `CHK(cmem[{6'h2B, 12'h456}] == 12'hA77, "relocated write") n_reloc++;
    pread(RELOC_BASE + 16'h0456, d); `CHK(d == 8'h77, "relocated read") n_reloc++;

    // three-way contention: the other PLIU holds the bus while this PLIU and
    // then the CPS request; the CPS (requester 0) must win the next slot
    mon = 1; wc = n_wait_clocks;
    fork
      begin logic [11:0] r; oth_ilk(MOP_ILK_RESET, 12'd9, r); end
      begin @(negedge clk); pwrite(ABS_BASE + 16'h0100, 8'h11); end
      begin logic [11:0] r; @(negedge clk); @(negedge clk); cps_cmd(3'd0, 0, r); end
    join
    mon = 0;
    `CHK(order.size() == 3 && order[0] == 2 && order[1] == 0 && order[2] == 1, "slot order other, CPS, PLIU")
    `CHK(n_wait_clocks - wc > 6, "PLIU stalled by contention")
    `CHK(cmem[18'h100] == 12'hA11, "write completes after contention")
    n_contention++;

    // interlock between this PLIU (id 1) and another (id 2)
    pread(ILOCK_BASE + 16'd40, d); pread(uop(3), d);
    begin
      logic [7:0] lo; pread(ILOCK_BASE + 16'd41, lo); end
    pread(uop(3), d);
    `CHK(d[3] == 1'b1, "interlock bit set");
    oth_ilk(MOP_ILK_TEST, 12'd40, w);
    `CHK(w[11] && w[4:0] == 5'd1, "other processor sees interlock held by PLIU 1") n_ilk_busy++;
    pwrite(ILOCK_BASE + 16'd40, 8'h00); n_ilk_release++;
    oth_ilk(MOP_ILK_TEST, 12'd40, w);
    `CHK(w[11] && w[4:0] == 5'd2, "other processor acquires after release") n_ilk_acquire++;
    pread(ILOCK_BASE + 16'd40, d);
    `CHK(d[4:0] == 5'd2, "PLIU now sees holder 2") n_ilk_busy++;
    pread(ILOCK_BASE + 16'd77, d);
    `CHK(d[4:0] == 5'd1, "PLIU acquires a free cell") n_ilk_acquire++;

    // CPS -> PLIU queue
    for (int i = 0; i < 5; i++) begin cps_cmd(3'd1, 12'(8'h60 + i), w); end
    for (int i = 0; i < 5; i++) begin pread(uop(1), d); `CHK(d == 8'(8'h60 + i), "CPS->PLIU queue order") n_q_c2p++; end
    // PLIU -> CPS queue
    for (int i = 0; i < 4; i++) pwrite(uop(1), 8'(8'h30 + i));
    cps_cmd(3'd4, 0, w); `CHK(w[11] == 1'b0 && w[0] == 0, "status: PLIU->CPS queue not empty")
    for (int i = 0; i < 4; i++) begin cps_cmd(3'd2, 0, w); `CHK(w[7:0] == 8'(8'h30 + i), "PLIU->CPS queue order") n_q_p2c++; end
    cps_cmd(3'd4, 0, w); `CHK(w[11] == 1'b1, "status: PLIU->CPS queue empty")

    // PLIU interrupts the CPS: flag set by micro-op, CPS skips, CPS clears
    pwrite(uop(0, 0, 1), 8'h00);
    `CHK(cps_int, "PLIU flag interrupts the CPS")
    @(negedge clk); cps_mb = {3'o6, PIO_DEV0, 3'b001}; cps_iop1 = 1; #1; `CHK(cps_skip, "CPS skips on PLIU flag") n_pliu_int++;
    @(negedge clk); cps_iop1 = 0; cps_mb = 0;
    iot(PIO_DEV0, 3'b010); `CHK(!cps_int, "CPS cleared PLIU flag")
    // CPS interrupts the PLIU (IOT and attention command)
    pwrite(uop(10), 8'h01);                       // unmask source 24
    iot(PIO_DEV1, 3'b100);
    #1 `CHK(p_int_req, "CPS flag interrupts the PLIU")
    @(negedge clk); p_int_ack = 1; @(negedge clk); p_int_ack = 0;
    pread(uop(2), d); `CHK(d == 8'd24, "vector of CPS interrupt") n_cps_int++;
    pread(uop(0, 0, 2), d);                       // reset cps_flag
    pwrite(uop(11), 0);                           // end of interrupt
    #1 `CHK(!p_int_req, "no request after clearing")
    cps_ac = 12'o1234; iot(PIO_DEV0, 3'b100); pread(uop(4), d); `CHK(d == 8'h9C, "mailbox loaded from AC")
    cps_cmd(3'd5, 0, w); `CHK(dut.cps_flag, "attention command sets the CPS flag")
    pread(uop(0, 0, 2), d);

    // URT interrupts and vector
    pwrite(uop(7), 8'hFF); pwrite(uop(8), 8'hFF);
    urt_rxrdy = 8'b0010_0000; urt_txrdy = 8'b0000_0100; #1;
    `CHK(p_int_req, "URT interrupt")
    @(negedge clk); p_int_ack = 1; @(negedge clk); p_int_ack = 0;
    pread(uop(2), d); `CHK(d == 8'd5, "receiver 5 has priority over transmitters") n_urt_int++;
    urt_rxrdy = 0; pwrite(uop(11), 0);
    @(negedge clk); p_int_ack = 1; @(negedge clk); p_int_ack = 0;
    pread(uop(2), d); `CHK(d == 8'd10, "transmitter 2 next") n_urt_int++;
    urt_txrdy = 0; pwrite(uop(11), 0);
    // URT register access through the micro-operation region
    pwrite(uop(12), 8'd3); @(negedge clk); p_addr = uop(13); p_wr = 1; #1;
    `CHK(urt_cs == 8'b0000_1000 && urt_wr && !urt_cd, "URT 3 data write select");
    @(negedge clk); p_wr = 0;

    // line clocks and loopback
    pwrite(uop(4), 8'd9); pwrite(uop(5), 8'd0);   // divisor 9
    pwrite(uop(6), {3'd0, 3'd1, 2'(CLK_ASYNC)});
    pwrite(uop(6), {3'd0, 3'd2, 2'(CLK_SYNC)});
    pwrite(uop(6), {3'd0, 3'd3, 2'(CLK_LOOPBACK)});
    t0 = n_baud; repeat (100) @(negedge clk); `CHK(n_baud - t0 == 10, $sformatf("baud ticks %0d", n_baud - t0))
    t0 = n_sync_clk; for (int i = 0; i < 10; i++) begin m_txc[2] = 1; repeat (3) @(negedge clk); m_txc[2] = 0; repeat (3) @(negedge clk); end
    `CHK(n_sync_clk - t0 == 10, "sync clock pulses follow modem clock")
    urt_txd[3] = 0; urt_rts[3] = 1; urt_dtr[3] = 1; repeat (3) @(negedge clk);
    `CHK(urt_rxd[3] == 0 && urt_cts[3] && urt_dsr[3] && m_txd[3] && !m_rts[3], "line 3 loopback") n_loopback++;
    m_dcd[4] = 1; repeat (3) @(negedge clk);
    `CHK(dut.m_change[4], "carrier change flagged")
    pwrite(uop(12), 8'd4); pread(uop(15), d); `CHK(d[3] == 1'b1, "carrier status read")
    pwrite(uop(15), 0); `CHK(!dut.m_change[4], "change flag cleared")

    // fail-soft: the monitored set stops producing enables, then recovers
    for (int k = 0; k < 3; k++) begin repeat (12 * 1000) @(negedge clk); fs_enable = 1; @(negedge clk); fs_enable = 0; end
    `CHK(!fs_failed, "set running after correct windows")
    while (!fs_failed) @(negedge clk);
    `CHK(fs_takeover && fs_cause == 2'b10 && fs_int, "missing enables: takeover") n_fs_fail++;
    for (int k = 0; k < 4; k++) begin repeat (12 * 1000) @(negedge clk); fs_enable = 1; @(negedge clk); fs_enable = 0; end
    `CHK(!fs_failed && !fs_takeover, "set recovered") n_fs_recover++;
    fs_manual = 1; #1 `CHK(fs_takeover && !fs_failed, "manual takeover") n_fs_manual++;
    fs_manual = 0; fs_self_fail = 1; #1 `CHK(fs_takeover && !fs_failed, "self-imposed takeover") n_fs_self++;
    fs_self_fail = 0; #1 `CHK(!fs_takeover, "takeover released")

    // time-multiplexed input into chained IOC blocks
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); ioc_push = 1; ioc_in.addr = 18'(20000 + k * 100); ioc_in.len = 12'd4; @(negedge clk); ioc_push = 0;
    end
    begin
      logic [7:0] frame [$]; int hb = 0;
      for (int p = 0; p < 4; p++) begin
        frame.push_back(p == 2 ? 8'h00 : CODE_IDLE);
        if (p == 2) frame.push_back(CODE_IDLE);
        for (int c = 0; c < 12; c++) frame.push_back(c == p ? 8'h41 + 8'(p) : c == 7 ? 8'h42 : c == 9 && p == 1 ? CODE_BREAK : CODE_IDLE);
      end
      foreach (frame[i]) begin
        @(negedge clk); tdi_valid = 1; tdi_byte = frame[i]; @(negedge clk); tdi_valid = 0; #1;
        if (host_wr) begin
          `CHK(host_addr == 18'(20000 + (hb / 4) * 100 + hb % 4), "host byte address from IOC chain") hb++; n_host++;
        end
        if (ctl_valid) begin `CHK(ctl_byte == CODE_BREAK && ctl_chan == 9, "break to control block") n_ctl++; end
      end
    end
    `CHK(n_frame_err == 1, "framing error and resync")
    // time-multiplexed output with idle fill
    @(negedge clk); tdo_push = 1; tdo_chan = 4'd3; tdo_byte_in = 8'h51; @(negedge clk); tdo_push = 0;
    begin
      int got = 0;
      for (int i = 0; i < 26; i++) begin
        @(negedge clk); tdo_ready = 1; #1;
        if (!tdo_sync && !tdo_fill) begin `CHK(tdo_byte == 8'h51 && dut.tdo_chan_out == 3, "queued byte in its slot") got++; end
        @(posedge clk); #1 tdo_ready = 0;
      end
      `CHK(got == 1, "one data byte, the rest idle")
    end
    // transparent text: encoder looped into decoder
    begin
      logic [7:0] body [$]; logic [7:0] rx [$];
      body = '{8'h10, 8'h55, 8'h10, 8'h10, 8'h03};
      fork
        begin
          @(negedge clk); tte_valid = 1; tte_cmd = 1; tte_byte = 0; #1; while (!tte_ready) begin @(negedge clk); #1; end
          foreach (body[i]) begin @(negedge clk); tte_cmd = 0; tte_byte = body[i]; #1; while (!tte_ready) begin @(negedge clk); #1; end end
          @(negedge clk); tte_cmd = 2; #1; while (!tte_ready) begin @(negedge clk); #1; end
          @(negedge clk); tte_valid = 0;
        end
        repeat (40) begin @(posedge clk); if (ttd_out_valid && ttd_out_transparent) rx.push_back(ttd_out); end
      join
      `CHK(rx.size() == body.size(), $sformatf("transparent body length %0d", rx.size()))
      foreach (body[i]) if (i < rx.size()) `CHK(rx[i] == body[i], "transparent byte")
      n_stuff = int'(dut.tte_stuffed);
    end
    // synchronous messages: framer looped into receiver; the second copy
    // has one text byte corrupted on the line
    for (int k = 0; k < 2; k++) begin
      logic [7:0] msg [$];
      msg = '{8'h48, 8'h45, 8'h4c, 8'h4c, 8'h4f};
      foreach (msg[i]) begin
        @(negedge clk); smt_valid = 1; smt_byte = msg[i]; smt_last = i == msg.size() - 1;
        sm_flip = (k == 1 && i == 2) ? 8'h01 : 8'h00;
        #1; while (!smt_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk); smt_valid = 0; sm_flip = 8'h00;
      repeat (12) @(negedge clk);
    end
    `CHK(n_msg_ok == 1 && n_msg_bad == 1, $sformatf("message checkword good %0d bad %0d", n_msg_ok, n_msg_bad))
    `CHK(n_msg_bytes == 10, $sformatf("message text bytes received %0d", n_msg_bytes))

    // every mechanism occurred
    `CHK(n_rom > 0 && n_ram > 0, "local memory")
    `CHK(n_wait_clocks > 0, "processor wait for the bus")
    `CHK(n_access_err > 0, "DMA-disabled refusal")
    `CHK(n_abs > 0 && n_reloc > 0, "absolute and relocatable references")
    `CHK(n_contention > 0, "bus contention")
    `CHK(n_ilk_acquire > 0 && n_ilk_busy > 0 && n_ilk_release > 0, "interlock acquire/busy/release")
    `CHK(n_q_c2p > 0 && n_q_p2c > 0, "queues both ways")
    `CHK(n_cps_int > 0 && n_pliu_int > 0 && n_urt_int > 0, "interrupts")
    `CHK(n_loopback > 0 && n_sync_clk > 0 && n_baud > 0, "line clock modes and loopback")
    `CHK(n_fs_fail > 0 && n_fs_recover > 0, "fail-soft takeover and recovery")
    `CHK(n_fs_manual > 0 && n_fs_self > 0, "manual and self-imposed takeover")
    `CHK(n_host > 0 && n_ctl > 0 && n_chain >= 2 && n_frame_err > 0, "input editing and chaining")
    `CHK(n_fill > 0, "output idle fill")
    `CHK(n_stuff > 0 && n_tt_exit > 0, "DLE doubling and transparent exit")
    `CHK(n_msg_ok > 0 && n_msg_bad > 0, "synchronous message accepted and rejected")
    $display("mechanisms: wait=%0d accerr=%0d contention=%0d ilk acq/busy/rel=%0d/%0d/%0d q=%0d/%0d int cps/pliu/urt=%0d/%0d/%0d loop=%0d sync=%0d baud=%0d fs=%0d/%0d/%0d/%0d host=%0d ctl=%0d chain=%0d ferr=%0d fill=%0d stuff=%0d ttexit=%0d msg ok/bad=%0d/%0d",
      n_wait_clocks, n_access_err, n_contention, n_ilk_acquire, n_ilk_busy, n_ilk_release, n_q_c2p, n_q_p2c,
      n_cps_int, n_pliu_int, n_urt_int, n_loopback, n_sync_clk, n_baud, n_fs_fail, n_fs_recover, n_fs_manual, n_fs_self, n_host, n_ctl,
      n_chain, n_frame_err, n_fill, n_stuff, n_tt_exit, n_msg_ok, n_msg_bad);
    `DONE
  end
  localparam logic [5:0] PIO_DEV0 = 6'o40, PIO_DEV1 = 6'o41;
  assign ttd_valid = tte_out_valid && tte_out_ready;
  assign ttd_byte  = tte_out;
  assign smr_valid = smt_out_valid && smt_out_ready;
  assign smr_byte  = smt_out ^ (smt_ready ? sm_flip : 8'h00);
endmodule
