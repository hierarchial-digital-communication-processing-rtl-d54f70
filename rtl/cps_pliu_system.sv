// cps_pliu_system: one programmable line interface unit (PLIU) on the
// time-multiplexed bus of a communications processing system (CPS).
//
// The CPS (a PDP-8 class processor with up to 256k 12-bit words) shares its
// memory with up to eighteen PLIUs over one multiplexer bus. Each PLIU has
// its own 8-bit microprocessor, local ROM and RAM, eight URTs with their
// EIA interfaces, and does the byte-by-byte work on the data streams so the
// CPS does not have to. This top holds one PLIU in full and the shared parts
// it talks to:
//   - PLIU internals: address decode, micro-operation decode, status flags,
//     PDP-8 I/O decode, DMA decode, DMA request control, bus buffer, address
//     and control multiplexer, data buffer, URT clocks, eight EIA line
//     interfaces, interrupt logic, local RAM.
//   - Two interlock-free queues carrying CPS-to-PLIU and PLIU-to-CPS bytes.
//   - The bus arbiter (requester 0 is the CPS, 1 this PLIU, 2.. the other
//     PLIUs, whose requests and bus words are ports) and the interlock memory.
//   - The common-memory slave side of the bus; the CPS memory array itself
//     is outside (cm_* ports).
//   - The fail-soft window monitor of the CPS set.
//   - The line-discipline engines a PLIU applies to its streams: data block
//     chaining (ioc_chain), time-multiplexed input editing and output
//     multiplexing, transparent-text encoding and decoding, synchronous
//     message framing and checking. Their byte
//     streams come from and go to the URTs, which are outside (ports).
// The microprocessor, ROM and URT chips are outside too: their buses are
// ports. A slot on the bus is three clocks: control word, address word,
// data word (see pliu_pkg::phase_e).
//
// Micro-operation register map (set C, address bits 11:8), this design's:
//   1 W push byte to PLIU->CPS queue      R pop byte from CPS->PLIU queue
//   2 W relocation page register          R interrupt vector
//   3 W high 4 bits of write data         R high 4 bits of last read
//   4 W baud divisor low byte             R CPS cps_mbox register
//   5 W baud divisor high nibble, load    R queue flags {.., c2p_empty, p2c_full}
//   6 W line clock mode {line, mode}      R pending interrupts [7:0]
//   7..10 W interrupt mask bytes 0..3
//   11 W end of interrupt
//   12 W line select                      R line select
//   13 W/R URT data of the selected line  (urt_* ports)
//   14 W/R URT command/status of selected line
//   15 W clear modem change flag of the selected line
//                                          R modem status of the selected line
// Reads of the micro-operation region return test_out on bit 0 unless a
// register is read. A CPS DMA command (dma_decode) addressed to the PLIU:
// write data pushes the data word's low byte into the CPS->PLIU queue, read
// data returns and pops the PLIU->CPS queue head, write control loads the
// cps_mbox, read status returns {queue flags, status flags}, attention sets
// the CPS-to-PLIU flag.
module cps_pliu_system
  import pliu_pkg::*;
#(
  parameter int unsigned NOTHER     = 17,    // other PLIUs on the bus
  parameter logic [4:0]  PLIU_ID    = 5'd1,
  parameter logic [5:0]  PIO_DEV    = 6'o40,
  parameter int unsigned QDEPTH     = 16,    // CPS<->PLIU queue depth
  parameter int unsigned ILK_CELLS  = 4096,
  parameter int unsigned TDM_NCH    = 12,
  parameter int unsigned FS_TICK    = 1000
) (
  input  logic        clk, rst_n,
  // PLIU microprocessor bus
  input  logic [15:0] p_addr,
  input  logic [7:0]  p_wdata,
  input  logic        p_rd, p_wr,
  output logic [7:0]  p_rdata,
  output logic        p_wait,
  output logic        p_int_req,
  input  logic        p_int_ack,
  // local ROM
  output logic        rom_cs,
  output logic [11:0] rom_addr,
  input  logic [7:0]  rom_data,
  // URT chips (eight)
  output logic [7:0]  urt_cs,
  output logic        urt_cd,          // 1: command/status, 0: data
  output logic        urt_rd, urt_wr,
  output logic [7:0]  urt_wdata,
  input  logic [7:0]  urt_rdata,
  input  logic [7:0]  urt_rxrdy, urt_txrdy,
  input  logic [7:0]  urt_dtr, urt_rts, urt_txd, urt_sup,
  output logic [7:0]  urt_dsr, urt_cts, urt_rxd,
  output logic [7:0]  urt_txc, urt_rxc,
  // EIA modem lines
  output logic [7:0]  m_dtr, m_rts, m_txd, m_sup,
  input  logic [7:0]  m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in,
  input  logic [7:0]  m_txc, m_rxc,
  output logic [7:0]  led [8],
  // CPS programmed I/O
  input  logic [11:0] cps_mb,
  input  logic        cps_iop1, cps_iop2, cps_iop4,
  input  logic [11:0] cps_ac,
  output logic        cps_skip,
  output logic        cps_int,          // PLIU interrupt to the CPS
  // CPS and other PLIUs on the multiplexer bus
  input  logic        cps_req,
  input  logic [11:0] cps_bus,
  input  logic [NOTHER-1:0] oth_req,
  input  logic [11:0] oth_bus,
  output logic [NOTHER+1:0] gnt,
  output phase_e      bus_phase,
  output logic [11:0] mux_bus,
  // CPS common memory
  output logic        cm_rd, cm_wr,
  output logic [17:0] cm_addr,
  output logic [11:0] cm_wdata,
  input  logic [11:0] cm_rdata,
  // fail-soft monitor of this CPS set
  input  logic        fs_enable, fs_int_select, fs_int_clr, fs_manual, fs_self_fail,
  output logic        fs_int, fs_failed, fs_takeover,
  output logic [1:0]  fs_cause,
  // time-multiplexed input editing with block chaining of the host data
  input  logic        tdi_valid,
  input  logic [7:0]  tdi_byte,
  input  logic        ioc_push,
  input  ioc_t        ioc_in,
  output logic        ioc_full,
  output logic        host_wr,
  output logic [17:0] host_addr,
  output logic [7:0]  host_byte,
  output logic [3:0]  host_chan,
  output logic        ioc_expended, ioc_overrun,
  output logic        ctl_valid,
  output logic [7:0]  ctl_byte,
  output logic [3:0]  ctl_chan,
  output logic        tdi_frame_err,
  // time-multiplexed output
  input  logic        tdo_push,
  input  logic [3:0]  tdo_chan,
  input  logic [7:0]  tdo_byte_in,
  output logic        tdo_push_ok,
  input  logic        tdo_ready,
  output logic [7:0]  tdo_byte,
  output logic        tdo_sync, tdo_fill,
  // transparent text
  input  logic        tte_valid,
  input  logic [1:0]  tte_cmd,
  input  logic [7:0]  tte_byte,
  output logic        tte_ready,
  output logic        tte_out_valid,
  output logic [7:0]  tte_out,
  input  logic        tte_out_ready,
  input  logic        ttd_valid,
  input  logic [7:0]  ttd_byte,
  output logic        ttd_out_valid,
  output logic [7:0]  ttd_out,
  output logic        ttd_out_transparent, ttd_out_ctrl,
  // synchronous message transmit (message in, framed line bytes out)
  input  logic        smt_valid,
  input  logic [7:0]  smt_byte,
  input  logic        smt_last,
  output logic        smt_ready,
  output logic        smt_out_valid,
  output logic [7:0]  smt_out,
  input  logic        smt_out_ready,
  // synchronous message receive (line bytes in, message out)
  input  logic        smr_valid,
  input  logic [7:0]  smr_byte,
  output logic        smr_out_valid,
  output logic [7:0]  smr_out,
  output logic        smr_out_ctl, smr_in_msg,
  output logic        smr_done, smr_ok
);
  localparam int unsigned NREQ = NOTHER + 2;

  // ---------------- address and micro-operation decode ----------------
  space_e      space;
  logic        sel_rom, sel_ram, sel_uop, sel_reloc, sel_ilock, sel_abs, common_ref;
  logic [13:0] ram_addr;
  logic [11:0] page_off;
  logic [14:0] abs_addr;
  logic        mem_cycle;
  assign mem_cycle = p_rd || p_wr;

  addr_decode u_adec (.addr(p_addr), .mem_cycle, .space, .sel_rom, .sel_ram, .sel_uop,
    .sel_reloc, .sel_ilock, .sel_abs, .common_ref, .ram_addr, .page_off, .abs_addr);

  logic [15:1] flop_set, flop_reset, test_sel, reg_load, reg_read;
  logic        uop_strobe, p_cyc_q;
  // micro-operations act once, on the first clock of a processor cycle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p_cyc_q <= 1'b0; else p_cyc_q <= mem_cycle;
  assign uop_strobe = sel_uop && !p_cyc_q;

  microop_decode u_uop (.sel(uop_strobe), .wr(p_wr), .addr(page_off), .flop_set,
    .flop_reset, .test_sel, .reg_load, .reg_read);

  // ---------------- status flags and PDP-8 I/O ----------------
  logic dma_enable, pliu_flag, cps_flag, test_out;
  logic [7:0] gp;
  logic pio_flag_clr, pio_ac_load, pio_en_set, pio_en_clr, pio_cps_flag;
  logic dd_attention;

  pdp8_pio_decode #(.DEV(PIO_DEV)) u_pio (.mb(cps_mb), .iop1(cps_iop1), .iop2(cps_iop2),
    .iop4(cps_iop4), .pliu_flag, .skip(cps_skip), .pliu_flag_clr(pio_flag_clr),
    .ac_load(pio_ac_load), .dma_en_set(pio_en_set), .dma_en_clr(pio_en_clr),
    .cps_flag_set(pio_cps_flag));

  status_bits #(.NGP(8)) u_stat (.clk, .rst_n, .cps_dma_en_set(pio_en_set),
    .cps_dma_en_clr(pio_en_clr), .cps_flag_set(pio_cps_flag || dd_attention),
    .cps_pliu_flag_clr(pio_flag_clr), .flop_set, .flop_reset, .test_sel,
    .dma_enable, .pliu_flag, .cps_flag, .gp, .test_out);
  assign cps_int = pliu_flag;

  // ---------------- bus arbiter ----------------
  logic [NREQ-1:0] req;
  logic            bus_busy;
  logic [$clog2(NREQ)-1:0] owner;
  logic            pl_req;
  assign req = {oth_req, pl_req, cps_req};
  mux_bus_arbiter #(.NREQ(NREQ), .SLOT_CLKS(3)) u_arb (.clk, .rst_n, .req, .gnt,
    .busy(bus_busy), .phase(bus_phase), .owner);

  // ---------------- PLIU side of the bus ----------------
  logic pl_drive, pl_capture, pl_done, pl_access_error, pl_capture_q;
  mop_e pl_op;
  logic [17:0] pl_cps_addr;
  logic [11:0] pl_word, wr_word, buf_out, buf_in;
  logic        buf_out_en, buf_in_en;
  logic [5:0]  page_q;
  logic [7:0]  rd_lo;
  logic [3:0]  rd_hi, wr_hi;

  always_comb begin
    if (sel_ilock) pl_op = (p_wr ? MOP_ILK_RESET : MOP_ILK_TEST);
    else           pl_op = (p_wr ? MOP_WRITE : MOP_READ);
  end

  dma_request_ctrl u_dreq (.clk, .rst_n, .common_ref, .dma_enable, .wr(p_wr && !sel_ilock),
    .gnt(gnt[1]), .phase(bus_phase), .mux_req(pl_req), .proc_wait(p_wait), .drive(pl_drive),
    .capture(pl_capture), .done(pl_done), .access_error(pl_access_error));

  dma_addr_ctrl_mux u_amux (.clk, .rst_n, .page_load(reg_load[2]), .page_d(p_wdata[5:0]),
    .space, .abs_addr, .page_off, .op(pl_op), .phase(bus_phase), .cps_addr(pl_cps_addr),
    .word(pl_word), .page_q);

  dma_data_buffer u_dbuf (.clk, .rst_n, .hi_load(reg_load[3]), .hi_d(p_wdata[3:0]),
    .proc_wdata(p_wdata), .wr_word, .rd_capture(pl_capture_q), .rd_word(buf_in),
    .rd_lo, .rd_hi, .wr_hi);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pl_capture_q <= 1'b0; else pl_capture_q <= pl_capture;

  bus_buffer #(.W(12)) u_bbuf (.clk, .rst_n, .out_load(common_ref && p_wr && !pl_drive),
    .out_d(wr_word), .mux_oe(pl_drive && bus_phase == PH_DATA), .mux_out(buf_out),
    .mux_out_en(buf_out_en), .mux_in(mux_bus), .mux_capture(pl_capture), .int_oe(1'b1),
    .int_out(buf_in), .int_out_en(buf_in_en));

  // ---------------- CPS <-> PLIU queues and CPS DMA commands ----------------
  logic dd_hit, dd_wr_data, dd_rd_data, dd_wr_ctrl, dd_rd_status, dd_illegal;
  logic [2:0] dd_line;
  logic [2:0] dcmd_q;    // 1 wr data, 2 rd data, 3 wr ctrl, 4 rd status
  logic c2p_full, c2p_empty, p2c_full, p2c_empty;
  logic [7:0] c2p_head, p2c_head;
  logic [$clog2(QDEPTH):0] c2p_count, p2c_count;
  logic [11:0] cps_mbox;
  logic [11:0] pl_rsp_word;
  logic        pl_rsp_en;

  dma_decode #(.PLIU_ID(PLIU_ID)) u_ddec (.cmd_phase(gnt[0] && bus_phase == PH_CTRL),
    .bus(mux_bus), .hit(dd_hit), .wr_data(dd_wr_data), .rd_data(dd_rd_data),
    .wr_ctrl(dd_wr_ctrl), .rd_status(dd_rd_status), .attention(dd_attention),
    .illegal(dd_illegal), .line(dd_line));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dcmd_q <= '0;
    else if (gnt[0] && bus_phase == PH_CTRL)
      dcmd_q <= dd_wr_data ? 3'd1 : dd_rd_data ? 3'd2 : dd_wr_ctrl ? 3'd3 : dd_rd_status ? 3'd4 : 3'd0;
    else if (!gnt[0]) dcmd_q <= '0;

  logic cps_data_ph;
  assign cps_data_ph = gnt[0] && bus_phase == PH_DATA;

  linked_queue #(.W(8), .DEPTH(QDEPTH)) u_c2p (.clk, .rst_n,
    .push(cps_data_ph && dcmd_q == 3'd1), .push_data(mux_bus[7:0]), .full(c2p_full),
    .pop(uop_strobe && reg_read[1]), .head_data(c2p_head), .empty(c2p_empty), .count(c2p_count));

  linked_queue #(.W(8), .DEPTH(QDEPTH)) u_p2c (.clk, .rst_n,
    .push(uop_strobe && reg_load[1]), .push_data(p_wdata), .full(p2c_full),
    .pop(cps_data_ph && dcmd_q == 3'd2), .head_data(p2c_head), .empty(p2c_empty), .count(p2c_count));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cps_mbox <= '0;
    else if (pio_ac_load) cps_mbox <= cps_ac;
    else if (cps_data_ph && dcmd_q == 3'd3) cps_mbox <= mux_bus;

  // an illegal CPS command is remembered until the next status read
  logic illegal_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) illegal_q <= 1'b0;
    else if (dd_illegal) illegal_q <= 1'b1;
    else if (cps_data_ph && dcmd_q == 3'd4) illegal_q <= 1'b0;

  logic [3:0] qflags;
  assign qflags = {p2c_empty, c2p_full, c2p_empty, p2c_full};
  always_comb begin
    pl_rsp_en = cps_data_ph && (dcmd_q == 3'd2 || dcmd_q == 3'd4);
    unique case (dcmd_q)
      3'd2:    pl_rsp_word = {4'h0, p2c_head};
      3'd4:    pl_rsp_word = {qflags, 1'b0, pl_access_error, illegal_q, 2'b0, dma_enable, cps_flag, pliu_flag};
      default: pl_rsp_word = '0;
    endcase
  end

  // ---------------- common memory and interlock slave ----------------
  mop_e        s_op;
  logic [5:0]  s_ahi;
  logic [17:0] s_addr;
  logic        ilk_rsp_valid, ilk_rsp_bit;
  logic [ID_W-1:0] ilk_rsp_id;
  logic        mem_slot, ilk_op;

  assign mem_slot = bus_busy && !gnt[0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin s_op <= MOP_READ; s_ahi <= '0; s_addr <= '0; end
    else if (mem_slot && bus_phase == PH_CTRL) begin s_op <= mop_e'(mux_bus[11:10]); s_ahi <= mux_bus[5:0]; end
    else if (mem_slot && bus_phase == PH_ADDR) s_addr <= {s_ahi, mux_bus};

  assign ilk_op = s_op == MOP_ILK_TEST || s_op == MOP_ILK_RESET;

  interlock_memory #(.CELLS(ILK_CELLS)) u_ilk (.clk, .rst_n,
    .req(mem_slot && bus_phase == PH_ADDR && ilk_op),
    .op_reset(s_op == MOP_ILK_RESET), .addr(mux_bus[$clog2(ILK_CELLS)-1:0]), .id(ID_W'(owner)),
    .rsp_valid(ilk_rsp_valid), .rsp_bit(ilk_rsp_bit), .rsp_id(ilk_rsp_id));

  assign cm_addr  = s_addr;
  assign cm_wdata = mux_bus;
  assign cm_rd    = mem_slot && bus_phase == PH_DATA && s_op == MOP_READ;
  assign cm_wr    = mem_slot && bus_phase == PH_DATA && s_op == MOP_WRITE;

  // ---------------- the multiplexer bus: OR of the active drivers ----------------
  logic [NOTHER-1:0] oth_gnt;
  assign oth_gnt = gnt[NREQ-1:2];
  logic [11:0] drv_cps, drv_rsp, drv_pl, drv_buf, drv_oth, drv_cm, drv_ilk;
  assign drv_cps = (gnt[0] && !pl_rsp_en) ? cps_bus : '0;
  assign drv_rsp = pl_rsp_en ? pl_rsp_word : '0;
  assign drv_pl  = (pl_drive && bus_phase != PH_DATA) ? pl_word : '0;
  assign drv_buf = buf_out_en ? buf_out : '0;
  assign drv_oth = ((|oth_gnt) && !(bus_phase == PH_DATA && (s_op == MOP_READ || ilk_op))) ? oth_bus : '0;
  assign drv_cm  = cm_rd ? cm_rdata : '0;
  assign drv_ilk = (mem_slot && bus_phase == PH_DATA && ilk_op && ilk_rsp_valid)
                   ? {ilk_rsp_bit, 6'd0, ilk_rsp_id} : '0;
  assign mux_bus = drv_cps | drv_rsp | drv_pl | drv_buf | drv_oth | drv_cm | drv_ilk;

  // ---------------- URT clocks and EIA lines ----------------
  clk_mode_e  lmode [8];
  logic [7:0] div_lo;
  logic [2:0] line_sel;
  logic [7:0] m_change;
  logic [4:0] m_status [8];
  logic       tick;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_lo <= '0; line_sel <= '0;
      for (int i = 0; i < 8; i++) lmode[i] <= CLK_ASYNC;
    end else if (uop_strobe) begin
      if (reg_load[4])  div_lo <= p_wdata;
      if (reg_load[6])  lmode[p_wdata[4:2]] <= clk_mode_e'(p_wdata[1:0]);
      if (reg_load[12]) line_sel <= p_wdata[2:0];
    end

  urt_clock #(.NLINES(8), .DIV_W(12)) u_clk (.clk, .rst_n, .div_load(uop_strobe && reg_load[5]),
    .div_d({p_wdata[3:0], div_lo}), .mode(lmode), .ext_txc(m_txc), .ext_rxc(m_rxc),
    .txc_en(urt_txc), .rxc_en(urt_rxc), .tick);

  for (genvar i = 0; i < 8; i++) begin : g_line
    eia_line u_line (.clk, .rst_n, .loopback(lmode[i] == CLK_LOOPBACK),
      .urt_dtr(urt_dtr[i]), .urt_rts(urt_rts[i]), .urt_txd(urt_txd[i]), .urt_sup(urt_sup[i]),
      .urt_dsr(urt_dsr[i]), .urt_cts(urt_cts[i]), .urt_rxd(urt_rxd[i]),
      .m_dtr(m_dtr[i]), .m_rts(m_rts[i]), .m_txd(m_txd[i]), .m_sup(m_sup[i]),
      .m_dsr(m_dsr[i]), .m_cts(m_cts[i]), .m_rxd(m_rxd[i]), .m_ri(m_ri[i]), .m_dcd(m_dcd[i]),
      .m_sup_in(m_sup_in[i]), .status(m_status[i]), .change(m_change[i]),
      .change_clr(uop_strobe && reg_load[15] && line_sel == 3'(i)), .led(led[i]));
  end

  assign urt_cs    = (sel_uop && (reg_load[13] || reg_read[13] || reg_load[14] || reg_read[14]))
                     ? (8'd1 << line_sel) : 8'd0;
  assign urt_cd    = reg_load[14] || reg_read[14];
  assign urt_rd    = p_rd && (reg_read[13] || reg_read[14]);
  assign urt_wr    = p_wr && (reg_load[13] || reg_load[14]);
  assign urt_wdata = p_wdata;

  // ---------------- interrupts ----------------
  logic [24:0] isrc, ipend, imask;
  logic [4:0]  ivec;
  logic        iserv;
  assign isrc = {cps_flag, m_change, urt_txrdy, urt_rxrdy};
  interrupt_logic #(.NSRC(25)) u_int (.clk, .rst_n, .src(isrc),
    .mask_load({4{uop_strobe}} & reg_load[10:7]), .mask_d(p_wdata), .int_ack(p_int_ack),
    .eoi(uop_strobe && reg_load[11]), .int_req(p_int_req), .vector(ivec), .in_service(iserv),
    .pending(ipend), .mask(imask));

  // ---------------- local memory, ROM and read data ----------------
  logic [7:0] ram_rdata, uop_rdata;
  local_memory #(.BANKS(4), .BANK_WORDS(4096)) u_ram (.clk, .cs(sel_ram), .we(p_wr),
    .addr(ram_addr), .wdata(p_wdata), .rdata(ram_rdata));

  assign rom_cs   = sel_rom;
  assign rom_addr = page_off;

  always_comb begin
    uop_rdata = {7'd0, test_out};
    if (reg_read[1])  uop_rdata = c2p_head;
    if (reg_read[2])  uop_rdata = {3'd0, ivec};
    if (reg_read[3])  uop_rdata = {4'd0, rd_hi};
    if (reg_read[4])  uop_rdata = cps_mbox[7:0];
    if (reg_read[5])  uop_rdata = {4'd0, qflags};
    if (reg_read[6])  uop_rdata = ipend[7:0];
    if (reg_read[12]) uop_rdata = {5'd0, line_sel};
    if (reg_read[13] || reg_read[14]) uop_rdata = urt_rdata;
    if (reg_read[15]) uop_rdata = {3'd0, m_status[line_sel]};
  end

  always_comb begin
    unique case (space)
      SP_ROM:  p_rdata = rom_data;
      SP_RAM:  p_rdata = ram_rdata;
      SP_UOP:  p_rdata = uop_rdata;
      default: p_rdata = rd_lo;
    endcase
  end

  // ---------------- fail-soft monitor ----------------
  logic [7:0] fs_count;
  failsoft_monitor #(.TICK_DIV(FS_TICK)) u_fs (.clk, .rst_n, .enable(fs_enable),
    .int_select(fs_int_select), .int_clr(fs_int_clr), .manual(fs_manual),
    .self_fail(fs_self_fail), .fault_int(fs_int), .cause(fs_cause),
    .failed(fs_failed), .takeover(fs_takeover), .fault_count(fs_count));

  // ---------------- line-discipline engines ----------------
  logic       h_valid;
  logic       ioc_active;
  logic [3:0] ioc_queued;
  logic [15:0] tdi_idles, tdo_fills, tte_stuffed;
  logic       tdi_in_sync;
  logic [3:0] tdo_chan_out;
  logic       tte_transparent, ttd_transparent, ttd_entered, ttd_exited;

  tdm_input_editor #(.NCH(TDM_NCH)) u_tdi (.clk, .rst_n, .in_valid(tdi_valid), .in_byte(tdi_byte),
    .host_valid(h_valid), .host_byte, .host_chan, .ctl_valid, .ctl_byte, .ctl_chan,
    .frame_err(tdi_frame_err), .in_sync(tdi_in_sync), .idle_count(tdi_idles));

  ioc_chain #(.DEPTH(4)) u_ioc (.clk, .rst_n, .ioc_push, .ioc_in, .queue_full(ioc_full),
    .xfer(h_valid), .active(ioc_active), .xfer_addr(host_addr), .expended(ioc_expended),
    .overrun(ioc_overrun), .queued(ioc_queued[2:0]));
  assign ioc_queued[3] = 1'b0;
  assign host_wr = h_valid && ioc_active;

  tdm_output_mux #(.NCH(TDM_NCH), .QDEPTH(8)) u_tdo (.clk, .rst_n, .push(tdo_push),
    .push_chan(tdo_chan), .push_byte(tdo_byte_in), .push_ok(tdo_push_ok), .out_ready(tdo_ready),
    .out_byte(tdo_byte), .out_sync(tdo_sync), .out_chan(tdo_chan_out), .out_is_fill(tdo_fill),
    .fill_count(tdo_fills));

  tt_encoder u_tte (.clk, .rst_n, .in_valid(tte_valid), .in_cmd(tte_cmd), .in_byte(tte_byte),
    .in_ready(tte_ready), .out_valid(tte_out_valid), .out_byte(tte_out), .out_ready(tte_out_ready),
    .transparent(tte_transparent), .stuffed(tte_stuffed));

  tt_decoder u_ttd (.clk, .rst_n, .in_valid(ttd_valid), .in_byte(ttd_byte),
    .out_valid(ttd_out_valid), .out_byte(ttd_out), .out_transparent(ttd_out_transparent),
    .out_ctrl(ttd_out_ctrl), .transparent(ttd_transparent), .entered(ttd_entered),
    .exited(ttd_exited));

  sync_msg_tx u_smt (.clk, .rst_n, .in_valid(smt_valid), .in_byte(smt_byte), .in_last(smt_last),
    .in_ready(smt_ready), .out_valid(smt_out_valid), .out_byte(smt_out), .out_ready(smt_out_ready));

  sync_msg_rx u_smr (.clk, .rst_n, .in_valid(smr_valid), .in_byte(smr_byte),
    .out_valid(smr_out_valid), .out_byte(smr_out), .out_ctl(smr_out_ctl), .in_msg(smr_in_msg),
    .msg_done(smr_done), .msg_ok(smr_ok));
endmodule
