// tb_rv_virt_platform: end-to-end test of the whole interrupt/timer platform
// at its default size (six harts, one guest external line per hart, two
// external interrupts, four injection blocks of four registers).
//
// The testbench plays the role of the six harts' pipelines and of the
// software: it programs the CLINT, PLIC and latency timer through the MMIO
// port, moves harts into VS mode with mret and takes the interrupts that the
// hart CSR units report. Each mechanism is counted and the test fails any
// mechanism that never happened:
//   M_TIMER     CLINT mtimecmp  -> hart 0 machine timer trap
//   M_SOFT      CLINT msip      -> hart 3 machine software trap
//   HS_TIMER    CLINT stimecmp  -> hart 2 supervisor timer trap (no SBI call)
//   VS_TIMER    CLINT vstimecmp + htimedelta -> hart 1 guest timer trap
//   DIRECT_INJ  device line -> PLIC VS context -> hgeip -> hart 4 guest
//               external trap, claimed and completed by the guest
//   VIRT_INJ    VIIR write by the hypervisor -> hart 5 guest external trap,
//               claimed (in flight) and completed by the guest
//   SGEI        guest line enabled in hgeie -> hart 4 HS trap (cause 12)
//   LAT_TIMER   latency timer -> PLIC source 3 -> hart 0 machine external
//               trap; latency read by the handler, twice (auto-restart)
//   MGMT_IRQ    bad complete in an injection block -> management source ->
//               hart 0 supervisor external line
//   GUEST_TRAP  illegal instruction in a guest delegated to VS mode
//   NESTED_XLATE  hart 3's walker translates a guest virtual address through
//               VS stage (vsatp) and G stage (hgatp) written by its CSR unit
//   GUEST_PF    a G-stage miss reported by the walker, taken by the hart's
//               trap unit with the guest physical address in mtval2
//   TLB_HIT     a repeated guest access served by hart 3's TLB without a walk
//   HFENCE      hfence empties the guest entries, so the access walks again
// A small memory model answers the walkers' page-table reads one cycle after
// the request.
// No #() overrides: this also serves as the full-size test of the top.
module tb_rv_virt_platform;
  import hv_pkg::*;

  localparam int NH = 6;

  logic clk = 0, rst_n = 0, rtc_tick = 0;
  logic [2:1] ext_irq = '0;
  logic        mmio_valid = 0, mmio_write = 0;
  logic [31:0] mmio_addr = '0;
  logic [63:0] mmio_wdata = '0, mmio_rdata;
  logic [7:0]  mmio_wstrb = '0;
  core_req_t [NH-1:0] core_req;
  core_rsp_t [NH-1:0] core_rsp;
  core_rsp_t rs;
  logic [NH-1:0][63:0] satp, vsatp, hgatp;
  logic [NH-1:0] hart_msip, hart_mtip, hart_stip, hart_vstip, hart_meip, hart_seip;
  logic [NH-1:0][1:1] hart_geip;
  logic [63:0] mtime;
  logic [NH-1:0]       xlate_req_valid, xlate_req_ready, xlate_virt, xlate_user;
  logic [NH-1:0]       xlate_sfence, xlate_hfence, xlate_hit;
  logic [NH-1:0][63:0] xlate_vaddr, xlate_gpa, ptw_mem_rsp_data;
  logic [NH-1:0][1:0]  xlate_acc;
  logic [NH-1:0]       xlate_resp_valid, xlate_fault, xlate_gva;
  logic [NH-1:0][55:0] xlate_paddr, ptw_mem_req_addr;
  logic [NH-1:0][5:0]  xlate_cause;
  logic [NH-1:0]       ptw_mem_req_valid, ptw_mem_req_ready, ptw_mem_rsp_valid;

  rv_virt_platform dut (
    .clk, .rst_n, .rtc_tick, .ext_irq,
    .mmio_valid, .mmio_write, .mmio_addr, .mmio_wdata, .mmio_wstrb, .mmio_rdata,
    .core_req, .core_rsp, .satp, .vsatp, .hgatp,
    .hart_msip, .hart_mtip, .hart_stip, .hart_vstip, .hart_meip, .hart_seip,
    .hart_geip, .mtime,
    .xlate_req_valid, .xlate_req_ready, .xlate_vaddr, .xlate_acc, .xlate_virt, .xlate_user,
    .xlate_sfence, .xlate_hfence,
    .xlate_resp_valid, .xlate_paddr, .xlate_fault, .xlate_cause, .xlate_gpa, .xlate_gva, .xlate_hit,
    .ptw_mem_req_valid, .ptw_mem_req_ready, .ptw_mem_req_addr, .ptw_mem_rsp_valid, .ptw_mem_rsp_data
  );

  // page-table memory: 128 KiB, one-cycle read latency for every walker;
  // n_ptw counts hart 3's reads
  int n_ptw;
  always @(posedge clk) if (ptw_mem_req_valid[3]) n_ptw++;
  logic [63:0] pmem [16384];
  assign ptw_mem_req_ready = '1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptw_mem_rsp_valid <= '0;
      ptw_mem_rsp_data  <= '0;
    end else begin
      for (int h = 0; h < NH; h++) begin
        ptw_mem_rsp_valid[h] <= ptw_mem_req_valid[h];
        ptw_mem_rsp_data[h]  <= pmem[ptw_mem_req_addr[h][16:3]];
      end
    end
  end

  function automatic logic [63:0] pte(logic [43:0] ppn, logic [7:0] f);
    return {10'd0, ppn, 2'b00, f};
  endfunction

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {M_TIMER, M_SOFT, HS_TIMER, VS_TIMER, DIRECT_INJ, VIRT_INJ,
                    SGEI, LAT_TIMER, MGMT_IRQ, GUEST_TRAP, NESTED_XLATE, GUEST_PF, TLB_HIT, HFENCE,
                    NMECH} mech_e;
  int count [NMECH];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ MMIO access
  localparam logic [31:0] CLINT = 32'h0200_0000, PLIC = 32'h0C00_0000, TMR = 32'h2200_0000;

  task automatic mw(logic [31:0] a, logic [63:0] d);
    @(negedge clk);
    mmio_valid = 1; mmio_write = 1; mmio_addr = a; mmio_wdata = d; mmio_wstrb = 8'hFF;
    @(negedge clk);
    mmio_valid = 0; mmio_write = 0;
  endtask

  task automatic mr(logic [31:0] a, output logic [63:0] d);
    @(negedge clk);
    mmio_valid = 1; mmio_write = 0; mmio_addr = a;
    #1 d = mmio_rdata;
    @(negedge clk);
    mmio_valid = 0;
  endtask

  // 32-bit PLIC register: data replicated on both lanes for writes,
  // the addressed lane returned for reads
  task automatic pw(logic [27:0] off, logic [31:0] d);
    mw(PLIC + 32'(off), {d, d});
  endtask

  task automatic pr(logic [27:0] off, output logic [31:0] d);
    logic [63:0] x;
    mr(PLIC + 32'(off), x);
    d = off[2] ? x[63:32] : x[31:0];
  endtask

  function automatic int ctx(int h, int k); return 3 * h + k; endfunction  // k: 0 M, 1 S, 2 VS
  function automatic logic [27:0] p_enable(int c); return 28'('h2000 + 'h80 * c); endfunction
  function automatic logic [27:0] p_thresh(int c); return 28'('h200000 + 'h1000 * c); endfunction
  function automatic logic [27:0] p_claim(int c);  return 28'('h200004 + 'h1000 * c); endfunction

  // ---------------------------------------------------------- hart events
  task automatic step(int h, core_req_t q);
    @(negedge clk);
    core_req[h] = q;
    #1 rs = core_rsp[h];
    @(negedge clk);
    core_req[h] = '0;
  endtask

  task automatic csrw(int h, logic [11:0] a, logic [63:0] d);
    core_req_t q = '0;
    q.csr = 1; q.csr_op = CSR_OP_WRITE; q.csr_addr = a; q.csr_wdata = d;
    step(h, q);
  endtask

  task automatic csrr(int h, logic [11:0] a, output logic [63:0] d);
    core_req_t q = '0;
    q.csr = 1; q.csr_op = CSR_OP_READ; q.csr_addr = a;
    step(h, q);
    d = rs.csr_rdata;
  endtask

  // from M mode, set up vectors and delegation and enter (p, v)
  task automatic boot(int h, logic [1:0] p, bit v, logic [63:0] mie, bit sie, bit vsie);
    core_req_t q = '0;
    csrw(h, CSR_MTVEC, 64'h100);
    csrw(h, CSR_STVEC, 64'h200);
    csrw(h, CSR_VSTVEC, 64'h300);
    csrw(h, CSR_MIDELEG, 64'h0222);
    csrw(h, CSR_HIDELEG, 64'h0444);
    csrw(h, CSR_MEDELEG, 64'(1) << EXC_ILLEGAL);
    csrw(h, CSR_HEDELEG, 64'(1) << EXC_ILLEGAL);
    csrw(h, CSR_HSTATUS, 64'(1) << HS_VGEIN);
    csrw(h, CSR_VSSTATUS, 64'(vsie) << MS_SIE);
    csrw(h, CSR_MIE, mie);
    csrw(h, CSR_MSTATUS, (64'(p) << MS_MPP) | (64'(v) << MS_MPV) | (64'(sie) << MS_SIE));
    csrw(h, CSR_MEPC, 64'h1000);
    q.mret = 1;
    step(h, q);
    check($sformatf("hart %0d priv after boot", h), 64'(core_rsp[h].priv), 64'(p));
    check($sformatf("hart %0d V after boot", h), 64'(core_rsp[h].virt), 64'(v));
  endtask

  // wait until hart h reports a pending interrupt, take it, read the cause
  task automatic take(int h, logic [11:0] cause_csr, output logic [63:0] cause, input int limit = 2000);
    core_req_t q = '0;
    int n = 0;
    while (!core_rsp[h].irq_pending && n < limit) begin @(negedge clk); n++; end
    q.take_irq = 1; q.pc = 64'h1000;
    step(h, q);
    if (!rs.trap) cause = '1;
    else csrr(h, cause_csr, cause);
  endtask

  task automatic xret(int h, bit m);
    core_req_t q = '0;
    q.mret = m; q.sret = !m;
    step(h, q);
  endtask

  task automatic ticks(int n);
    repeat (n) begin @(negedge clk); rtc_tick = 1; @(negedge clk); rtc_tick = 0; end
  endtask

  localparam logic [63:0] INT = 64'h8000_0000_0000_0000;
  logic [63:0] v, t, lat;
  logic [31:0] w;
  int meip_rise_time;

  // time of the latency timer at the first clock where hart 0 sees meip
  always @(posedge clk) if (hart_meip[0] && meip_rise_time < 0) meip_rise_time = int'(dut.u_timer.time_q);

  initial begin
    core_req = '0;
    meip_rise_time = 0;
    xlate_req_valid = '0; xlate_vaddr = '0; xlate_acc = '0; xlate_virt = '0; xlate_user = '0;
    xlate_sfence = '0; xlate_hfence = '0;
    for (int i = 0; i < 16384; i++) pmem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // all compare registers start at 0: park them far in the future
    for (int h = 0; h < NH; h++) begin
      mw(CLINT + 32'h4000 + 32'(8 * h), '1);
      mw(CLINT + 32'hC000 + 32'(8 * h), '1);
      mw(CLINT + 32'h1C000 + 32'(8 * h), '1);
    end
    check("no timer lines", 64'({hart_mtip, hart_stip, hart_vstip}), 0);

    // --------------------------------------------- hart 0: machine timer
    boot(0, PRV_M, 0, 64'h0880, 0, 0);      // MTIE MEIE
    csrw(0, CSR_MSTATUS, 64'(1) << MS_MIE);
    mr(CLINT + 32'hBFF8, t);
    mw(CLINT + 32'h4000, t + 5);
    ticks(4);
    check("mtip before compare", 64'(hart_mtip[0]), 0);
    ticks(1);
    take(0, CSR_MCAUSE, v);
    check("hart 0 machine timer", v, INT | 7);
    if (v == (INT | 7)) count[M_TIMER]++;
    mw(CLINT + 32'h4000, '1);
    xret(0, 1);                             // mret: MIE back on

    // --------------------------------------------- hart 3: software interrupt
    boot(3, PRV_S, 0, 64'h0008, 0, 0);      // MSIE
    mw(CLINT + 32'h8, 64'h0000_0001_0000_0000);   // msip[3]: word 1, upper lane
    take(3, CSR_MCAUSE, v);
    check("hart 3 machine software", v, INT | 3);
    if (v == (INT | 3)) count[M_SOFT]++;
    mw(CLINT + 32'h8, 0);

    // --------------------------------------------- hart 2: HS timer
    boot(2, PRV_S, 0, 64'h0020, 1, 0);      // STIE, sstatus.SIE
    mr(CLINT + 32'hBFF8, t);
    mw(CLINT + 32'hC000 + 32'(8 * 2), t + 3);
    ticks(3);
    take(2, CSR_SCAUSE, v);
    check("hart 2 supervisor timer", v, INT | 5);
    check("hart 2 handled in HS", 64'({core_rsp[2].priv, core_rsp[2].virt}), {PRV_S, 1'b0});
    if (v == (INT | 5)) count[HS_TIMER]++;
    mw(CLINT + 32'hC000 + 32'(8 * 2), '1);

    // --------------------------------------------- hart 1: VS timer with delta
    boot(1, PRV_S, 1, 64'h0040, 0, 1);      // VSTIE, vsstatus.SIE
    mw(CLINT + 32'h24000 + 32'(8 * 1), 64'd1_000_000);
    mr(CLINT + 32'h14000 + 32'(8 * 1), t);
    check("vstime = mtime + delta", t, mtime + 64'd1_000_000);
    mw(CLINT + 32'h1C000 + 32'(8 * 1), t + 2);
    check("vstip not yet", 64'(hart_vstip[1]), 0);
    ticks(2);
    take(1, CSR_SCAUSE, v);                 // scause reads vscause with V=1
    check("hart 1 guest timer (cause 5)", v, INT | 5);
    check("hart 1 stays in guest", 64'({core_rsp[1].priv, core_rsp[1].virt}), {PRV_S, 1'b1});
    if (v == (INT | 5)) count[VS_TIMER]++;
    mw(CLINT + 32'h1C000 + 32'(8 * 1), '1);

    // --------------------------------------------- guest trap delegated to VS
    begin
      core_req_t q = '0;
      q.csr = 1; q.csr_op = CSR_OP_READ; q.csr_addr = CSR_MSTATUS; q.insn = 32'h3000_2573;
      step(1, q);
      check("guest illegal to vstvec", rs.redirect_pc, 64'h300);
      csrr(1, CSR_SCAUSE, v);
      check("guest illegal cause", v, 2);
      if (v == 2 && core_rsp[1].virt) count[GUEST_TRAP]++;
    end

    // --------------------------------------------- hart 4: direct injection
    for (int s = 1; s <= 7; s++) pw(28'(4 * s), 1);    // all priorities 1
    boot(4, PRV_S, 1, 64'h0400, 0, 1);      // VSEIE, vsstatus.SIE
    pw(p_enable(ctx(4, 2)), 32'b0010);      // device 1 -> hart 4 guest
    ext_irq[1] = 1;
    take(4, CSR_SCAUSE, v);
    check("hart 4 guest external (cause 9)", v, INT | 9);
    check("guest line of hart 4", 64'(hart_geip[4]), 1);
    pr(p_claim(ctx(4, 2)), w);
    check("guest claims device 1", 64'(w), 1);
    check("guest line low after claim", 64'(hart_geip[4]), 0);
    ext_irq[1] = 0;
    pw(p_claim(ctx(4, 2)), 1);
    if (v == (INT | 9) && w == 1) count[DIRECT_INJ]++;

    // --------------------------------------------- hart 4: SGEI in HS
    // The hypervisor enables the guest line in hgeie and SGEIE only, so the
    // next device interrupt is taken by HS and the guest is left. Hart 4 is
    // still in the guest's handler: an environment call brings it to M first.
    begin
      core_req_t q = '0;
      q.exc = 1; q.exc_cause = EXC_ECALL_VS;
      step(4, q);
    end
    check("hart 4 back in M", 64'(core_rsp[4].priv), 64'(PRV_M));
    csrw(4, CSR_HGEIE, 64'h2);
    boot(4, PRV_S, 1, 64'h1000, 0, 0);      // SGEIE only
    ext_irq[1] = 1;
    take(4, CSR_SCAUSE, v);
    check("hart 4 SGEI to HS", v, INT | 12);
    check("hart 4 left the guest", 64'(core_rsp[4].virt), 0);
    csrr(4, CSR_HGEIP, v);
    check("hgeip shows line 1", v, 64'h2);
    if (v == 64'h2) count[SGEI]++;
    pr(p_claim(ctx(4, 2)), w);
    ext_irq[1] = 0;
    pw(p_claim(ctx(4, 2)), w);

    // --------------------------------------------- hart 5: virtual injection
    boot(5, PRV_S, 1, 64'h0400, 0, 1);
    pw(28'h4000000 + 28'(4 * ctx(5, 2)), 1);          // block 1 -> hart 5 guest
    pw(28'h4010000 + 28'h1000 + 28'h0, {11'd0, 10'd1, 10'd321, 1'b0});
    take(5, CSR_SCAUSE, v);
    check("hart 5 guest external from VIIR", v, INT | 9);
    pr(p_claim(ctx(5, 2)), w);
    check("guest claims virtual ID", 64'(w), 321);
    pr(28'h4010000 + 28'h1000, w);
    check("VIIR in flight", 64'(w[0]), 1);
    pw(p_claim(ctx(5, 2)), 321);
    pr(28'h4010000 + 28'h1000, w);
    check("VIIR freed", 64'(w[10:0]), 0);
    if (v == (INT | 9)) count[VIRT_INJ]++;

    // --------------------------------------------- management interrupt
    pw(p_enable(ctx(0, 1)), 32'(1) << 4);   // block 1 management (source 4)
    pw(28'h4110000 + 28'h4, 32'b10);        // block 1: bad-complete event on
    pw(p_claim(ctx(5, 2)), 999);            // guest completes an unknown ID
    @(negedge clk);
    check("management interrupt on hart 0 S line", 64'(hart_seip[0]), 1);
    pr(p_claim(ctx(0, 1)), w);
    check("management source ID", 64'(w), 4);
    pr(28'h4110000 + 28'h4, w);
    check("bad ID recorded", 64'(w[25:16]), 999);
    if (w[25:16] == 999) count[MGMT_IRQ]++;
    pw(28'h4110000 + 28'h4, 32'h200);
    pw(p_claim(ctx(0, 1)), 4);

    // --------------------------------------------- latency timer (hart 0, M)
    pw(p_enable(ctx(0, 0)), 32'(1) << 3);   // source 3 = latency timer
    for (int k = 0; k < 2; k++) begin
      meip_rise_time = -1;
      if (k == 0) begin
        mw(TMR + 32'h08, 64'd200);
        mw(TMR + 32'h00, 0);
        mw(TMR + 32'h10, 64'b11);           // enable, auto-restart
      end
      take(0, CSR_MCAUSE, v);
      check("latency timer as machine external", v, INT | 11);
      pr(p_claim(ctx(0, 0)), w);
      check("claim latency timer source", 64'(w), 3);
      mr(TMR + 32'h00, t);
      lat = t - 64'd200 - 64'd2;
      check("meip one cycle after the timer line", 64'(meip_rise_time), 203);
      $display("latency run %0d: time at handler %0d, latency %0d cycles", k, t, lat);
      mw(TMR + 32'h10, 64'b11);             // acknowledge, restart from 0
      pw(p_claim(ctx(0, 0)), 3);
      if (v == (INT | 11) && w == 3) count[LAT_TIMER]++;
      xret(0, 1);
    end
    check("two periodic timer interrupts", 64'(count[LAT_TIMER]), 2);
    mw(TMR + 32'h10, 0);

    // --------------------------------------------- hart 3: nested translation
    // G stage root at PA 0x4000 (16 KiB), L1 0x8000, L0 0x9000 mapping guest
    // pages 1..3 (VS tables) to PA 0xA000..0xC000 and page 5 to 0x1234_5000;
    // VS root at guest page 1, its L0 maps VA page 4 -> guest page 5 and
    // VA page 7 -> guest page 7, which the G stage does not map.
    pmem[(16'h4000) >> 3] = pte(44'h8, 8'h01);
    pmem[(16'h8000) >> 3] = pte(44'h9, 8'h01);
    pmem[(16'h9008) >> 3] = pte(44'hA, 8'hD7);
    pmem[(16'h9010) >> 3] = pte(44'hB, 8'hD7);
    pmem[(16'h9018) >> 3] = pte(44'hC, 8'hD7);
    pmem[(16'h9028) >> 3] = pte(44'h12345, 8'hDF);
    pmem[(16'hA000) >> 3] = pte(44'h2, 8'h01);
    pmem[(16'hB000) >> 3] = pte(44'h3, 8'h01);
    pmem[(16'hC020) >> 3] = pte(44'h5, 8'hCF);
    pmem[(16'hC038) >> 3] = pte(44'h7, 8'hCF);
    check("hart 3 in M", 64'(core_rsp[3].priv), 64'(PRV_M));
    csrw(3, CSR_HGATP, 64'h8000_0000_0000_0004);
    csrw(3, CSR_VSATP, 64'h8000_0000_0000_0001);
    check("hgatp reaches the walker", hgatp[3], 64'h8000_0000_0000_0004);
    for (int k = 0; k < 4; k++) begin
      if (k == 2) begin
        @(negedge clk); xlate_hfence[3] = 1;
        @(negedge clk); xlate_hfence[3] = 0;
      end
      @(negedge clk);
      n_ptw = 0;
      xlate_req_valid[3] = 1; xlate_vaddr[3] = k < 3 ? 64'h4123 : 64'h7010;
      xlate_acc[3] = 2'd1; xlate_virt[3] = 1;
      @(negedge clk);
      xlate_req_valid[3] = 0;
      while (!xlate_resp_valid[3]) @(negedge clk);
      if (k < 3) begin
        check("nested translation no fault", 64'(xlate_fault[3]), 0);
        check("nested translation address", 64'(xlate_paddr[3]), 64'h1234_5123);
        check("TLB hit only on the repeat", 64'(xlate_hit[3]), 64'(k == 1));
        check("page-table reads (15 per nested walk)", 64'(n_ptw), k == 1 ? 0 : 15);
        if (k == 0 && !xlate_fault[3] && xlate_paddr[3] == 56'h1234_5123 && n_ptw == 15)
          count[NESTED_XLATE]++;
        if (k == 1 && xlate_hit[3] && n_ptw == 0) count[TLB_HIT]++;
        if (k == 2 && !xlate_hit[3] && n_ptw == 15) count[HFENCE]++;
      end else begin
        core_req_t q = '0;
        check("guest-page fault cause", 64'(xlate_cause[3]), 21);
        check("guest-page fault GPA", xlate_gpa[3], 64'h7010);
        q.exc = 1; q.exc_cause = xlate_cause[3]; q.tval = 64'h7010;
        q.gpa = xlate_gpa[3] >> 2; q.gva = xlate_gva[3]; q.pc = 64'h5000;
        step(3, q);
        csrr(3, CSR_MCAUSE, v);
        check("trap unit takes the guest-page fault", v, 21);
        csrr(3, CSR_MTVAL2, t);
        check("mtval2 = GPA >> 2", t, 64'h7010 >> 2);
        if (v == 21 && t == (64'h7010 >> 2)) count[GUEST_PF]++;
      end
    end

    // ----------------------------------------------------------- summary
    for (int m = 0; m < NMECH; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), count[m]);
      checks++;
      if (count[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
