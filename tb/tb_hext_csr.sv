// tb_hext_csr: self-checking test of the hypervisor-extension privilege unit.
//
// Two guest external lines (GELEN = 2). The test drives pipeline events and
// interrupt lines and checks, against values worked out in the testbench:
//  - reset state, writable masks of mstatus/mideleg/hideleg/hgeie/hstatus
//  - the mip view: CLINT stip/vstip ORed in, hgeip from the guest lines,
//    VSEIP from the line selected by VGEIN, SGEIP from hgeie
//  - mret into VS mode, supervisor CSR accesses redirected to the VS copies
//  - virtual-instruction and illegal-instruction traps and their routing to
//    M, HS or VS by medeleg/hedeleg, with cause, epc, tval and status fields
//  - guest-page fault into HS with htval and hstatus.GVA
//  - sret from HS back into the guest and sret inside the guest
//  - interrupts to VS (cause shifted to 5), to HS while the guest runs, to M,
//    priority order, and that VS interrupts are not taken with V=0
//  - wfi in the guest with hstatus.VTW set
module tb_hext_csr;
  import hv_pkg::*;

  localparam int G = 2;

  logic clk = 0, rst_n = 0;
  logic msip = 0, mtip = 0, stip = 0, vstip = 0, meip = 0, seip = 0;
  logic [G:1] geip = '0;
  core_req_t req;
  core_rsp_t rsp, rs;
  logic [63:0] satp_o, vsatp_o, hgatp_o;
  int checks = 0, failures = 0;

  hext_csr #(.GELEN(G)) dut (
    .clk, .rst_n, .msip, .mtip, .stip, .vstip, .meip, .seip, .geip,
    .req, .rsp, .satp_o, .vsatp_o, .hgatp_o
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // present one event for one cycle; rs holds the response
  task automatic step(core_req_t q);
    @(negedge clk);
    req = q;
    #1 rs = rsp;
    @(negedge clk);
    req = '0;
  endtask

  function automatic core_req_t csr_q(csr_op_e op, logic [11:0] a, logic [63:0] d);
    core_req_t q = '0;
    q.csr = 1; q.csr_op = op; q.csr_addr = a; q.csr_wdata = d;
    q.insn = {a, 20'h02073};   // csrrs-style encoding, used as trap value
    q.pc = 64'h8000_0000 + 64'(a);
    return q;
  endfunction

  task automatic csrw(logic [11:0] a, logic [63:0] d);
    step(csr_q(CSR_OP_WRITE, a, d));
  endtask

  task automatic csrr(logic [11:0] a, output logic [63:0] d);
    step(csr_q(CSR_OP_READ, a, 0));
    d = rs.csr_rdata;
  endtask

  task automatic xret(bit m, logic [63:0] pc);
    core_req_t q = '0;
    q.mret = m; q.sret = !m; q.pc = pc; q.insn = m ? 32'h3020_0073 : 32'h1020_0073;
    step(q);
  endtask

  task automatic exc(logic [5:0] cause, logic [63:0] pc, logic [63:0] tval, logic [63:0] gpa, bit gva);
    core_req_t q = '0;
    q.exc = 1; q.exc_cause = cause; q.pc = pc; q.tval = tval; q.gpa = gpa; q.gva = gva;
    step(q);
  endtask

  task automatic take_irq(logic [63:0] pc);
    core_req_t q = '0;
    q.take_irq = 1; q.pc = pc;
    step(q);
  endtask

  task automatic mode(string what, logic [1:0] p, bit v);
    check({what, ": priv"}, 64'(rsp.priv), 64'(p));
    check({what, ": V"}, 64'(rsp.virt), 64'(v));
  endtask

  // from M mode, enter (priv p, V v) with mret at address pc
  task automatic enter(logic [1:0] p, bit v, logic [63:0] pc);
    logic [63:0] ms;
    csrr(CSR_MSTATUS, ms);
    ms[MS_MPP +: 2] = p; ms[MS_MPV] = v;
    csrw(CSR_MSTATUS, ms);
    csrw(CSR_MEPC, pc);
    xret(1, 64'h10);
  endtask

  logic [63:0] v;

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    mode("reset", PRV_M, 0);

    // ------------------------------------------------------- masks
    csrw(CSR_MIDELEG, '0);
    csrr(CSR_MIDELEG, v);            check("mideleg VS/SGEI read-only one", v, 64'h1444);
    csrw(CSR_MIDELEG, '1);
    csrr(CSR_MIDELEG, v);            check("mideleg all", v, 64'h1666);
    csrw(CSR_HIDELEG, '1);
    csrr(CSR_HIDELEG, v);            check("hideleg VS bits only", v, 64'h0444);
    csrw(CSR_HGEIE, '1);
    csrr(CSR_HGEIE, v);              check("hgeie GELEN bits", v, 64'h6);
    csrw(CSR_HGEIE, '0);
    csrw(CSR_HSTATUS, '1);
    csrr(CSR_HSTATUS, v);            check("hstatus mask", v, 64'h0073_F3C0);
    csrw(CSR_HSTATUS, '0);

    // ------------------------------------------------ interrupt composition
    stip = 1; vstip = 1; #1;
    csrr(CSR_MIP, v);                check("mip STIP/VSTIP from CLINT", v, 64'h60);
    csrr(CSR_HIP, v);                check("hip shows VSTIP", v, 64'h40);
    stip = 0; vstip = 0;
    geip = 2'b10; #1;
    csrr(CSR_HGEIP, v);              check("hgeip from guest line 2", v, 64'h4);
    csrr(CSR_MIP, v);                check("no VSEIP/SGEIP yet", v, 0);
    csrw(CSR_HSTATUS, 64'(2) << HS_VGEIN);
    csrr(CSR_MIP, v);                check("VGEIN=2 selects line 2", v, 64'h400);
    csrw(CSR_HSTATUS, 64'(1) << HS_VGEIN);
    csrr(CSR_MIP, v);                check("VGEIN=1 does not", v, 0);
    csrw(CSR_HGEIE, 64'h4);
    csrr(CSR_MIP, v);                check("SGEIP from hgeie", v, 64'h1000);
    csrw(CSR_HGEIE, 0);
    geip = '0;
    csrw(CSR_HSTATUS, 0);

    // ------------------------------------------------ traps and delegation
    csrw(CSR_MIDELEG, 64'h0222);
    csrw(CSR_MTVEC, 64'h100);
    csrw(CSR_STVEC, 64'h200);
    csrw(CSR_VSTVEC, 64'h300);
    csrw(CSR_MEDELEG, (64'(1) << EXC_ILLEGAL) | (64'(1) << EXC_VIRT_INST) | (64'(1) << EXC_LOAD_GPF));
    csrw(CSR_HEDELEG, 64'(1) << EXC_ILLEGAL);
    csrw(CSR_SSCRATCH, 64'h5555);
    csrw(CSR_VSSCRATCH, 64'hAAAA);

    enter(PRV_S, 1, 64'h1000);
    check("mret redirects to mepc", rs.redirect_pc, 64'h1000);
    mode("after mret", PRV_S, 1);

    // VS accesses to supervisor CSRs go to the VS copies
    csrr(CSR_SSCRATCH, v);           check("sscratch reads vsscratch in VS", v, 64'hAAAA);
    csrw(CSR_SSCRATCH, 64'hBBBB);
    check("no trap on VS sscratch write", 64'(rs.trap), 0);

    // hypervisor CSR from VS: virtual instruction, delegated to HS
    step(csr_q(CSR_OP_READ, CSR_HSTATUS, 0));
    check("hstatus from VS traps", 64'(rs.trap), 1);
    check("to stvec", rs.redirect_pc, 64'h200);
    mode("virtual-instruction trap", PRV_S, 0);
    csrr(CSR_SCAUSE, v);             check("scause 22", v, 22);
    csrr(CSR_SEPC, v);               check("sepc", v, 64'h8000_0600);
    csrr(CSR_STVAL, v);              check("stval = instruction", v, {32'd0, CSR_HSTATUS, 20'h02073});
    csrr(CSR_HSTATUS, v);            check("hstatus SPV and SPVP", v, (64'(1) << HS_SPV) | (64'(1) << HS_SPVP));
    csrr(CSR_SSCRATCH, v);           check("HS sscratch untouched", v, 64'h5555);
    csrr(CSR_VSSCRATCH, v);          check("vsscratch written by guest", v, 64'hBBBB);

    // sret from HS returns into the guest
    csrw(CSR_SEPC, 64'h1004);
    xret(0, 64'h204);
    check("sret to sepc", rs.redirect_pc, 64'h1004);
    mode("after sret to guest", PRV_S, 1);

    // machine CSR from VS: illegal, delegated twice, lands in VS
    step(csr_q(CSR_OP_READ, CSR_MSTATUS, 0));
    check("to vstvec", rs.redirect_pc, 64'h300);
    mode("illegal to VS", PRV_S, 1);
    csrr(CSR_SCAUSE, v);             check("vscause 2 (via scause)", v, 2);
    csrr(CSR_SEPC, v);               check("vsepc", v, 64'h8000_0300);
    csrr(CSR_SSTATUS, v);            check("vsstatus SPP", v, 64'(1) << MS_SPP);
    csrw(CSR_SEPC, 64'h1008);
    xret(0, 64'h304);
    check("guest sret to vsepc", rs.redirect_pc, 64'h1008);
    mode("guest sret", PRV_S, 1);

    // guest ecall: not delegated, M mode
    exc(EXC_ECALL_VS, 64'h100C, 0, 0, 0);
    check("to mtvec", rs.redirect_pc, 64'h100);
    mode("ecall to M", PRV_M, 0);
    csrr(CSR_MCAUSE, v);             check("mcause 10", v, 10);
    csrr(CSR_MEPC, v);               check("mepc", v, 64'h100C);
    csrr(CSR_MSTATUS, v);
    check("mstatus MPV", 64'(v[MS_MPV]), 1);
    check("mstatus MPP", 64'(v[MS_MPP +: 2]), 64'(PRV_S));

    // guest-page fault from VS goes to HS with the guest physical address
    enter(PRV_S, 1, 64'h2000);
    exc(EXC_LOAD_GPF, 64'h2000, 64'hDEAD_0000, 64'h0BEE_F000 >> 2, 1);
    mode("guest page fault to HS", PRV_S, 0);
    csrr(CSR_SCAUSE, v);             check("scause 21", v, 21);
    csrr(CSR_STVAL, v);              check("stval guest virtual address", v, 64'hDEAD_0000);
    csrr(CSR_HTVAL, v);              check("htval guest physical >> 2", v, 64'h0BEE_F000 >> 2);
    csrr(CSR_HSTATUS, v);            check("hstatus GVA", 64'(v[HS_GVA]), 1);
    // mret is illegal from HS; illegal is delegated to HS
    xret(1, 64'h2100);
    check("mret from S traps", 64'(rs.trap), 1);
    csrr(CSR_SCAUSE, v);             check("scause 2 after mret in S", v, 2);
    // back to M through ecall
    exc(EXC_ECALL_S, 64'h2200, 0, 0, 0);
    mode("ecall from HS", PRV_M, 0);

    // ------------------------------------------------------------ interrupts
    csrw(CSR_HIDELEG, 64'h0444);
    csrw(CSR_MIE, 64'h0AA0 | 64'h0040);    // MTIE SEIE MEIE STIE VSTIE
    csrw(CSR_VSSTATUS, 64'(1) << MS_SIE);
    // VS timer while the guest runs
    enter(PRV_S, 1, 64'h3000);
    vstip = 1; #1;
    check("VS timer pending", 64'(rsp.irq_pending), 1);
    take_irq(64'h3000);
    check("VS interrupt to vstvec", rs.redirect_pc, 64'h300);
    mode("VS interrupt", PRV_S, 1);
    csrr(CSR_SCAUSE, v);             check("vscause = supervisor timer", v, {1'b1, 63'd5});
    check("guest SIE now 0: masked", 64'(rsp.irq_pending), 0);
    vstip = 0;
    // supervisor external interrupt for HS preempts the guest
    seip = 1; #1;
    check("HS interrupt pending in guest regardless of SIE", 64'(rsp.irq_pending), 1);
    take_irq(64'h3100);
    check("HS interrupt to stvec", rs.redirect_pc, 64'h200);
    mode("HS interrupt", PRV_S, 0);
    csrr(CSR_SCAUSE, v);             check("scause SEI", v, {1'b1, 63'd9});
    seip = 0;
    // VS interrupt is not taken while V=0
    vstip = 1; #1;
    check("VS interrupt held while V=0", 64'(rsp.irq_pending), 0);
    vstip = 0;
    // machine interrupts preempt HS; MEI before MTI
    mtip = 1; meip = 1; #1;
    take_irq(64'h3200);
    mode("M interrupt", PRV_M, 0);
    csrr(CSR_MCAUSE, v);             check("MEI has priority", v, {1'b1, 63'd11});
    meip = 0;
    csrw(CSR_MSTATUS, 64'(1) << MS_MIE);
    check("MTI pending in M with MIE", 64'(rsp.irq_pending), 1);
    take_irq(64'h3300);
    csrr(CSR_MCAUSE, v);             check("then MTI", v, {1'b1, 63'd7});
    mtip = 0;

    // wfi in the guest with hstatus.VTW: virtual instruction
    csrw(CSR_HSTATUS, 64'(1) << HS_VTW);
    enter(PRV_S, 1, 64'h4000);
    begin
      core_req_t q = '0;
      q.wfi = 1; q.pc = 64'h4000; q.insn = 32'h1050_0073;
      step(q);
    end
    mode("wfi with VTW", PRV_S, 0);
    csrr(CSR_SCAUSE, v);             check("wfi VTW cause 22", v, 22);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
