// hext_csr: privilege state of one hart with the hypervisor (H) extension.
//
// This is the part of a core's CSR file that the hypervisor extension
// changes: the machine, hypervisor (HS) and virtual-supervisor (VS) CSRs,
// the virtualization mode V, trap delegation through medeleg/mideleg and
// hedeleg/hideleg, trap entry into M, HS or VS mode, sret/mret, the
// interrupt-pending view and the access checks that raise illegal-instruction
// or virtual-instruction exceptions.
//
// Interrupt inputs come straight from the platform: msip/mtip/stip/vstip from
// the CLINT, meip/seip and the guest external lines geip[GELEN:1] from the
// PLIC. mip.STIP is the OR of its software-writable bit and the CLINT stip
// line, mip.VSTIP the OR of hvip.VSTIP and the CLINT vstip line. geip drives
// hgeip[GELEN:1] (bit 0 reads zero); the line selected by hstatus.VGEIN is
// ORed into VSEIP and the lines enabled in hgeie raise SGEIP.
//
// The pipeline presents one event per cycle (core_req_t): a CSR access, an
// sret/mret/wfi, a hypervisor load/store, an exception, or taking the pending
// interrupt. The state changes at the next clock edge; the response
// (core_rsp_t) is combinational: the old CSR value, and for a trap or an xret
// the pc to fetch next. A CSR access, xret, wfi or hypervisor load/store that
// is not permitted is turned into an illegal-instruction (2) or
// virtual-instruction (22) trap in the same cycle, with the instruction bits
// as trap value. An exception not delegated goes to M mode; delegated by
// medeleg from below M it goes to HS mode; further delegated by hedeleg while
// V=1 it goes to VS mode. Interrupts follow mideleg/hideleg likewise; a VS
// interrupt taken in VS mode reports cause 1, 5 or 9.
//
// Trap entry and return follow the sequences in the design description,
// where they disagree with the RISC-V privileged specification on a field
// name (mret restoring from MPP, sret clearing mstatus.SPP, hstatus.SPVP
// holding the privilege, a VS trap saving vsstatus.SIE) the specification is
// followed. CSR addresses, field positions, writable masks, interrupt
// priority order and the permission rules are taken from the specification.
// htinst and mtinst read as zero. Trap vectors are direct mode only. RV64.
module hext_csr #(
  parameter int unsigned GELEN = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                msip,
  input  logic                mtip,
  input  logic                stip,
  input  logic                vstip,
  input  logic                meip,
  input  logic                seip,
  input  logic [GELEN:1]      geip,
  input  hv_pkg::core_req_t   req,
  output hv_pkg::core_rsp_t   rsp,
  // translation control for the MMU
  output logic [63:0]         satp_o,
  output logic [63:0]         vsatp_o,
  output logic [63:0]         hgatp_o
);
  import hv_pkg::*;

  // ------------------------------------------------------------------ state
  logic [1:0]  priv;
  logic        virt;
  logic [63:0] mstatus, vsstatus, hstatus;
  logic [63:0] medeleg, mideleg_w, hedeleg, hideleg;
  logic [63:0] mie, mip_w, hvip, hgeie, hcounteren;
  logic [63:0] mtvec, stvec, vstvec;
  logic [63:0] mscratch, sscratch, vsscratch;
  logic [63:0] mepc, sepc, vsepc;
  logic [63:0] mcause, scause, vscause;
  logic [63:0] mtval, stval, vstval, mtval2, htval;
  logic [63:0] satp, vsatp, hgatp;

  // ---------------------------------------------------------- writable masks
  localparam logic [63:0] MSTATUS_W  = 64'h0000_00C0_0070_19AA; // SIE MIE SPIE MPIE SPP MPP TVM TW TSR GVA MPV
  localparam logic [63:0] SSTATUS_W  = 64'h0000_0000_0000_0122; // SIE SPIE SPP
  localparam logic [63:0] HSTATUS_W  = 64'h0000_0000_0073_F3C0; // GVA SPV SPVP HU VGEIN VTVM VTW VTSR
  localparam logic [63:0] MIDELEG_RO = 64'h0000_0000_0000_1444; // VS interrupts and SGEI: always delegated
  localparam logic [63:0] MIDELEG_W  = 64'h0000_0000_0000_0222;
  localparam logic [63:0] MEDELEG_W  = 64'h0000_0000_00F0_B3FF;
  localparam logic [63:0] HEDELEG_W  = 64'h0000_0000_0000_B1FF;
  localparam logic [63:0] MIE_W      = 64'h0000_0000_0000_1EEE;
  localparam logic [63:0] MIP_W      = 64'h0000_0000_0000_0222; // SSIP STIP SEIP
  localparam logic [63:0] HVIP_W     = 64'h0000_0000_0000_0444;
  localparam logic [63:0] SIP_W      = 64'h0000_0000_0000_0002;

  // ------------------------------------------------------- interrupt pending
  logic [63:0] mideleg, hgeip, mip;
  logic [5:0]  vgein;
  logic        vseip_ge, sgeip;

  assign mideleg = mideleg_w | MIDELEG_RO;
  assign hgeip   = 64'({geip, 1'b0});
  assign vgein   = hstatus[HS_VGEIN +: 6];
  assign vseip_ge = (vgein != 6'd0) && (32'(vgein) <= GELEN) && hgeip[vgein];
  assign sgeip   = |(hgeip & hgeie);

  always_comb begin
    mip = (mip_w & MIP_W) | (hvip & HVIP_W);
    mip[IRQ_MSI]  = msip;
    mip[IRQ_MTI]  = mtip;
    mip[IRQ_MEI]  = meip;
    mip[IRQ_STI]  = mip_w[IRQ_STI] | stip;
    mip[IRQ_SEI]  = mip_w[IRQ_SEI] | seip;
    mip[IRQ_VSTI] = hvip[IRQ_VSTI] | vstip;
    mip[IRQ_VSEI] = hvip[IRQ_VSEI] | vseip_ge;
    mip[IRQ_SGEI] = sgeip;
  end

  // Interrupt selection in priority order.
  localparam int NPRIO = 10;
  localparam int PRIO_ORDER [NPRIO] = '{11, 3, 7, 9, 1, 5, 12, 10, 2, 6};

  logic [63:0] pend, m_irqs, hs_irqs, vs_irqs;
  logic        m_en, hs_en, vs_en;
  logic        irq_any;
  logic [5:0]  irq_code;
  always_comb begin
    pend    = mip & mie;
    m_irqs  = pend & ~mideleg;
    hs_irqs = pend & mideleg & ~hideleg;
    vs_irqs = pend & mideleg & hideleg;
    m_en    = (priv != PRV_M) || mstatus[MS_MIE];
    hs_en   = virt || (priv == PRV_U) || (priv == PRV_S && mstatus[MS_SIE]);
    vs_en   = virt && ((priv == PRV_U) || vsstatus[MS_SIE]);
    irq_any  = 1'b0;
    irq_code = '0;
    for (int i = NPRIO - 1; i >= 0; i--)
      if (vs_en && vs_irqs[PRIO_ORDER[i]]) begin irq_any = 1'b1; irq_code = 6'(PRIO_ORDER[i]); end
    for (int i = NPRIO - 1; i >= 0; i--)
      if (hs_en && hs_irqs[PRIO_ORDER[i]]) begin irq_any = 1'b1; irq_code = 6'(PRIO_ORDER[i]); end
    for (int i = NPRIO - 1; i >= 0; i--)
      if (m_en && m_irqs[PRIO_ORDER[i]]) begin irq_any = 1'b1; irq_code = 6'(PRIO_ORDER[i]); end
  end

  // ------------------------------------------------------------- CSR access
  logic [11:0] eff_addr;     // address after VS redirection
  logic        csr_exists, csr_illegal, csr_virtual;
  logic [63:0] csr_rval;
  logic [1:0]  lvl;
  logic        ro;

  // With V=1 the supervisor CSRs are backed by their VS copies.
  always_comb begin
    eff_addr = req.csr_addr;
    if (virt && req.csr_addr[11:8] == 4'h1)
      eff_addr = {4'h2, req.csr_addr[7:0]};
  end

  // sip/sie view shifted from VS positions (2, 6, 10) to S positions (1, 5, 9)
  function automatic logic [63:0] vs_to_s(logic [63:0] v);
    return (v & VS_IRQ_MASK) >> 1;
  endfunction

  always_comb begin
    csr_exists = 1'b1;
    csr_rval   = '0;
    unique case (eff_addr)
      CSR_MSTATUS:    csr_rval = mstatus;
      CSR_MEDELEG:    csr_rval = medeleg;
      CSR_MIDELEG:    csr_rval = mideleg;
      CSR_MIE:        csr_rval = mie;
      CSR_MTVEC:      csr_rval = mtvec;
      CSR_MSCRATCH:   csr_rval = mscratch;
      CSR_MEPC:       csr_rval = mepc;
      CSR_MCAUSE:     csr_rval = mcause;
      CSR_MTVAL:      csr_rval = mtval;
      CSR_MIP:        csr_rval = mip;
      CSR_MTINST:     csr_rval = '0;
      CSR_MTVAL2:     csr_rval = mtval2;
      CSR_SSTATUS:    csr_rval = mstatus & SSTATUS_W;
      CSR_SIE:        csr_rval = mie & mideleg_w & MIDELEG_W;
      CSR_STVEC:      csr_rval = stvec;
      CSR_SSCRATCH:   csr_rval = sscratch;
      CSR_SEPC:       csr_rval = sepc;
      CSR_SCAUSE:     csr_rval = scause;
      CSR_STVAL:      csr_rval = stval;
      CSR_SIP:        csr_rval = mip & mideleg_w & MIDELEG_W;
      CSR_SATP:       csr_rval = satp;
      CSR_HSTATUS:    csr_rval = hstatus;
      CSR_HEDELEG:    csr_rval = hedeleg;
      CSR_HIDELEG:    csr_rval = hideleg;
      CSR_HIE:        csr_rval = mie & HS_IRQ_MASK;
      CSR_HCOUNTEREN: csr_rval = hcounteren;
      CSR_HGEIE:      csr_rval = hgeie;
      CSR_HTVAL:      csr_rval = htval;
      CSR_HIP:        csr_rval = mip & HS_IRQ_MASK;
      CSR_HVIP:       csr_rval = hvip;
      CSR_HTINST:     csr_rval = '0;
      CSR_HGATP:      csr_rval = hgatp;
      CSR_HGEIP:      csr_rval = hgeip;
      CSR_VSSTATUS:   csr_rval = vsstatus;
      CSR_VSIE:       csr_rval = vs_to_s(mie & hideleg);
      CSR_VSTVEC:     csr_rval = vstvec;
      CSR_VSSCRATCH:  csr_rval = vsscratch;
      CSR_VSEPC:      csr_rval = vsepc;
      CSR_VSCAUSE:    csr_rval = vscause;
      CSR_VSTVAL:     csr_rval = vstval;
      CSR_VSIP:       csr_rval = vs_to_s(mip & hideleg);
      CSR_VSATP:      csr_rval = vsatp;
      default:        csr_exists = 1'b0;
    endcase
  end

  // Permission checks. addr[9:8]: lowest level (0 U, 1 S, 2 hypervisor/VS,
  // 3 M); addr[11:10] == 3: read only.
  logic csr_writes;
  assign lvl = req.csr_addr[9:8];
  assign ro  = req.csr_addr[11:10] == 2'b11;
  assign csr_writes = (req.csr_op == CSR_OP_WRITE) ||
                      ((req.csr_op != CSR_OP_READ) && req.csr_wdata != '0);

  always_comb begin
    csr_illegal = 1'b0;
    csr_virtual = 1'b0;
    if (!csr_exists || (ro && csr_writes)) csr_illegal = 1'b1;
    else if (priv == PRV_M) ;
    else if (lvl == 2'd3) csr_illegal = 1'b1;
    else if (!virt) begin
      if (priv == PRV_U && lvl != 2'd0) csr_illegal = 1'b1;
      else if ((req.csr_addr == CSR_SATP || req.csr_addr == CSR_HGATP) && mstatus[MS_TVM])
        csr_illegal = 1'b1;
    end else begin
      if (priv == PRV_U && lvl != 2'd0) csr_virtual = 1'b1;
      else if (lvl == 2'd2) csr_virtual = 1'b1;
      else if (req.csr_addr == CSR_SATP && hstatus[HS_VTVM]) csr_virtual = 1'b1;
    end
  end

  logic [63:0] csr_new;
  always_comb begin
    unique case (req.csr_op)
      CSR_OP_WRITE: csr_new = req.csr_wdata;
      CSR_OP_SET:   csr_new = csr_rval | req.csr_wdata;
      CSR_OP_CLEAR: csr_new = csr_rval & ~req.csr_wdata;
      default:      csr_new = csr_rval;
    endcase
  end

  // ------------------------------------------------ xret / wfi / hlsv checks
  logic sret_illegal, sret_virtual, mret_bad, wfi_illegal, wfi_virtual;
  logic hlsv_illegal, hlsv_virtual;
  always_comb begin
    sret_illegal = !virt && (priv == PRV_U || (priv == PRV_S && mstatus[MS_TSR]));
    sret_virtual = virt && (priv == PRV_U || hstatus[HS_VTSR]);
    mret_bad     = priv != PRV_M;
    wfi_illegal  = (priv != PRV_M && mstatus[MS_TW]) || (!virt && priv == PRV_U);
    wfi_virtual  = !wfi_illegal && virt && (priv == PRV_U || hstatus[HS_VTW]);
    hlsv_virtual = virt;
    hlsv_illegal = !virt && priv == PRV_U && !hstatus[HS_HU];
  end

  // ------------------------------------------------------ trap determination
  logic        trap, trap_int;
  logic [5:0]  trap_code;
  logic [63:0] trap_tval, trap_gpa;
  logic        trap_gva;
  logic        fault_ill, fault_virt;

  always_comb begin
    fault_ill  = (req.csr && csr_illegal) || (req.sret && sret_illegal) ||
                 (req.mret && mret_bad) || (req.wfi && wfi_illegal) ||
                 (req.hlsv && hlsv_illegal);
    fault_virt = (req.csr && csr_virtual) || (req.sret && sret_virtual) ||
                 (req.wfi && wfi_virtual) ||
                 (req.hlsv && hlsv_virtual);
    trap      = 1'b0;
    trap_int  = 1'b0;
    trap_code = '0;
    trap_tval = '0;
    trap_gpa  = '0;
    trap_gva  = 1'b0;
    if (req.take_irq && irq_any) begin
      trap = 1'b1; trap_int = 1'b1; trap_code = irq_code;
    end else if (req.exc) begin
      trap = 1'b1; trap_code = req.exc_cause;
      trap_tval = req.tval; trap_gpa = req.gpa; trap_gva = req.gva;
    end else if (fault_ill || fault_virt) begin
      trap = 1'b1; trap_code = fault_ill ? EXC_ILLEGAL : EXC_VIRT_INST;
      trap_tval = 64'(req.insn);
    end
  end

  logic to_hs, to_vs, guest_fault;
  always_comb begin
    to_hs = (priv != PRV_M) && (trap_int ? mideleg[trap_code] : medeleg[trap_code]);
    to_vs = to_hs && virt && (trap_int ? hideleg[trap_code] : hedeleg[trap_code]);
    guest_fault = !trap_int && (trap_code == EXC_INST_GPF || trap_code == EXC_LOAD_GPF ||
                                trap_code == EXC_STORE_GPF);
  end

  // ------------------------------------------------------------ response
  logic do_sret, do_mret, csr_ok;
  assign do_sret = req.sret && !trap;
  assign do_mret = req.mret && !trap;
  assign csr_ok  = req.csr && !trap;

  always_comb begin
    rsp.csr_rdata   = csr_rval;
    rsp.trap        = trap;
    rsp.redirect    = trap || do_sret || do_mret;
    rsp.redirect_pc = '0;
    if (trap)          rsp.redirect_pc = to_vs ? vstvec : to_hs ? stvec : mtvec;
    else if (do_mret)  rsp.redirect_pc = mepc;
    else if (do_sret)  rsp.redirect_pc = virt ? vsepc : sepc;
    rsp.irq_pending = irq_any;
    rsp.priv        = priv;
    rsp.virt        = virt;
  end

  assign satp_o  = satp;
  assign vsatp_o = vsatp;
  assign hgatp_o = hgatp;

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      priv <= PRV_M;  virt <= 1'b0;
      mstatus <= '0;  vsstatus <= '0;  hstatus <= '0;
      medeleg <= '0;  mideleg_w <= '0; hedeleg <= '0;  hideleg <= '0;
      mie <= '0;      mip_w <= '0;     hvip <= '0;     hgeie <= '0;  hcounteren <= '0;
      mtvec <= '0;    stvec <= '0;     vstvec <= '0;
      mscratch <= '0; sscratch <= '0;  vsscratch <= '0;
      mepc <= '0;     sepc <= '0;      vsepc <= '0;
      mcause <= '0;   scause <= '0;    vscause <= '0;
      mtval <= '0;    stval <= '0;     vstval <= '0;   mtval2 <= '0; htval <= '0;
      satp <= '0;     vsatp <= '0;     hgatp <= '0;
    end else if (trap) begin
      if (to_vs) begin
        vsepc   <= req.pc;
        vscause <= {trap_int, 57'd0, (trap_int ? trap_code - 6'd1 : trap_code)};
        vstval  <= trap_tval;
        vsstatus[MS_SPIE] <= vsstatus[MS_SIE];
        vsstatus[MS_SIE]  <= 1'b0;
        vsstatus[MS_SPP]  <= priv[0];
        priv <= PRV_S;
      end else if (to_hs) begin
        sepc   <= req.pc;
        scause <= {trap_int, 57'd0, trap_code};
        stval  <= trap_tval;
        htval  <= guest_fault ? trap_gpa : '0;
        hstatus[HS_SPV] <= virt;
        hstatus[HS_GVA] <= trap_gva;
        if (virt) hstatus[HS_SPVP] <= priv[0];
        mstatus[MS_SPIE] <= mstatus[MS_SIE];
        mstatus[MS_SIE]  <= 1'b0;
        mstatus[MS_SPP]  <= priv[0];
        priv <= PRV_S;
        virt <= 1'b0;
      end else begin
        mepc   <= req.pc;
        mcause <= {trap_int, 57'd0, trap_code};
        mtval  <= trap_tval;
        mtval2 <= guest_fault ? trap_gpa : '0;
        mstatus[MS_MPV]  <= virt;
        mstatus[MS_GVA]  <= trap_gva;
        mstatus[MS_MPIE] <= mstatus[MS_MIE];
        mstatus[MS_MIE]  <= 1'b0;
        mstatus[MS_MPP +: 2] <= priv;
        priv <= PRV_M;
        virt <= 1'b0;
      end
    end else if (do_mret) begin
      mstatus[MS_MIE]  <= mstatus[MS_MPIE];
      mstatus[MS_MPIE] <= 1'b1;
      priv <= mstatus[MS_MPP +: 2];
      virt <= (mstatus[MS_MPP +: 2] != PRV_M) && mstatus[MS_MPV];
      mstatus[MS_MPV] <= 1'b0;
      mstatus[MS_MPP +: 2] <= PRV_U;
    end else if (do_sret) begin
      if (virt) begin
        vsstatus[MS_SIE]  <= vsstatus[MS_SPIE];
        vsstatus[MS_SPIE] <= 1'b1;
        priv <= {1'b0, vsstatus[MS_SPP]};
        vsstatus[MS_SPP]  <= 1'b0;
      end else begin
        mstatus[MS_SIE]  <= mstatus[MS_SPIE];
        mstatus[MS_SPIE] <= 1'b1;
        priv <= {1'b0, mstatus[MS_SPP]};
        virt <= hstatus[HS_SPV];
        hstatus[HS_SPV]  <= 1'b0;
        mstatus[MS_SPP]  <= 1'b0;
      end
    end else if (csr_ok && req.csr_op != CSR_OP_READ) begin
      unique case (eff_addr)
        CSR_MSTATUS:    mstatus   <= (mstatus & ~MSTATUS_W) | (csr_new & MSTATUS_W);
        CSR_MEDELEG:    medeleg   <= csr_new & MEDELEG_W;
        CSR_MIDELEG:    mideleg_w <= csr_new & MIDELEG_W;
        CSR_MIE:        mie       <= csr_new & MIE_W;
        CSR_MTVEC:      mtvec     <= {csr_new[63:2], 2'b00};
        CSR_MSCRATCH:   mscratch  <= csr_new;
        CSR_MEPC:       mepc      <= {csr_new[63:1], 1'b0};
        CSR_MCAUSE:     mcause    <= csr_new;
        CSR_MTVAL:      mtval     <= csr_new;
        CSR_MIP: begin
          mip_w <= csr_new & MIP_W;
          hvip  <= (hvip & ~HVIP_W) | (csr_new & 64'h4);  // VSSIP alias
        end
        CSR_MTVAL2:     mtval2    <= csr_new;
        CSR_SSTATUS:    mstatus   <= (mstatus & ~SSTATUS_W) | (csr_new & SSTATUS_W);
        CSR_SIE:        mie       <= (mie & ~(mideleg_w & MIDELEG_W)) | (csr_new & mideleg_w & MIDELEG_W);
        CSR_STVEC:      stvec     <= {csr_new[63:2], 2'b00};
        CSR_SSCRATCH:   sscratch  <= csr_new;
        CSR_SEPC:       sepc      <= {csr_new[63:1], 1'b0};
        CSR_SCAUSE:     scause    <= csr_new;
        CSR_STVAL:      stval     <= csr_new;
        CSR_SIP:        mip_w     <= (mip_w & ~(mideleg_w & SIP_W)) | (csr_new & mideleg_w & SIP_W);
        CSR_SATP:       satp      <= csr_new;
        CSR_HSTATUS:    hstatus   <= csr_new & HSTATUS_W;
        CSR_HEDELEG:    hedeleg   <= csr_new & HEDELEG_W;
        CSR_HIDELEG:    hideleg   <= csr_new & VS_IRQ_MASK;
        CSR_HIE:        mie       <= (mie & ~HS_IRQ_MASK) | (csr_new & HS_IRQ_MASK);
        CSR_HCOUNTEREN: hcounteren <= {32'd0, csr_new[31:0]};
        CSR_HGEIE:      hgeie     <= csr_new & 64'({{GELEN{1'b1}}, 1'b0});
        CSR_HTVAL:      htval     <= csr_new;
        CSR_HIP:        hvip      <= (hvip & ~64'h4) | (csr_new & 64'h4);
        CSR_HVIP:       hvip      <= csr_new & HVIP_W;
        CSR_HGATP:      hgatp     <= csr_new;
        CSR_VSSTATUS:   vsstatus  <= csr_new & SSTATUS_W;
        CSR_VSIE:       mie       <= (mie & ~hideleg) | ((csr_new << 1) & hideleg);
        CSR_VSTVEC:     vstvec    <= {csr_new[63:2], 2'b00};
        CSR_VSSCRATCH:  vsscratch <= csr_new;
        CSR_VSEPC:      vsepc     <= {csr_new[63:1], 1'b0};
        CSR_VSCAUSE:    vscause   <= csr_new;
        CSR_VSTVAL:     vstval    <= csr_new;
        CSR_VSIP:       hvip      <= (hvip & ~(hideleg & 64'h4)) | ((csr_new << 1) & hideleg & 64'h4);
        CSR_VSATP:      vsatp     <= csr_new;
        default: ;
      endcase
    end
  end

endmodule
