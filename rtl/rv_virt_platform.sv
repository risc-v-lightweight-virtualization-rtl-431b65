// rv_virt_platform: interrupt and timer platform of a multi-hart RISC-V SoC
// with the hypervisor extension and virtualization-aware CLINT and PLIC.
//
// The platform holds, for NHARTS harts, the privilege/CSR unit of each hart
// (hext_csr), one CLINT with per-hart HS and VS timers (clint_virt), one PLIC
// with per-hart VS contexts and virtual interrupt injection blocks
// (plic_virt), the MMIO timer used for interrupt-latency measurements
// (irq_latency_timer) and, per hart, a TLB with the two-stage page-table
// walker behind it (tlb_2stage, ptw_2stage) driven by that hart's satp, vsatp
// and hgatp. Wiring:
//   CLINT msip/mtip/stip/vstip[h]  -> hart h mip.MSIP/MTIP/STIP/VSTIP
//   PLIC  meip/seip[h]             -> hart h mip.MEIP/SEIP
//   PLIC  geip[h][g]               -> hart h hgeip[g]   (g = 1..NGUEST)
//   ext_irq[i]                     -> PLIC source i     (i = 1..NEXT_IRQ)
//   latency timer irq              -> PLIC source NEXT_IRQ+1
// The PLIC adds its NVIRT_BLKS block management interrupts as the following
// sources. The processor pipelines and the memory system are outside this
// module: each hart's pipeline events enter through core_req[h] and the
// responses leave through core_rsp[h]; each TLB takes translation requests
// and sfence.vma/hfence flushes on xlate_*[h], and its walker reads
// page-table entries through ptw_mem_*[h] (a guest-page fault it reports is
// passed to core_req[h] by the pipeline, with the GPA);
// the control bus is one MMIO register port decoded as
//   CLINT  0x0200_0000 .. 0x0203_FFFF
//   timer  0x2200_0000 .. 0x2200_001F
//   PLIC   0x0C00_0000 .. 0x1BFF_FFFF   (32-bit registers on lane addr[2];
//                                        offset = address - 0x0C00_0000)
// The PLIC base and the timer base follow the design description; the CLINT
// base and the port itself are this design's choices. The port is single
// cycle: read data is combinational, writes and claim side effects happen at
// the clock edge; a PLIC claim read must be held for exactly one cycle.
module rv_virt_platform #(
  parameter int unsigned NHARTS     = 6,
  parameter int unsigned NGUEST     = 1,
  parameter int unsigned NEXT_IRQ   = 2,
  parameter int unsigned NVIRT_BLKS = 4,
  parameter int unsigned NVIIR      = 4,
  parameter int unsigned PRIO_BITS  = 1,
  parameter int unsigned NTLB       = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rtc_tick,
  input  logic [NEXT_IRQ:1]             ext_irq,
  // MMIO register port
  input  logic                          mmio_valid,
  input  logic                          mmio_write,
  input  logic [31:0]                   mmio_addr,
  input  logic [63:0]                   mmio_wdata,
  input  logic [7:0]                    mmio_wstrb,
  output logic [63:0]                   mmio_rdata,
  // per-hart pipeline interface
  input  hv_pkg::core_req_t [NHARTS-1:0] core_req,
  output hv_pkg::core_rsp_t [NHARTS-1:0] core_rsp,
  output logic [NHARTS-1:0][63:0]       satp,
  output logic [NHARTS-1:0][63:0]       vsatp,
  output logic [NHARTS-1:0][63:0]       hgatp,
  // per-hart address translation (TLB and two-stage page-table walker)
  input  logic [NHARTS-1:0]             xlate_req_valid,
  output logic [NHARTS-1:0]             xlate_req_ready,
  input  logic [NHARTS-1:0][63:0]       xlate_vaddr,
  input  logic [NHARTS-1:0][1:0]        xlate_acc,
  input  logic [NHARTS-1:0]             xlate_virt,
  input  logic [NHARTS-1:0]             xlate_user,
  input  logic [NHARTS-1:0]             xlate_sfence,
  input  logic [NHARTS-1:0]             xlate_hfence,
  output logic [NHARTS-1:0]             xlate_resp_valid,
  output logic [NHARTS-1:0][55:0]       xlate_paddr,
  output logic [NHARTS-1:0]             xlate_fault,
  output logic [NHARTS-1:0][5:0]        xlate_cause,
  output logic [NHARTS-1:0][63:0]       xlate_gpa,
  output logic [NHARTS-1:0]             xlate_gva,
  output logic [NHARTS-1:0]             xlate_hit,
  output logic [NHARTS-1:0]             ptw_mem_req_valid,
  input  logic [NHARTS-1:0]             ptw_mem_req_ready,
  output logic [NHARTS-1:0][55:0]       ptw_mem_req_addr,
  input  logic [NHARTS-1:0]             ptw_mem_rsp_valid,
  input  logic [NHARTS-1:0][63:0]       ptw_mem_rsp_data,
  // interrupt lines into each hart, for observation
  output logic [NHARTS-1:0]             hart_msip,
  output logic [NHARTS-1:0]             hart_mtip,
  output logic [NHARTS-1:0]             hart_stip,
  output logic [NHARTS-1:0]             hart_vstip,
  output logic [NHARTS-1:0]             hart_meip,
  output logic [NHARTS-1:0]             hart_seip,
  output logic [NHARTS-1:0][NGUEST:1]   hart_geip,
  output logic [63:0]                   mtime
);
  localparam int unsigned NDEV = NEXT_IRQ + 1;

  localparam logic [31:0] CLINT_BASE = 32'h0200_0000;
  localparam logic [31:0] PLIC_BASE  = 32'h0C00_0000;
  localparam logic [31:0] TIMER_BASE = 32'h2200_0000;

  // ------------------------------------------------------------ MMIO decode
  logic sel_clint, sel_plic, sel_timer;
  assign sel_clint = mmio_addr[31:18] == CLINT_BASE[31:18];
  assign sel_plic  = mmio_addr >= PLIC_BASE && mmio_addr < PLIC_BASE + 32'h1000_0000;
  assign sel_timer = mmio_addr[31:5]  == TIMER_BASE[31:5];

  logic [63:0] clint_rdata, timer_rdata;
  logic [31:0] plic_rdata, plic_wdata;
  logic        plic_lane;
  logic [31:0] plic_off;
  logic        plic_wr_ok;
  assign plic_off   = mmio_addr - PLIC_BASE;
  assign plic_lane  = mmio_addr[2];
  assign plic_wdata = plic_lane ? mmio_wdata[63:32] : mmio_wdata[31:0];
  assign plic_wr_ok = !mmio_write || mmio_wstrb[plic_lane ? 4 : 0];

  always_comb begin
    mmio_rdata = '0;
    if (sel_clint)      mmio_rdata = clint_rdata;
    else if (sel_timer) mmio_rdata = timer_rdata;
    else if (sel_plic)  mmio_rdata = plic_lane ? {plic_rdata, 32'd0} : {32'd0, plic_rdata};
  end

  // ------------------------------------------------------------------ CLINT
  clint_virt #(.NHARTS(NHARTS)) u_clint (
    .clk, .rst_n, .rtc_tick,
    .req_valid (mmio_valid && sel_clint),
    .req_write (mmio_write),
    .req_addr  (mmio_addr[17:0]),
    .req_wdata (mmio_wdata),
    .req_wstrb (mmio_wstrb),
    .rsp_rdata (clint_rdata),
    .msip      (hart_msip),
    .mtip      (hart_mtip),
    .stip      (hart_stip),
    .vstip     (hart_vstip),
    .mtime_o   (mtime)
  );

  // ------------------------------------------------------ latency timer
  logic timer_irq;
  irq_latency_timer u_timer (
    .clk, .rst_n,
    .req_valid (mmio_valid && sel_timer),
    .req_write (mmio_write),
    .req_addr  (mmio_addr[4:0]),
    .req_wdata (mmio_wdata),
    .rsp_rdata (timer_rdata),
    .irq       (timer_irq)
  );

  // ------------------------------------------------------------------- PLIC
  plic_virt #(
    .NHARTS(NHARTS), .NGUEST(NGUEST), .NDEV(NDEV),
    .NVIRT_BLKS(NVIRT_BLKS), .NVIIR(NVIIR), .PRIO_BITS(PRIO_BITS)
  ) u_plic (
    .clk, .rst_n,
    .dev_irq   ({timer_irq, ext_irq}),
    .req_valid (mmio_valid && sel_plic && plic_wr_ok),
    .req_write (mmio_write),
    .req_addr  (plic_off[27:0]),
    .req_wdata (plic_wdata),
    .rsp_rdata (plic_rdata),
    .meip      (hart_meip),
    .seip      (hart_seip),
    .geip      (hart_geip)
  );

  // ------------------------------------------- harts' CSRs and MMUs
  for (genvar h = 0; h < NHARTS; h++) begin : g_hart
    hext_csr #(.GELEN(NGUEST)) u_csr (
      .clk, .rst_n,
      .msip    (hart_msip[h]),
      .mtip    (hart_mtip[h]),
      .stip    (hart_stip[h]),
      .vstip   (hart_vstip[h]),
      .meip    (hart_meip[h]),
      .seip    (hart_seip[h]),
      .geip    (hart_geip[h]),
      .req     (core_req[h]),
      .rsp     (core_rsp[h]),
      .satp_o  (satp[h]),
      .vsatp_o (vsatp[h]),
      .hgatp_o (hgatp[h])
    );

    tlb_2stage #(.NENTRIES(NTLB)) u_tlb (
      .clk, .rst_n,
      .req_valid     (xlate_req_valid[h]),
      .req_ready     (xlate_req_ready[h]),
      .req_vaddr     (xlate_vaddr[h]),
      .req_acc       (xlate_acc[h]),
      .req_virt      (xlate_virt[h]),
      .req_user      (xlate_user[h]),
      .sfence_vma    (xlate_sfence[h]),
      .hfence        (xlate_hfence[h]),
      .satp          (satp[h]),
      .vsatp         (vsatp[h]),
      .hgatp         (hgatp[h]),
      .mem_req_valid (ptw_mem_req_valid[h]),
      .mem_req_ready (ptw_mem_req_ready[h]),
      .mem_req_addr  (ptw_mem_req_addr[h]),
      .mem_rsp_valid (ptw_mem_rsp_valid[h]),
      .mem_rsp_data  (ptw_mem_rsp_data[h]),
      .resp_valid    (xlate_resp_valid[h]),
      .resp_paddr    (xlate_paddr[h]),
      .resp_fault    (xlate_fault[h]),
      .resp_cause    (xlate_cause[h]),
      .resp_gpa      (xlate_gpa[h]),
      .resp_gva      (xlate_gva[h]),
      .resp_hit      (xlate_hit[h])
    );
  end

endmodule
