// hv_pkg: types and constants shared by the virtualization platform.
//
// Holds the privilege-mode encoding, the interrupt bit positions of mip/hip,
// the trap cause codes of the hypervisor extension, the CSR addresses used by
// the per-hart CSR unit, the layout of a virtual interrupt injection register
// (VIIR) and the register offsets of the virtualization-aware CLINT and PLIC.
// Cause codes and VIIR field positions follow the design description; CSR
// addresses and bit positions inside mstatus/hstatus follow the RISC-V
// privileged specification, since the description does not list them.
package hv_pkg;

  // ---------------------------------------------------------------- privilege
  typedef enum logic [1:0] {
    PRV_U = 2'd0,
    PRV_S = 2'd1,
    PRV_M = 2'd3
  } priv_e;

  // ------------------------------------------------------ interrupt positions
  localparam int IRQ_SSI  = 1;
  localparam int IRQ_VSSI = 2;
  localparam int IRQ_MSI  = 3;
  localparam int IRQ_STI  = 5;
  localparam int IRQ_VSTI = 6;
  localparam int IRQ_MTI  = 7;
  localparam int IRQ_SEI  = 9;
  localparam int IRQ_VSEI = 10;
  localparam int IRQ_MEI  = 11;
  localparam int IRQ_SGEI = 12;

  // Interrupts that belong to the VS level (hideleg can only delegate these).
  localparam logic [63:0] VS_IRQ_MASK = 64'h0444;
  // Interrupts that belong to HS level and VS level (hip/hie view).
  localparam logic [63:0] HS_IRQ_MASK = 64'h1444;

  // -------------------------------------------------------- exception causes
  localparam logic [5:0] EXC_ECALL_U     = 6'd8;
  localparam logic [5:0] EXC_ECALL_S     = 6'd9;
  localparam logic [5:0] EXC_ECALL_VS    = 6'd10;
  localparam logic [5:0] EXC_ECALL_M     = 6'd11;
  localparam logic [5:0] EXC_ILLEGAL     = 6'd2;
  localparam logic [5:0] EXC_INST_GPF    = 6'd20;
  localparam logic [5:0] EXC_LOAD_GPF    = 6'd21;
  localparam logic [5:0] EXC_VIRT_INST   = 6'd22;
  localparam logic [5:0] EXC_STORE_GPF   = 6'd23;

  // ------------------------------------------------------------ CSR addresses
  localparam logic [11:0] CSR_SSTATUS   = 12'h100;
  localparam logic [11:0] CSR_SIE       = 12'h104;
  localparam logic [11:0] CSR_STVEC     = 12'h105;
  localparam logic [11:0] CSR_SSCRATCH  = 12'h140;
  localparam logic [11:0] CSR_SEPC      = 12'h141;
  localparam logic [11:0] CSR_SCAUSE    = 12'h142;
  localparam logic [11:0] CSR_STVAL     = 12'h143;
  localparam logic [11:0] CSR_SIP       = 12'h144;
  localparam logic [11:0] CSR_SATP      = 12'h180;
  localparam logic [11:0] CSR_VSSTATUS  = 12'h200;
  localparam logic [11:0] CSR_VSIE      = 12'h204;
  localparam logic [11:0] CSR_VSTVEC    = 12'h205;
  localparam logic [11:0] CSR_VSSCRATCH = 12'h240;
  localparam logic [11:0] CSR_VSEPC     = 12'h241;
  localparam logic [11:0] CSR_VSCAUSE   = 12'h242;
  localparam logic [11:0] CSR_VSTVAL    = 12'h243;
  localparam logic [11:0] CSR_VSIP      = 12'h244;
  localparam logic [11:0] CSR_VSATP     = 12'h280;
  localparam logic [11:0] CSR_HSTATUS   = 12'h600;
  localparam logic [11:0] CSR_HEDELEG   = 12'h602;
  localparam logic [11:0] CSR_HIDELEG   = 12'h603;
  localparam logic [11:0] CSR_HIE       = 12'h604;
  localparam logic [11:0] CSR_HCOUNTEREN= 12'h606;
  localparam logic [11:0] CSR_HGEIE     = 12'h607;
  localparam logic [11:0] CSR_HTVAL     = 12'h643;
  localparam logic [11:0] CSR_HIP       = 12'h644;
  localparam logic [11:0] CSR_HVIP      = 12'h645;
  localparam logic [11:0] CSR_HTINST    = 12'h64A;
  localparam logic [11:0] CSR_HGATP     = 12'h680;
  localparam logic [11:0] CSR_HGEIP     = 12'hE12;
  localparam logic [11:0] CSR_MSTATUS   = 12'h300;
  localparam logic [11:0] CSR_MEDELEG   = 12'h302;
  localparam logic [11:0] CSR_MIDELEG   = 12'h303;
  localparam logic [11:0] CSR_MIE       = 12'h304;
  localparam logic [11:0] CSR_MTVEC     = 12'h305;
  localparam logic [11:0] CSR_MSCRATCH  = 12'h340;
  localparam logic [11:0] CSR_MEPC      = 12'h341;
  localparam logic [11:0] CSR_MCAUSE    = 12'h342;
  localparam logic [11:0] CSR_MTVAL     = 12'h343;
  localparam logic [11:0] CSR_MIP       = 12'h344;
  localparam logic [11:0] CSR_MTINST    = 12'h34A;
  localparam logic [11:0] CSR_MTVAL2    = 12'h34B;

  // CSR operation requested by the pipeline.
  typedef enum logic [1:0] {
    CSR_OP_WRITE = 2'd0,
    CSR_OP_SET   = 2'd1,
    CSR_OP_CLEAR = 2'd2,
    CSR_OP_READ  = 2'd3
  } csr_op_e;


  // ------------------------------------------------- pipeline <-> CSR unit
  // One event per cycle from the pipeline of a hart. At most one of csr,
  // sret, mret, wfi, hlsv, exc and take_irq is set.
  typedef struct packed {
    logic        csr;        // CSR instruction
    csr_op_e     csr_op;
    logic [11:0] csr_addr;
    logic [63:0] csr_wdata;
    logic        sret;
    logic        mret;
    logic        wfi;
    logic        hlsv;       // hypervisor virtual-machine load/store
    logic        exc;        // synchronous exception raised by the pipeline
    logic [5:0]  exc_cause;
    logic [63:0] tval;       // faulting address (exceptions)
    logic        gva;        // tval holds a guest virtual address
    logic [63:0] gpa;        // guest physical address (guest-page faults)
    logic        take_irq;   // pipeline takes the pending interrupt now
    logic [63:0] pc;         // pc of the instruction of this event
    logic [31:0] insn;       // instruction bits (trap value of illegal/virtual)
  } core_req_t;

  typedef struct packed {
    logic [63:0] csr_rdata;   // old value of the CSR (valid with req.csr)
    logic        redirect;    // trap taken or xret: fetch from redirect_pc
    logic [63:0] redirect_pc;
    logic        trap;        // a trap was taken this cycle
    logic        irq_pending; // an enabled interrupt is waiting
    logic [1:0]  priv;        // current privilege level
    logic        virt;        // current virtualization mode (V)
  } core_rsp_t;

  // ---------------------------------------------------------- mstatus fields
  localparam int MS_SIE  = 1;
  localparam int MS_MIE  = 3;
  localparam int MS_SPIE = 5;
  localparam int MS_MPIE = 7;
  localparam int MS_SPP  = 8;
  localparam int MS_MPP  = 11;  // two bits, 12:11
  localparam int MS_TVM  = 20;
  localparam int MS_TW   = 21;
  localparam int MS_TSR  = 22;
  localparam int MS_GVA  = 38;
  localparam int MS_MPV  = 39;

  // ---------------------------------------------------------- hstatus fields
  localparam int HS_GVA   = 6;
  localparam int HS_SPV   = 7;
  localparam int HS_SPVP  = 8;
  localparam int HS_HU    = 9;
  localparam int HS_VGEIN = 12; // six bits, 17:12
  localparam int HS_VTVM  = 20;
  localparam int HS_VTW   = 21;
  localparam int HS_VTSR  = 22;

  // ------------------------------------------------------- PLIC injection reg
  // 31..21 reserved, 20..11 priority, 10..1 interrupt ID, 0 in-flight.
  typedef struct packed {
    logic [10:0] rsv;
    logic [9:0]  prio;
    logic [9:0]  int_id;
    logic        in_flight;
  } viir_t;

  function automatic logic viir_pending(viir_t r);
    return (r.int_id != '0) && !r.in_flight;
  endfunction

  // ------------------------------------------------------------ PLIC offsets
  localparam logic [27:0] PLIC_PRIO_BASE   = 28'h000_0000;
  localparam logic [27:0] PLIC_PEND_BASE   = 28'h000_1000;
  localparam logic [27:0] PLIC_ENABLE_BASE = 28'h000_2000;
  localparam logic [27:0] PLIC_CTX_BASE    = 28'h020_0000;
  localparam logic [27:0] PLIC_VCIBIR_BASE = 28'h400_0000;
  localparam logic [27:0] PLIC_VIIR_BASE   = 28'h401_0000;
  localparam logic [27:0] PLIC_IBMSR_BASE  = 28'h411_0000;

  // ------------------------------------------------------------ CLINT offsets
  localparam logic [17:0] CLINT_MSIP_BASE      = 18'h0_0000;
  localparam logic [17:0] CLINT_MTIMECMP_BASE  = 18'h0_4000;
  localparam logic [17:0] CLINT_MTIME          = 18'h0_BFF8;
  localparam logic [17:0] CLINT_STIMECMP_BASE  = 18'h0_C000;
  localparam logic [17:0] CLINT_VSTIME_BASE    = 18'h1_4000;
  localparam logic [17:0] CLINT_STIME          = 18'h1_BFF8;
  localparam logic [17:0] CLINT_VSTIMECMP_BASE = 18'h1_C000;
  localparam logic [17:0] CLINT_HTIMEDELTA_BASE= 18'h2_4000;

endpackage
