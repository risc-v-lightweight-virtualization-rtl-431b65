// clint_virt: core-local interrupter with timer virtualization.
//
// A single 64-bit mtime counter advances on every rtc_tick. Each hart owns a
// software-interrupt bit (msip) and three timer comparators: the machine one
// (mtime >= mtimecmp), the supervisor one (stime >= stimecmp, where stime is
// a read-only replica of mtime) and the virtual-supervisor one
// (vstime >= vstimecmp, where vstime = mtime + htimedelta of that hart). The
// comparator outputs drive mtip, stip and vstip directly, so a hypervisor or
// guest can arm its own timer without trapping to machine mode.
//
// Register map (byte offsets, every 64-bit register 8-byte aligned):
//   msip n        0x00000 + 4n    bit 0, R/W
//   mtimecmp n    0x04000 + 8n    R/W
//   mtime         0x0BFF8         R/W
//   stimecmp n    0x0C000 + 8n    R/W
//   vstime n      0x14000 + 8n    RO  (mtime + htimedelta n)
//   stime         0x1BFF8         RO  (replica of mtime)
//   vstimecmp n   0x1C000 + 8n    R/W
//   htimedelta n  0x24000 + 8n    R/W
// The map, the reset values (all zero), the >= comparisons and the output
// signals follow the design description. The bus is this design's own choice:
// a single-cycle register port with a 64-bit data path and byte strobes;
// reads are combinational and have no side effects, writes take effect at the
// next clock edge. A write to mtime takes priority over the tick in the same
// cycle. INT_STAGES adds that many register stages on each interrupt output
// (0 by default, outputs are then combinational from the registers).
module clint_virt #(
  parameter int unsigned NHARTS     = 6,
  parameter int unsigned INT_STAGES = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rtc_tick,
  // register port
  input  logic                     req_valid,
  input  logic                     req_write,
  input  logic [17:0]              req_addr,
  input  logic [63:0]              req_wdata,
  input  logic [7:0]               req_wstrb,
  output logic [63:0]              rsp_rdata,
  // interrupt lines, one per hart
  output logic [NHARTS-1:0]        msip,
  output logic [NHARTS-1:0]        mtip,
  output logic [NHARTS-1:0]        stip,
  output logic [NHARTS-1:0]        vstip,
  // current time, for observation
  output logic [63:0]              mtime_o
);
  import hv_pkg::*;

  logic [63:0]             mtime;
  logic [NHARTS-1:0]       msip_q;
  logic [NHARTS-1:0][63:0] mtimecmp, stimecmp, vstimecmp, htimedelta, vstime;

  // Byte-strobe merge of a 64-bit register.
  function automatic logic [63:0] merge(logic [63:0] old, logic [63:0] wd, logic [7:0] st);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[8*b +: 8] = st[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  logic        wr;
  logic [17:0] waddr;   // 8-byte aligned word address
  assign wr    = req_valid && req_write;
  assign waddr = {req_addr[17:3], 3'b000};

  // Per-hart register hit test: base + 8n.
  function automatic logic hit8(logic [17:0] a, logic [17:0] base, int unsigned n);
    return a == base + 18'(8 * n);
  endfunction

  always_comb
    for (int unsigned h = 0; h < NHARTS; h++) vstime[h] = mtime + htimedelta[h];

  // mtime counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           mtime <= '0;
    else if (wr && waddr == CLINT_MTIME)  mtime <= merge(mtime, req_wdata, req_wstrb);
    else if (rtc_tick)                    mtime <= mtime + 64'd1;
  end

  // per-hart registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msip_q     <= '0;
      mtimecmp   <= '0;
      stimecmp   <= '0;
      vstimecmp  <= '0;
      htimedelta <= '0;
    end else if (wr) begin
      for (int unsigned h = 0; h < NHARTS; h++) begin
        // msip n at 4n: hart n sits in word n/2, lane n%2
        if (waddr == CLINT_MSIP_BASE + 18'(8 * (h / 2)) && req_wstrb[4 * (h % 2)])
          msip_q[h] <= req_wdata[32 * (h % 2)];
        if (hit8(waddr, CLINT_MTIMECMP_BASE, h))
          mtimecmp[h] <= merge(mtimecmp[h], req_wdata, req_wstrb);
        if (hit8(waddr, CLINT_STIMECMP_BASE, h))
          stimecmp[h] <= merge(stimecmp[h], req_wdata, req_wstrb);
        if (hit8(waddr, CLINT_VSTIMECMP_BASE, h))
          vstimecmp[h] <= merge(vstimecmp[h], req_wdata, req_wstrb);
        if (hit8(waddr, CLINT_HTIMEDELTA_BASE, h))
          htimedelta[h] <= merge(htimedelta[h], req_wdata, req_wstrb);
      end
    end
  end

  // read mux
  always_comb begin
    rsp_rdata = '0;
    if (waddr == CLINT_MTIME || waddr == CLINT_STIME) rsp_rdata = mtime;
    for (int unsigned h = 0; h < NHARTS; h++) begin
      if (waddr == CLINT_MSIP_BASE + 18'(8 * (h / 2)))
        rsp_rdata[32 * (h % 2)] = msip_q[h];
      if (hit8(waddr, CLINT_MTIMECMP_BASE, h))   rsp_rdata = mtimecmp[h];
      if (hit8(waddr, CLINT_STIMECMP_BASE, h))   rsp_rdata = stimecmp[h];
      if (hit8(waddr, CLINT_VSTIME_BASE, h))     rsp_rdata = vstime[h];
      if (hit8(waddr, CLINT_VSTIMECMP_BASE, h))  rsp_rdata = vstimecmp[h];
      if (hit8(waddr, CLINT_HTIMEDELTA_BASE, h)) rsp_rdata = htimedelta[h];
    end
  end

  // comparators
  logic [NHARTS-1:0] msip_c, mtip_c, stip_c, vstip_c;
  always_comb begin
    for (int unsigned h = 0; h < NHARTS; h++) begin
      msip_c[h]  = msip_q[h];
      mtip_c[h]  = mtime     >= mtimecmp[h];
      stip_c[h]  = mtime     >= stimecmp[h];   // stime is mtime
      vstip_c[h] = vstime[h] >= vstimecmp[h];
    end
  end

  // optional output register stages
  if (INT_STAGES == 0) begin : g_direct
    assign msip  = msip_c;
    assign mtip  = mtip_c;
    assign stip  = stip_c;
    assign vstip = vstip_c;
  end else begin : g_staged
    logic [INT_STAGES-1:0][4*NHARTS-1:0] sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sr <= '0;
      else begin
        sr[0] <= {vstip_c, stip_c, mtip_c, msip_c};
        for (int s = 1; s < int'(INT_STAGES); s++) sr[s] <= sr[s-1];
      end
    end
    assign {vstip, stip, mtip, msip} = sr[INT_STAGES-1];
  end

  assign mtime_o = mtime;

endmodule
