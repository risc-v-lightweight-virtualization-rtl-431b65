// plic_virt: platform-level interrupt controller with virtualization support.
//
// Besides the machine and supervisor contexts of every hart, the controller
// has NGUEST virtual-supervisor (VS) contexts per hart. The external
// interrupt line of VS context g of a hart drives bit g+1 of that hart's
// hgeip, so a guest can receive, claim and complete interrupts of devices
// assigned to it without the hypervisor stepping in.
//
// Pure virtual interrupts are injected through injection blocks. Each block
// holds NVIIR virtual interrupt injection registers (VIIR: priority,
// interrupt ID, in-flight flag). A context attaches one block by writing the
// block number (1..NVIRT_BLKS, 0 = none) to its VCIBIR. The registers of the
// attached block then compete with the context's physical sources in the
// context's fan-in: physical pending bits and priorities are first formatted
// as injection registers and placed ahead of the virtual ones. A claim of a
// virtual interrupt sets its in-flight flag; a complete of it clears the
// interrupt ID and the flag, which frees the register. A claim of a physical
// interrupt clears its pending bit and keeps the gateway blocked until the
// complete. Each block has a management interrupt, fed back as an ordinary
// source, signalling two events: no register of the block pending, and a
// complete written with an ID that is neither in flight in the block nor an
// enabled physical source of the context. Its IBMSR enables the events and
// shows their status.
//
// Sources: IDs 1..NDEV are device lines, IDs NDEV+1..NDEV+NVIRT_BLKS are the
// block management interrupts of blocks 1..NVIRT_BLKS.
// Contexts: context c = hart*(2+NGUEST) + k, k = 0 M-mode, 1 S-mode,
// 2.. VS contexts 1..NGUEST of that hart.
//
// Register map (byte offsets, 32-bit registers):
//   priority i           0x0000000 + 4i
//   pending              0x0001000 + 4w          RO
//   enable c             0x0002000 + 0x80c + 4w
//   threshold c          0x0200000 + 0x1000c
//   claim/complete c     0x0200004 + 0x1000c
//   vcibir c             0x4000000 + 4c
//   viir j of block n    0x4010000 + 0x1000n + 4j
//   ibmsr of block n     0x4110000 + 4n
// VIIR layout: [20:11] priority, [10:1] interrupt ID, [0] in flight.
// IBMSR layout (this design's choice): [0] enable "no pending" event,
// [1] enable "bad complete" event, [8] "no pending" status (read only),
// [9] "bad complete" status (sticky, write 1 to clear), [25:16] ID of the
// last bad complete (read only).
//
// The map, the VIIR layout, the claim/complete rules, the VS contexts and the
// fan-in ordering follow the design description. The register port is this
// design's own: single cycle, combinational read data, writes and the side
// effect of a claim read at the next clock edge. A read of a claim register
// must therefore be presented for exactly one cycle. A physical priority
// register holds PRIO_BITS bits, thresholds and VIIR priorities 10 bits; a
// context's interrupt line is high while its best priority exceeds its
// threshold.
module plic_virt #(
  parameter int unsigned NHARTS     = 6,
  parameter int unsigned NGUEST     = 1,
  parameter int unsigned NDEV       = 2,
  parameter int unsigned NVIRT_BLKS = 4,
  parameter int unsigned NVIIR      = 4,
  parameter int unsigned PRIO_BITS  = 1,
  localparam int unsigned CPH   = 2 + NGUEST,           // contexts per hart
  localparam int unsigned NCTX  = NHARTS * CPH,
  localparam int unsigned NSRC  = NDEV + NVIRT_BLKS,    // sources 1..NSRC
  localparam int unsigned NREGS = NSRC + NVIIR          // fan-in width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NDEV:1]                dev_irq,
  // register port
  input  logic                         req_valid,
  input  logic                         req_write,
  input  logic [27:0]                  req_addr,
  input  logic [31:0]                  req_wdata,
  output logic [31:0]                  rsp_rdata,
  // context interrupt lines
  output logic [NHARTS-1:0]            meip,
  output logic [NHARTS-1:0]            seip,
  output logic [NHARTS-1:0][NGUEST:1]  geip
);
  import hv_pkg::*;

  localparam int unsigned IW = (NREGS > 1) ? $clog2(NREGS) : 1;

  // ------------------------------------------------------------------ state
  logic [NSRC:1][PRIO_BITS-1:0]  prio;
  logic [NSRC:1]                 pending;
  logic [NCTX-1:0][NSRC:1]       enable;
  logic [NCTX-1:0][9:0]          threshold;
  logic [NCTX-1:0][7:0]          vcibir;
  viir_t [NVIRT_BLKS:1][NVIIR-1:0] viir;
  logic [NVIRT_BLKS:1][1:0]      ibm_en;
  logic [NVIRT_BLKS:1]           ibm_badc;
  logic [NVIRT_BLKS:1][9:0]      ibm_badid;

  // --------------------------------------------------------------- gateways
  logic [NSRC:1] gw_irq, gw_valid, gw_ready, gw_complete;
  logic [NVIRT_BLKS:1] blk_np, blk_irq;

  always_comb begin
    for (int unsigned b = 1; b <= NVIRT_BLKS; b++) begin
      blk_np[b] = 1'b1;
      for (int unsigned j = 0; j < NVIIR; j++)
        if (viir_pending(viir[b][j])) blk_np[b] = 1'b0;
      blk_irq[b] = (ibm_en[b][0] && blk_np[b]) || (ibm_en[b][1] && ibm_badc[b]);
    end
    for (int unsigned s = 1; s <= NSRC; s++)
      gw_irq[s] = (s <= NDEV) ? dev_irq[s] : blk_irq[s - NDEV];
  end

  assign gw_ready = ~pending;

  for (genvar s = 1; s <= NSRC; s++) begin : g_gw
    plic_gateway u_gw (
      .clk, .rst_n,
      .irq      (gw_irq[s]),
      .valid    (gw_valid[s]),
      .ready    (gw_ready[s]),
      .complete (gw_complete[s])
    );
  end

  // --------------------------------------------- format and fan-in per context
  viir_t [NCTX-1:0][NREGS-1:0]  inj;
  logic  [NCTX-1:0][NREGS-1:0]  inj_en;
  logic  [NCTX-1:0][9:0]        ctx_max, ctx_id;
  logic  [NCTX-1:0][IW-1:0]     ctx_reg;
  logic  [NCTX-1:0]             ctx_hit;
  logic  [NCTX-1:0]             ctx_has_blk;

  function automatic logic blk_valid(logic [7:0] v);
    return v != 8'd0 && 32'(v) <= NVIRT_BLKS;
  endfunction

  always_comb begin
    for (int unsigned c = 0; c < NCTX; c++) begin
      ctx_has_blk[c] = blk_valid(vcibir[c]);
      for (int unsigned s = 1; s <= NSRC; s++) begin
        inj[c][s-1].rsv       = '0;
        inj[c][s-1].prio      = 10'(prio[s]);
        inj[c][s-1].int_id    = pending[s] ? 10'(s) : 10'd0;
        inj[c][s-1].in_flight = 1'b0;
        inj_en[c][s-1]        = enable[c][s];
      end
      for (int unsigned j = 0; j < NVIIR; j++) begin
        inj[c][NSRC+j] = '0;
        for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
          if (ctx_has_blk[c] && 32'(vcibir[c]) == b) inj[c][NSRC+j] = viir[b][j];
        inj_en[c][NSRC+j] = 1'b1;
      end
    end
  end

  for (genvar c = 0; c < NCTX; c++) begin : g_fanin
    plic_fanin_virt #(.NREGS(NREGS)) u_fanin (
      .inj      (inj[c]),
      .enable   (inj_en[c]),
      .max_prio (ctx_max[c]),
      .int_id   (ctx_id[c]),
      .reg_idx  (ctx_reg[c]),
      .hit      (ctx_hit[c])
    );
  end

  // context interrupt lines
  always_comb begin
    for (int unsigned h = 0; h < NHARTS; h++) begin
      meip[h] = ctx_max[h*CPH]     > threshold[h*CPH];
      seip[h] = ctx_max[h*CPH + 1] > threshold[h*CPH + 1];
      for (int unsigned g = 1; g <= NGUEST; g++)
        geip[h][g] = ctx_max[h*CPH + 1 + g] > threshold[h*CPH + 1 + g];
    end
  end

  // ---------------------------------------------------------- address decode
  typedef enum logic [3:0] {
    R_NONE, R_PRIO, R_PEND, R_ENABLE, R_THRESH, R_CLAIM, R_VCIBIR, R_VIIR, R_IBMSR
  } region_e;

  region_e     region;
  logic [27:0] off;
  int unsigned idx_a, idx_b;   // region-dependent indices

  always_comb begin
    region = R_NONE;
    off    = '0;
    idx_a  = 0;
    idx_b  = 0;
    if (req_addr < 28'h000_1000) begin
      region = R_PRIO;   idx_a = 32'(req_addr[11:2]);
    end else if (req_addr < 28'h000_2000) begin
      region = R_PEND;   idx_a = 32'(req_addr[11:2]);
    end else if (req_addr < PLIC_CTX_BASE) begin
      off    = req_addr - PLIC_ENABLE_BASE;
      region = R_ENABLE; idx_a = 32'(off[27:7]); idx_b = 32'(off[6:2]);
    end else if (req_addr < PLIC_VCIBIR_BASE) begin
      off    = req_addr - PLIC_CTX_BASE;
      idx_a  = 32'(off[27:12]);
      if (off[11:0] == 12'h000)      region = R_THRESH;
      else if (off[11:0] == 12'h004) region = R_CLAIM;
    end else if (req_addr < PLIC_VIIR_BASE) begin
      off    = req_addr - PLIC_VCIBIR_BASE;
      region = R_VCIBIR; idx_a = 32'(off[15:2]);
    end else if (req_addr < PLIC_IBMSR_BASE) begin
      off    = req_addr - PLIC_VIIR_BASE;
      region = R_VIIR;   idx_a = 32'(off[27:12]); idx_b = 32'(off[11:2]);
    end else if (req_addr < PLIC_IBMSR_BASE + 28'h1000) begin
      off    = req_addr - PLIC_IBMSR_BASE;
      region = R_IBMSR;  idx_a = 32'(off[11:2]);
    end
  end

  // ------------------------------------------------------------------- reads
  always_comb begin
    rsp_rdata = '0;
    unique case (region)
      R_PRIO:   for (int unsigned s = 1; s <= NSRC; s++)
                  if (idx_a == s) rsp_rdata = 32'(prio[s]);
      R_PEND:   for (int unsigned s = 1; s <= NSRC; s++)
                  if (idx_a == s / 32) rsp_rdata[s % 32] = pending[s];
      R_ENABLE: for (int unsigned c = 0; c < NCTX; c++)
                  for (int unsigned s = 1; s <= NSRC; s++)
                    if (idx_a == c && idx_b == s / 32) rsp_rdata[s % 32] = enable[c][s];
      R_THRESH: for (int unsigned c = 0; c < NCTX; c++)
                  if (idx_a == c) rsp_rdata = 32'(threshold[c]);
      R_CLAIM:  for (int unsigned c = 0; c < NCTX; c++)
                  if (idx_a == c) rsp_rdata = 32'(ctx_id[c]);
      R_VCIBIR: for (int unsigned c = 0; c < NCTX; c++)
                  if (idx_a == c) rsp_rdata = 32'(vcibir[c]);
      R_VIIR:   for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
                  for (int unsigned j = 0; j < NVIIR; j++)
                    if (idx_a == b && idx_b == j) rsp_rdata = {11'd0, viir[b][j][20:0]};
      R_IBMSR:  for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
                  if (idx_a == b)
                    rsp_rdata = {6'd0, ibm_badid[b], 6'd0, ibm_badc[b], blk_np[b], 6'd0, ibm_en[b]};
      default:  rsp_rdata = '0;
    endcase
  end

  // --------------------------------------------------- claim / complete logic
  logic rd, wr;
  assign rd = req_valid && !req_write;
  assign wr = req_valid &&  req_write;

  // The context addressed by a claim or complete, and its attached block.
  int unsigned cc_ctx;
  int unsigned cc_blk;
  logic        cc_valid;
  always_comb begin
    cc_ctx   = idx_a;
    cc_valid = (region == R_CLAIM) && (idx_a < NCTX);
    cc_blk   = 0;
    for (int unsigned c = 0; c < NCTX; c++)
      if (idx_a == c && ctx_has_blk[c]) cc_blk = 32'(vcibir[c]);
  end

  // Complete decoding: virtual register hit, physical source, or neither.
  logic              cpl_virt, cpl_phys, cpl_bad;
  int unsigned       cpl_reg;
  logic [9:0]        cpl_id;
  assign cpl_id = req_wdata[9:0];

  always_comb begin
    cpl_virt = 1'b0;
    cpl_phys = 1'b0;
    cpl_reg  = 0;
    if (wr && cc_valid) begin
      for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
        for (int i = int'(NVIIR) - 1; i >= 0; i--)
          if (cc_blk == b && viir[b][i].in_flight && viir[b][i].int_id == cpl_id
              && cpl_id != '0) begin
            cpl_virt = 1'b1;
            cpl_reg  = 32'(i);
          end
      if (!cpl_virt)
        for (int unsigned c = 0; c < NCTX; c++)
          for (int unsigned s = 1; s <= NSRC; s++)
            if (cc_ctx == c && 32'(cpl_id) == s && enable[c][s]) cpl_phys = 1'b1;
    end
    cpl_bad = wr && cc_valid && !cpl_virt && !cpl_phys && cc_blk != 0;
  end

  always_comb begin
    gw_complete = '0;
    for (int unsigned s = 1; s <= NSRC; s++)
      if (cpl_phys && 32'(cpl_id) == s) gw_complete[s] = 1'b1;
  end

  // Claim decoding: which fan-in result is taken.
  logic        clm_any, clm_virt;
  logic [9:0]  clm_id;
  int unsigned clm_reg;
  always_comb begin
    clm_any  = 1'b0;
    clm_virt = 1'b0;
    clm_id   = '0;
    clm_reg  = 0;
    for (int unsigned c = 0; c < NCTX; c++)
      if (rd && cc_valid && cc_ctx == c && ctx_hit[c]) begin
        clm_any = 1'b1;
        clm_id  = ctx_id[c];
        clm_reg = 32'(ctx_reg[c]);
      end
    clm_virt = clm_any && clm_reg >= NSRC;
  end

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio      <= '0;
      pending   <= '0;
      enable    <= '0;
      threshold <= '0;
      vcibir    <= '0;
      viir      <= '0;
      ibm_en    <= '0;
      ibm_badc  <= '0;
      ibm_badid <= '0;
    end else begin
      // pending bits: set by a gateway request, cleared by a claim
      for (int unsigned s = 1; s <= NSRC; s++)
        if (gw_valid[s] && gw_ready[s]) pending[s] <= 1'b1;
      if (clm_any && !clm_virt)
        for (int unsigned s = 1; s <= NSRC; s++)
          if (32'(clm_id) == s) pending[s] <= 1'b0;

      // virtual claim: mark the register in flight
      if (clm_virt)
        for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
          for (int unsigned j = 0; j < NVIIR; j++)
            if (cc_blk == b && clm_reg == NSRC + j) viir[b][j].in_flight <= 1'b1;

      // virtual complete: free the register
      if (cpl_virt)
        for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
          for (int unsigned j = 0; j < NVIIR; j++)
            if (cc_blk == b && cpl_reg == j) begin
              viir[b][j].int_id    <= '0;
              viir[b][j].in_flight <= 1'b0;
            end

      // complete of an ID that is not present: block management event
      if (cpl_bad)
        for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
          if (cc_blk == b) begin
            ibm_badc[b]  <= 1'b1;
            ibm_badid[b] <= cpl_id;
          end

      // register writes
      if (wr) begin
        unique case (region)
          R_PRIO:   for (int unsigned s = 1; s <= NSRC; s++)
                      if (idx_a == s) prio[s] <= req_wdata[PRIO_BITS-1:0];
          R_ENABLE: for (int unsigned c = 0; c < NCTX; c++)
                      for (int unsigned s = 1; s <= NSRC; s++)
                        if (idx_a == c && idx_b == s / 32) enable[c][s] <= req_wdata[s % 32];
          R_THRESH: for (int unsigned c = 0; c < NCTX; c++)
                      if (idx_a == c) threshold[c] <= req_wdata[9:0];
          R_VCIBIR: for (int unsigned c = 0; c < NCTX; c++)
                      if (idx_a == c) vcibir[c] <= req_wdata[7:0];
          R_VIIR:   for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
                      for (int unsigned j = 0; j < NVIIR; j++)
                        if (idx_a == b && idx_b == j) viir[b][j] <= {11'd0, req_wdata[20:0]};
          R_IBMSR:  for (int unsigned b = 1; b <= NVIRT_BLKS; b++)
                      if (idx_a == b) begin
                        ibm_en[b] <= req_wdata[1:0];
                        if (req_wdata[9]) ibm_badc[b] <= 1'b0;
                      end
          default: ;
        endcase
      end
    end
  end

endmodule
