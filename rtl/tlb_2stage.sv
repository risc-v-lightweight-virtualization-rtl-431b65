// tlb_2stage: translation-lookaside buffer in front of the two-stage walker.
//
// A small fully associative TLB caches finished translations, for both
// host (V=0) and guest (V=1) accesses, and calls the page-table walker
// (ptw_2stage, instantiated here) on a miss. A guest entry holds the direct
// guest-virtual to host-physical mapping together with the guest physical
// address of the page and the permissions of both stages, so that a later
// access that a cached translation does not allow (a store to a page the
// G stage maps read-only, say) still reports a guest-page fault with its GPA
// without walking again. A V bit in each entry separates guest entries from
// the hypervisor's own.
//
// Entries cover one 4 KiB page each: a superpage translation is cached as the
// 4 KiB page that was accessed. Fills use round-robin replacement. Faulting
// walks are not cached. Flushes: sfence_vma clears every V=0 entry and
// hfence clears every V=1 entry, whatever its address or VMID (hgatp's VMID
// is not used for tagging); software issues a flush after changing satp,
// vsatp, hgatp or a page table, and the pipeline sends an sfence.vma executed
// by a guest (V=1) to hfence. The guest bit, the GPA in each entry and the
// all-guest-entries flush follow the hypervisor MMU as described; the entry
// count, full associativity, round-robin replacement and 4 KiB-only entries
// are this design's own, and no walk cache is built. A hit checks {X, W, R}
// of the access in the VS (or single) stage first, then the U bit against
// the access privilege, then the G stage.
//
// Interface and timing: req_valid/req_ready handshake, ready when idle. A hit
// answers with a one-cycle resp_valid pulse on the next cycle; a miss starts
// the walker, and the result (also the fill) comes one cycle after the
// walker's. The walker's memory read port is brought out unchanged. Flushes
// act on the clock edge and are taken only while idle; req_ready is low
// during a flush cycle.
module tlb_2stage #(
  parameter int unsigned NENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [63:0] req_vaddr,
  input  logic [1:0]  req_acc,      // 0 fetch, 1 load, 2 store, 3 hlvx load
  input  logic        req_virt,
  input  logic        req_user,
  input  logic        sfence_vma,   // flush host (V=0) entries
  input  logic        hfence,       // flush guest (V=1) entries
  input  logic [63:0] satp,
  input  logic [63:0] vsatp,
  input  logic [63:0] hgatp,
  // walker memory port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic [55:0] mem_req_addr,
  input  logic        mem_rsp_valid,
  input  logic [63:0] mem_rsp_data,
  // result
  output logic        resp_valid,
  output logic [55:0] resp_paddr,
  output logic        resp_fault,
  output logic [5:0]  resp_cause,
  output logic [63:0] resp_gpa,
  output logic        resp_gva,
  output logic        resp_hit      // the result came from the TLB
);
  localparam int unsigned IW = NENTRIES > 1 ? $clog2(NENTRIES) : 1;

  typedef struct packed {
    logic        valid;
    logic        virt;
    logic [26:0] vpn;      // VA[38:12]
    logic [43:0] ppn;
    logic [28:0] gppn;     // GPA[40:12]
    logic [2:0]  vs_xwr;
    logic        vs_u;
    logic [2:0]  g_xwr;
  } entry_t;

  typedef enum logic [1:0] {T_IDLE, T_WALK, T_WAIT} tstate_e;

  entry_t [NENTRIES-1:0] tlb;
  tstate_e               state;
  logic [IW-1:0]         victim;

  logic [63:0] va_q;
  logic [1:0]  acc_q;
  logic        virt_q, user_q;

  // walker
  logic        w_req_valid, w_req_ready;
  logic        w_resp_valid, w_resp_fault, w_resp_gva, w_vs_u;
  logic [55:0] w_resp_paddr;
  logic [5:0]  w_resp_cause;
  logic [63:0] w_resp_gpa, w_leaf_gpa;
  logic [2:0]  w_vs_xwr, w_g_xwr;

  ptw_2stage u_ptw (
    .clk, .rst_n,
    .req_valid (w_req_valid), .req_ready (w_req_ready),
    .req_vaddr (va_q), .req_acc (acc_q), .req_virt (virt_q), .req_user (user_q),
    .satp, .vsatp, .hgatp,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rsp_valid, .mem_rsp_data,
    .resp_valid (w_resp_valid), .resp_paddr (w_resp_paddr), .resp_fault (w_resp_fault),
    .resp_cause (w_resp_cause), .resp_gpa (w_resp_gpa), .resp_gva (w_resp_gva),
    .resp_vs_xwr (w_vs_xwr), .resp_vs_u (w_vs_u), .resp_g_xwr (w_g_xwr),
    .resp_leaf_gpa (w_leaf_gpa)
  );

  assign w_req_valid = state == T_WALK;
  assign req_ready   = state == T_IDLE && !sfence_vma && !hfence;

  // ---------------------------------------------------------------- lookup
  // Only canonical Sv39 addresses may hit; a non-canonical one goes to the
  // walker, which reports the fault. With translation off the walker is
  // cheap (no memory reads), so bare translations are cached the same way.
  logic          hit;
  logic [IW-1:0] hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < NENTRIES; i++) begin
      if (!hit && tlb[i].valid && tlb[i].virt == req_virt &&
          tlb[i].vpn == req_vaddr[38:12] && req_vaddr[63:39] == {25{req_vaddr[38]}}) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  function automatic logic [2:0] acc_bit(logic [1:0] a);
    return a == 2'd0 || a == 2'd3 ? 3'b100 : a == 2'd2 ? 3'b010 : 3'b001;
  endfunction

  function automatic logic [5:0] cause_of(logic [1:0] a, logic guest);
    logic [5:0] c;
    unique case (a)
      2'd0:    c = guest ? 6'd20 : 6'd12;
      2'd2:    c = guest ? 6'd23 : 6'd15;
      default: c = guest ? 6'd21 : 6'd13;
    endcase
    return c;
  endfunction

  entry_t he;
  logic   vs_bad, g_bad;
  assign he     = tlb[hit_idx];
  assign vs_bad = (he.vs_xwr & acc_bit(req_acc)) == '0 || he.vs_u != req_user;
  assign g_bad  = (he.g_xwr & acc_bit(req_acc)) == '0;

  // -------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tlb        <= '0;
      state      <= T_IDLE;
      victim     <= '0;
      va_q       <= '0;
      acc_q      <= '0;
      virt_q     <= 1'b0;
      user_q     <= 1'b0;
      resp_valid <= 1'b0;
      resp_paddr <= '0;
      resp_fault <= 1'b0;
      resp_cause <= '0;
      resp_gpa   <= '0;
      resp_gva   <= 1'b0;
      resp_hit   <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        T_IDLE: begin
          if (sfence_vma || hfence) begin
            for (int unsigned i = 0; i < NENTRIES; i++)
              if ((tlb[i].virt && hfence) || (!tlb[i].virt && sfence_vma)) tlb[i].valid <= 1'b0;
          end else if (req_valid) begin
            va_q   <= req_vaddr;
            acc_q  <= req_acc;
            virt_q <= req_virt;
            user_q <= req_user;
            if (hit) begin
              resp_valid <= 1'b1;
              resp_hit   <= 1'b1;
              resp_paddr <= {he.ppn, req_vaddr[11:0]};
              resp_fault <= vs_bad || g_bad;
              resp_cause <= cause_of(req_acc, !vs_bad && g_bad);
              resp_gpa   <= !vs_bad && g_bad ? {23'd0, he.gppn, req_vaddr[11:0]} : '0;
              resp_gva   <= req_virt;
            end else begin
              state <= T_WALK;
            end
          end
        end

        T_WALK: if (w_req_ready) state <= T_WAIT;

        T_WAIT: if (w_resp_valid) begin
          resp_valid <= 1'b1;
          resp_hit   <= 1'b0;
          resp_paddr <= w_resp_paddr;
          resp_fault <= w_resp_fault;
          resp_cause <= w_resp_cause;
          resp_gpa   <= w_resp_gpa;
          resp_gva   <= w_resp_gva;
          if (!w_resp_fault) begin
            tlb[victim] <= '{valid: 1'b1, virt: virt_q, vpn: va_q[38:12],
                             ppn: w_resp_paddr[55:12], gppn: w_leaf_gpa[40:12],
                             vs_xwr: w_vs_xwr, vs_u: w_vs_u, g_xwr: w_g_xwr};
            victim <= victim == IW'(NENTRIES - 1) ? '0 : victim + 1'b1;
          end
          state <= T_IDLE;
        end

        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
