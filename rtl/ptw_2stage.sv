// ptw_2stage: page-table walker for two-stage (nested) address translation.
//
// Translates one address per request. With V=0 the walk is the single-stage
// Sv39 walk selected by satp (or bare). With V=1 the guest virtual address is
// first translated by the VS stage (vsatp: bare or Sv39) into a guest
// physical address (GPA), and every GPA the walk touches goes through the
// G stage (hgatp: bare or Sv39x4): each VS page-table entry address before
// it is read, and finally the GPA of the leaf. The walker switches into the
// G-stage walk through state S_SWITCH and returns to the VS walk when the
// G-stage leaf is found, so both walks share one memory port and one set of
// PTE checks.
//
// Sv39x4: the GPA is 41 bits wide, the root table is 16 KiB (2048 entries,
// indexed by GPA[40:30]) and hgatp.PPN[1:0] are taken as zero; GPA bits above
// 40 that are not zero give a guest-page fault. Sv39: VA[63:39] must equal
// VA[38]. PTE checks, per the RISC-V privileged specification: V=1 and not
// (W=1, R=0); a leaf needs R (load), W (store) or X (fetch), A=1, and D=1 for
// stores; superpages must be aligned; a pointer at level 0 faults. In the
// VS/single stage the leaf's U bit must match the access privilege
// (req_user); in the G stage every leaf must have U=1. The PTE reads of the
// VS walk count as loads for the G-stage permission check. A/D bits are not
// updated by hardware (a clear A, or a clear D on a store, faults), SUM, MXR
// and VMIDs/ASIDs are not modelled. Access type 3 is the read of the
// hypervisor's hlvx instructions: it needs X (not R) in both stages and
// faults as a load.
//
// Faults: a VS- or single-stage fault reports page fault 12/13/15 (fetch,
// load, store); a G-stage fault reports guest-page fault 20/21/23 with the
// GPA that failed in resp_gpa (for the trap unit's htval/mtval2).
//
// Interface and timing: req_valid/req_ready handshake (ready only when
// idle); one memory read at a time on mem_req_valid/mem_req_ready with the
// 64-bit PTE returning on a later cycle with mem_rsp_valid; the result is a
// one-cycle resp_valid pulse. With a successful walk it also returns the
// permissions of both leaves and the leaf GPA, which the TLB (tlb_2stage)
// keeps so that a later access that breaks a permission can be reported
// with its GPA without walking again.
module ptw_2stage (
  input  logic        clk,
  input  logic        rst_n,
  // translation request
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [63:0] req_vaddr,
  input  logic [1:0]  req_acc,      // 0 fetch, 1 load, 2 store, 3 hlvx load
  input  logic        req_virt,     // guest access: two-stage translation
  input  logic        req_user,     // access from U/VU mode
  input  logic [63:0] satp,
  input  logic [63:0] vsatp,
  input  logic [63:0] hgatp,
  // memory read port
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
  output logic [63:0] resp_gpa,     // GPA of a guest-page fault
  output logic        resp_gva,     // the faulting address is a guest virtual one
  // leaf permissions of a successful walk, for a TLB: {X, W and D, R} per
  // stage (all ones for a bare stage), the VS leaf's U bit and the leaf GPA
  output logic [2:0]  resp_vs_xwr,
  output logic        resp_vs_u,
  output logic [2:0]  resp_g_xwr,
  output logic [63:0] resp_leaf_gpa
);
  localparam logic [3:0] MODE_SV39 = 4'd8;
  localparam logic [1:0] ACC_FETCH = 2'd0, ACC_LOAD = 2'd1, ACC_STORE = 2'd2, ACC_HLVX = 2'd3;

  typedef enum logic [3:0] {
    S_IDLE, S_VS_ADDR, S_SWITCH, S_G_RD, S_G_WAIT, S_VS_RD, S_VS_WAIT, S_FINAL, S_DONE
  } state_e;

  typedef struct packed {
    logic [9:0]  rsv;
    logic [43:0] ppn;
    logic [1:0]  rsw;
    logic        d, a, g, u, x, w, r, v;
  } pte_t;

  state_e      state;
  logic [63:0] va;
  logic [1:0]  acc;
  logic        virt, user, g_on;
  logic [1:0]  vs_lvl, g_lvl;
  logic [55:0] vs_base;        // GPA (V=1) or PA of the current VS table
  logic [63:0] g_addr;         // GPA being translated by the G stage
  logic [55:0] g_base;         // PA of the current G-stage table
  logic        g_ret_final;    // G walk is for the final GPA (else a VS PTE)
  logic [55:0] pte_pa;         // PA of the VS PTE to read
  logic [55:0] final_pa;
  logic [63:0] final_gpa;
  logic        fault, gfault;
  logic [2:0]  vs_xwr, g_xwr;
  logic        vs_u;

  // ---------------------------------------------------------- PTE checks
  function automatic logic pte_invalid(pte_t p);
    return !p.v || (!p.r && p.w);
  endfunction

  function automatic logic pte_leaf(pte_t p);
    return p.r || p.x;
  endfunction

  function automatic logic leaf_perm_ok(pte_t p, logic [1:0] a);
    logic ok;
    unique case (a)
      ACC_FETCH: ok = p.x;
      ACC_HLVX:  ok = p.x;
      ACC_STORE: ok = p.w && p.d;
      default:   ok = p.r;
    endcase
    return ok && p.a;
  endfunction

  function automatic logic misaligned(pte_t p, logic [1:0] lvl);
    return (lvl == 2'd2 && p.ppn[17:0] != '0) || (lvl == 2'd1 && p.ppn[8:0] != '0);
  endfunction

  // leaf PTE + level + input address -> output address (superpage offsets)
  function automatic logic [55:0] leaf_addr(pte_t p, logic [1:0] lvl, logic [63:0] in);
    logic [55:0] o;
    unique case (lvl)
      2'd2:    o = {p.ppn[43:18], in[29:0]};
      2'd1:    o = {p.ppn[43:9],  in[20:0]};
      default: o = {p.ppn,        in[11:0]};
    endcase
    return o;
  endfunction

  function automatic logic [5:0] pf_cause(logic [1:0] a, logic guest);
    logic [5:0] c;
    unique case (a)
      ACC_FETCH: c = guest ? 6'd20 : 6'd12;
      ACC_STORE: c = guest ? 6'd23 : 6'd15;
      default:   c = guest ? 6'd21 : 6'd13;
    endcase
    return c;
  endfunction

  // table indices
  logic [8:0]  vs_idx;
  logic [10:0] g_idx;
  always_comb begin
    unique case (vs_lvl)
      2'd2:    vs_idx = va[38:30];
      2'd1:    vs_idx = va[29:21];
      default: vs_idx = va[20:12];
    endcase
    unique case (g_lvl)
      2'd2:    g_idx = g_addr[40:30];
      2'd1:    g_idx = {2'b00, g_addr[29:21]};
      default: g_idx = {2'b00, g_addr[20:12]};
    endcase
  end

  pte_t rsp_pte;
  assign rsp_pte = pte_t'(mem_rsp_data);

  assign req_ready     = state == S_IDLE;
  assign mem_req_valid = state == S_G_RD || state == S_VS_RD;
  assign mem_req_addr  = state == S_G_RD ? g_base + 56'({g_idx, 3'b000}) : pte_pa;

  assign resp_valid = state == S_DONE;
  assign resp_paddr = final_pa;
  assign resp_fault = fault;
  assign resp_cause = pf_cause(acc, gfault);
  assign resp_gpa   = gfault ? g_addr : '0;
  assign resp_gva   = virt;
  assign resp_vs_xwr   = vs_xwr;
  assign resp_vs_u     = vs_u;
  assign resp_g_xwr    = g_xwr;
  assign resp_leaf_gpa = final_gpa;

  logic [3:0] vs_mode;
  logic [43:0] vs_root;
  assign vs_mode = req_virt ? vsatp[63:60] : satp[63:60];
  assign vs_root = req_virt ? vsatp[43:0] : satp[43:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      va <= '0; acc <= '0; virt <= 1'b0; user <= 1'b0; g_on <= 1'b0;
      vs_lvl <= '0; g_lvl <= '0; vs_base <= '0; g_addr <= '0; g_base <= '0;
      g_ret_final <= 1'b0; pte_pa <= '0; final_pa <= '0; final_gpa <= '0;
      fault <= 1'b0; gfault <= 1'b0;
      vs_xwr <= '0; g_xwr <= '0; vs_u <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          va     <= req_vaddr;
          acc    <= req_acc;
          virt   <= req_virt;
          user   <= req_user;
          g_on   <= req_virt && hgatp[63:60] == MODE_SV39;
          fault  <= 1'b0;
          gfault <= 1'b0;
          vs_xwr <= 3'b111;
          g_xwr  <= 3'b111;
          vs_u   <= req_user;
          if (vs_mode == MODE_SV39) begin
            vs_lvl  <= 2'd2;
            vs_base <= {vs_root, 12'd0};
            if (req_vaddr[63:39] != {25{req_vaddr[38]}}) begin
              fault <= 1'b1;
              state <= S_DONE;
            end else begin
              state <= S_VS_ADDR;
            end
          end else begin
            final_gpa <= req_vaddr;
            state     <= S_FINAL;
          end
        end

        // address of the VS (or single-stage) PTE of this level
        S_VS_ADDR: begin
          if (g_on) begin
            g_addr      <= 64'(vs_base + 56'({vs_idx, 3'b000}));
            g_ret_final <= 1'b0;
            state       <= S_SWITCH;
          end else begin
            pte_pa <= vs_base + 56'({vs_idx, 3'b000});
            state  <= S_VS_RD;
          end
        end

        // start a G-stage walk of g_addr
        S_SWITCH: begin
          g_lvl  <= 2'd2;
          g_base <= {hgatp[43:2], 2'b00, 12'd0};
          if (g_addr[63:41] != '0) begin
            fault  <= 1'b1;
            gfault <= 1'b1;
            state  <= S_DONE;
          end else begin
            state <= S_G_RD;
          end
        end

        S_G_RD: if (mem_req_ready) state <= S_G_WAIT;

        S_G_WAIT: if (mem_rsp_valid) begin
          if (pte_invalid(rsp_pte)) begin
            fault <= 1'b1; gfault <= 1'b1; state <= S_DONE;
          end else if (!pte_leaf(rsp_pte)) begin
            if (g_lvl == 2'd0) begin
              fault <= 1'b1; gfault <= 1'b1; state <= S_DONE;
            end else begin
              g_lvl  <= g_lvl - 2'd1;
              g_base <= {rsp_pte.ppn, 12'd0};
              state  <= S_G_RD;
            end
          end else if (!leaf_perm_ok(rsp_pte, g_ret_final ? acc : ACC_LOAD) || !rsp_pte.u ||
                       misaligned(rsp_pte, g_lvl)) begin
            fault <= 1'b1; gfault <= 1'b1; state <= S_DONE;
          end else if (g_ret_final) begin
            final_pa <= leaf_addr(rsp_pte, g_lvl, g_addr);
            g_xwr    <= {rsp_pte.x, rsp_pte.w && rsp_pte.d, rsp_pte.r};
            state    <= S_DONE;
          end else begin
            pte_pa <= leaf_addr(rsp_pte, g_lvl, g_addr);
            state  <= S_VS_RD;
          end
        end

        S_VS_RD: if (mem_req_ready) state <= S_VS_WAIT;

        S_VS_WAIT: if (mem_rsp_valid) begin
          if (pte_invalid(rsp_pte)) begin
            fault <= 1'b1; state <= S_DONE;
          end else if (!pte_leaf(rsp_pte)) begin
            if (vs_lvl == 2'd0) begin
              fault <= 1'b1; state <= S_DONE;
            end else begin
              vs_lvl  <= vs_lvl - 2'd1;
              vs_base <= {rsp_pte.ppn, 12'd0};
              state   <= S_VS_ADDR;
            end
          end else if (!leaf_perm_ok(rsp_pte, acc) || rsp_pte.u != user ||
                       misaligned(rsp_pte, vs_lvl)) begin
            fault <= 1'b1; state <= S_DONE;
          end else begin
            final_gpa <= 64'(leaf_addr(rsp_pte, vs_lvl, va));
            vs_xwr    <= {rsp_pte.x, rsp_pte.w && rsp_pte.d, rsp_pte.r};
            vs_u      <= rsp_pte.u;
            state     <= S_FINAL;
          end
        end

        // final GPA: G stage if enabled, else it is the physical address
        S_FINAL: begin
          if (g_on) begin
            g_addr      <= final_gpa;
            g_ret_final <= 1'b1;
            state       <= S_SWITCH;
          end else begin
            final_pa <= final_gpa[55:0];
            state    <= S_DONE;
          end
        end

        S_DONE: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
