// tb_tlb_2stage: self-checking test of the TLB in front of the two-stage
// walker. It uses the same hand-built page tables as the walker's own test
// and counts the walker's memory reads to tell hits from misses:
//   - a nested miss makes 15 reads and a repeat of it none;
//   - a cached guest page that the G stage maps read-only gives guest-page
//     fault 23 with its GPA on a store, without a walk;
//   - cached VS permissions give page faults (fetch or hlvx without X, user
//     access);
//   - hfence empties guest entries only, sfence_vma host entries only;
//   - a ninth page evicts the oldest of the eight entries (round robin).
//
// A 128 KiB memory model answers PTE reads after 1 to 3 cycles ($urandom).
// Page tables are laid out by hand:
//   G stage (hgatp.PPN = 4, 16 KiB root at PA 0x4000):
//     root[0] -> L1 at 0x8000, root[1] = 1 GiB leaf -> PA 0x8000_0000
//     L1[0] -> L0 at 0x9000, L1[1] = 2 MiB leaf -> PA 0x4000_0000,
//     L1[2] = misaligned 2 MiB leaf
//     L0: GPA 0x1000/0x2000/0x3000 -> PA 0xA000/0xB000/0xC000 (VS tables),
//         GPA 0x5000 -> PA 0x1234_5000, GPA 0x6000 -> PA 0x13000 read only,
//         GPA 0x7000 not mapped, GPA 0x8000 -> PA 0x14000 without U
//   VS stage (vsatp.PPN = 1, root at GPA 0x1000):
//     root[0] -> GPA 0x2000, root[1] = 1 GiB leaf GPA 0x4000_0000
//     L1[0] -> GPA 0x3000, L1[1] = 2 MiB leaf GPA 0x20_0000
//     L0[4] -> GPA 0x5000, L0[5] -> GPA 0x6000, L0[7] -> GPA 0x7000,
//     L0[8] invalid, L0[9] user page, L0[10] -> GPA 2^41, L0[11] D=0,
//     L0[12] -> GPA 0x8000
//   single stage (satp.PPN = 0xD): root[0] = 1 GiB identity leaf, read only
module tb_tlb_2stage;
  logic clk = 0, rst_n = 0;
  logic        req_valid = 0, req_ready;
  logic [63:0] req_vaddr = '0;
  logic [1:0]  req_acc = '0;
  logic        req_virt = 0, req_user = 0;
  logic [63:0] satp = '0, vsatp = '0, hgatp = '0;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [55:0] mem_req_addr;
  logic [63:0] mem_rsp_data;
  logic        resp_valid, resp_fault, resp_gva;
  logic [55:0] resp_paddr;
  logic [5:0]  resp_cause;
  logic [63:0] resp_gpa;
  logic        resp_hit;
  logic        sfence_vma = 0, hfence = 0;

  tlb_2stage dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ memory model
  logic [63:0] mem [16384];
  int          lat;
  logic [55:0] pend_addr;
  logic        busy;
  int          nreads;

  assign mem_req_ready = !busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; lat <= 0; pend_addr <= '0;
      mem_rsp_valid <= 1'b0; mem_rsp_data <= '0; nreads <= 0;
    end else begin
      mem_rsp_valid <= 1'b0;
      if (mem_req_valid && !busy) begin
        busy <= 1'b1; pend_addr <= mem_req_addr; lat <= 1 + int'($urandom % 3); nreads <= nreads + 1;
      end else if (busy) begin
        if (lat <= 1) begin
          busy <= 1'b0;
          mem_rsp_valid <= 1'b1;
          mem_rsp_data  <= mem[pend_addr[16:3]];
        end
        lat <= lat - 1;
      end
    end
  end

  localparam logic [7:0] V = 8'h01, R = 8'h02, W = 8'h04, X = 8'h08, U = 8'h10, A = 8'h40, D = 8'h80;
  function automatic logic [63:0] pte(logic [43:0] ppn, logic [7:0] f);
    return {10'd0, ppn, 2'b00, f};
  endfunction
  task automatic put(logic [55:0] pa, logic [63:0] v);
    mem[pa[16:3]] = v;
  endtask

  localparam logic [63:0] SV39 = 64'h8000_0000_0000_0000;

  // one translation; returns fields through the outputs
  task automatic xlate(logic [63:0] va, logic [1:0] acc, logic virt, logic user,
                       output logic f, output logic [5:0] c, output logic [55:0] pa,
                       output logic [63:0] gpa);
    @(negedge clk);
    req_valid = 1; req_vaddr = va; req_acc = acc; req_virt = virt; req_user = user;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    f = resp_fault; c = resp_cause; pa = resp_paddr; gpa = resp_gpa;
  endtask

  task automatic expect_pa(string what, logic [63:0] va, logic [1:0] acc, logic virt,
                           logic [55:0] exp_pa);
    logic f; logic [5:0] c; logic [55:0] pa; logic [63:0] gpa;
    xlate(va, acc, virt, 1'b0, f, c, pa, gpa);
    check({what, ": no fault"}, 64'(f), 0);
    check({what, ": physical address"}, 64'(pa), 64'(exp_pa));
  endtask

  task automatic flush(logic s, logic h);
    @(negedge clk);
    sfence_vma = s; hfence = h;
    @(negedge clk);
    sfence_vma = 0; hfence = 0;
  endtask

  // translation that must (or must not) hit, with the number of walker reads
  task automatic expect_hit(string what, logic [63:0] va, logic [1:0] acc, logic virt,
                            logic user, logic exp_hit, int exp_reads, logic exp_f,
                            logic [5:0] exp_c, logic [55:0] exp_pa, logic [63:0] exp_gpa);
    logic f; logic [5:0] c; logic [55:0] pa; logic [63:0] gpa;
    int r0;
    r0 = nreads;
    xlate(va, acc, virt, user, f, c, pa, gpa);
    check({what, ": hit"}, 64'(resp_hit), 64'(exp_hit));
    check({what, ": walker reads"}, 64'(nreads - r0), 64'(exp_reads));
    check({what, ": fault"}, 64'(f), 64'(exp_f));
    if (exp_f) begin
      check({what, ": cause"}, 64'(c), 64'(exp_c));
      check({what, ": GPA"}, gpa, exp_gpa);
    end else begin
      check({what, ": physical address"}, 64'(pa), 64'(exp_pa));
    end
  endtask

  task automatic expect_fault(string what, logic [63:0] va, logic [1:0] acc, logic virt,
                              logic [5:0] exp_c, logic [63:0] exp_gpa);
    logic f; logic [5:0] c; logic [55:0] pa; logic [63:0] gpa;
    xlate(va, acc, virt, 1'b0, f, c, pa, gpa);
    check({what, ": fault"}, 64'(f), 1);
    check({what, ": cause"}, 64'(c), 64'(exp_c));
    check({what, ": GPA"}, gpa, exp_gpa);
  endtask


  initial begin
    for (int i = 0; i < 16384; i++) mem[i] = '0;
    // G stage
    put(56'h4000 + 8 * 0, pte(44'h8, V));
    put(56'h4000 + 8 * 1, pte(44'h80000, V | R | W | X | U | A | D));
    put(56'h8000 + 8 * 0, pte(44'h9, V));
    put(56'h8000 + 8 * 1, pte(44'h40000, V | R | W | X | U | A | D));
    put(56'h8000 + 8 * 2, pte(44'h40001, V | R | W | X | U | A | D));
    put(56'h9000 + 8 * 1, pte(44'hA, V | R | W | U | A | D));
    put(56'h9000 + 8 * 2, pte(44'hB, V | R | W | U | A | D));
    put(56'h9000 + 8 * 3, pte(44'hC, V | R | W | U | A | D));
    put(56'h9000 + 8 * 5, pte(44'h12345, V | R | W | X | U | A | D));
    put(56'h9000 + 8 * 6, pte(44'h13, V | R | U | A | D));
    put(56'h9000 + 8 * 8, pte(44'h14, V | R | W | A | D));
    // VS stage (at the PAs the G stage maps its GPAs to)
    put(56'hA000 + 8 * 0, pte(44'h2, V));
    put(56'hA000 + 8 * 1, pte(44'h40000, V | R | W | A | D));
    put(56'hB000 + 8 * 0, pte(44'h3, V));
    put(56'hB000 + 8 * 1, pte(44'h200, V | R | W | A | D));
    put(56'hC000 + 8 * 4, pte(44'h5, V | R | W | X | A | D));
    put(56'hC000 + 8 * 5, pte(44'h6, V | R | W | A | D));
    put(56'hC000 + 8 * 7, pte(44'h7, V | R | W | X | A | D));
    put(56'hC000 + 8 * 9, pte(44'h5, V | R | W | U | A | D));
    put(56'hC000 + 8 * 10, pte(44'h2000_0000, V | R | W | A | D));
    put(56'hC000 + 8 * 11, pte(44'h5, V | R | W | A));
    put(56'hC000 + 8 * 12, pte(44'h8, V | R | W | A | D));
    // single stage
    put(56'hD000 + 8 * 0, pte(44'h0, V | R | A | D));

    repeat (2) @(negedge clk);
    rst_n = 1;
    vsatp = SV39 | 64'h1;
    hgatp = SV39 | 64'h4;
    satp  = SV39 | 64'hD;

    expect_hit("nested miss", 64'h4123, 2'd1, 1, 0, 0, 15, 0, 0, 56'h1234_5123, 0);
    expect_hit("nested repeat", 64'h4ABC, 2'd1, 1, 0, 1, 0, 0, 0, 56'h1234_5ABC, 0);
    expect_hit("nested store hit", 64'h4008, 2'd2, 1, 0, 1, 0, 0, 0, 56'h1234_5008, 0);
    expect_hit("user access to a supervisor page", 64'h4008, 2'd1, 1, 1, 1, 0, 1, 13, 0, 0);
    expect_hit("read-only G page, load miss", 64'h5008, 2'd1, 1, 0, 0, 15, 0, 0, 56'h13008, 0);
    expect_hit("read-only G page, store from TLB", 64'h5010, 2'd2, 1, 0, 1, 0, 1, 23, 0, 64'h6010);
    expect_hit("VS page without X, fetch from TLB", 64'h5010, 2'd0, 1, 0, 1, 0, 1, 12, 0, 0);
    expect_hit("hlvx of a VS page without X from TLB", 64'h5010, 2'd3, 1, 0, 1, 0, 1, 13, 0, 0);
    expect_hit("hlvx of an executable page from TLB", 64'h4010, 2'd3, 1, 0, 1, 0, 0, 0, 56'h1234_5010, 0);
    expect_hit("faulting walk is not cached", 64'h7010, 2'd1, 1, 0, 0, 15, 1, 21, 0, 64'h7010);
    expect_hit("faulting walk again", 64'h7010, 2'd1, 1, 0, 0, 15, 1, 21, 0, 64'h7010);
    expect_hit("host entry miss", 64'h1234, 2'd1, 0, 0, 0, 1, 0, 0, 56'h1234, 0);
    expect_hit("host entry hit", 64'h1238, 2'd1, 0, 0, 1, 0, 0, 0, 56'h1238, 0);
    expect_hit("guest VA equal to a host VA misses", 64'h1234, 2'd1, 1, 0, 0, 12, 1, 13, 0, 0);
    flush(0, 1);
    expect_hit("hfence keeps host entries", 64'h1238, 2'd1, 0, 0, 1, 0, 0, 0, 56'h1238, 0);
    expect_hit("hfence empties guest entries", 64'h4123, 2'd1, 1, 0, 0, 15, 0, 0, 56'h1234_5123, 0);
    flush(1, 0);
    expect_hit("sfence empties host entries", 64'h1238, 2'd1, 0, 0, 0, 1, 0, 0, 56'h1238, 0);
    expect_hit("sfence keeps guest entries", 64'h4123, 2'd1, 1, 0, 1, 0, 0, 0, 56'h1234_5123, 0);

    // replacement: empty, then fill 9 host pages with translation off
    flush(1, 1);
    satp = '0;
    for (int k = 0; k < 9; k++)
      expect_hit("fill", 64'h10_0000 + 64'(k) * 64'h1000, 2'd1, 0, 0, 0, 0, 0, 0,
                 56'h10_0000 + 56'(k) * 56'h1000, 0);
    expect_hit("oldest entry evicted", 64'h10_0000, 2'd1, 0, 0, 0, 0, 0, 0, 56'h10_0000, 0);
    expect_hit("newest entry kept", 64'h10_8000, 2'd1, 0, 0, 1, 0, 0, 0, 56'h10_8000, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
