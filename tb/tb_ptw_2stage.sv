// tb_ptw_2stage: self-checking test of the two-stage page-table walker.
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
// Each case checks the physical address or the fault cause and GPA against
// values worked out by hand (for successful walks also the leaf permissions
// and GPA handed to a TLB), and the first case checks that a full nested
// walk of three levels in each stage makes (3+1)*(3+1)-1 = 15 memory reads.
module tb_ptw_2stage;
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
  logic [63:0] resp_gpa, resp_leaf_gpa;
  logic [2:0]  resp_vs_xwr, resp_g_xwr;
  logic        resp_vs_u;

  ptw_2stage dut (.*);

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

  // leaf permissions handed to the TLB after the last successful walk
  task automatic expect_perm(string what, logic [2:0] vs, logic u, logic [2:0] g, logic [63:0] lgpa);
    check({what, ": VS XWR"}, 64'(resp_vs_xwr), 64'(vs));
    check({what, ": VS U"}, 64'(resp_vs_u), 64'(u));
    check({what, ": G XWR"}, 64'(resp_g_xwr), 64'(g));
    check({what, ": leaf GPA"}, resp_leaf_gpa, lgpa);
  endtask

  task automatic expect_fault(string what, logic [63:0] va, logic [1:0] acc, logic virt,
                              logic [5:0] exp_c, logic [63:0] exp_gpa);
    logic f; logic [5:0] c; logic [55:0] pa; logic [63:0] gpa;
    xlate(va, acc, virt, 1'b0, f, c, pa, gpa);
    check({what, ": fault"}, 64'(f), 1);
    check({what, ": cause"}, 64'(c), 64'(exp_c));
    check({what, ": GPA"}, gpa, exp_gpa);
  endtask

  int n0;

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

    n0 = nreads;
    expect_pa("nested 4 KiB load", 64'h4123, 2'd1, 1, 56'h1234_5123);
    check("nested walk memory reads", 64'(nreads - n0), 15);
    expect_pa("nested fetch", 64'h4000, 2'd0, 1, 56'h1234_5000);
    expect_perm("nested fetch", 3'b111, 0, 3'b111, 64'h5000);
    expect_pa("G-stage read-only page, load", 64'h5008, 2'd1, 1, 56'h13008);
    expect_perm("read-only page", 3'b011, 0, 3'b001, 64'h6008);
    expect_fault("G-stage read-only page, store", 64'h5008, 2'd2, 1, 6'd23, 64'h6008);
    expect_fault("GPA not mapped by G stage", 64'h7010, 2'd1, 1, 6'd21, 64'h7010);
    expect_fault("GPA not mapped, fetch", 64'h7010, 2'd0, 1, 6'd20, 64'h7010);
    expect_fault("G-stage leaf without U", 64'hC010, 2'd1, 1, 6'd21, 64'h8010);
    expect_fault("VS PTE invalid", 64'h8000, 2'd1, 1, 6'd13, 64'h0);
    expect_fault("VS user page from supervisor", 64'h9000, 2'd1, 1, 6'd13, 64'h0);
    expect_fault("VS no D bit, store", 64'hB000, 2'd2, 1, 6'd15, 64'h0);
    expect_fault("VS fetch without X", 64'h5000, 2'd0, 1, 6'd12, 64'h0);
    expect_pa("hlvx of an executable page", 64'h4010, 2'd3, 1, 56'h1234_5010);
    expect_fault("hlvx of a VS page without X", 64'h5000, 2'd3, 1, 6'd13, 64'h0);
    expect_fault("hlvx of a VS superpage without X", 64'h21_2345, 2'd3, 1, 6'd13, 64'h0);
    expect_pa("VS 2 MiB over G 2 MiB", 64'h21_2345, 2'd1, 1, 56'h4001_2345);
    expect_pa("VS 1 GiB over G 1 GiB", 64'h4000_0ABC, 2'd1, 1, 56'h8000_0ABC);
    expect_fault("GPA wider than 41 bits", 64'hA010, 2'd1, 1, 6'd21, 64'h200_0000_0010);
    expect_fault("non-canonical guest VA", 64'h0000_0080_0000_0000, 2'd1, 1, 6'd13, 64'h0);

    // G-stage fault on the implicit read of a VS page-table entry
    vsatp = SV39 | 64'h7;
    expect_fault("VS root not mapped (implicit access)", 64'h4123, 2'd2, 1, 6'd23, 64'h7000);

    // VS stage bare: GVA = GPA
    vsatp = '0;
    expect_pa("VS bare, G 2 MiB", 64'h21_2345, 2'd1, 1, 56'h4001_2345);
    expect_fault("VS bare, G misaligned superpage", 64'h40_0000, 2'd1, 1, 6'd21, 64'h40_0000);
    hgatp = '0;
    expect_pa("both bare", 64'h1234_5678, 2'd2, 1, 56'h1234_5678);
    expect_perm("both bare", 3'b111, 0, 3'b111, 64'h1234_5678);

    // single stage (V = 0) through satp
    n0 = nreads;
    expect_pa("single stage 1 GiB", 64'h1234, 2'd1, 0, 56'h1234);
    check("single stage reads", 64'(nreads - n0), 1);
    expect_fault("single stage store to read-only", 64'h1234, 2'd2, 0, 6'd15, 64'h0);
    satp = '0;
    expect_pa("single stage bare", 64'hABCD_E000, 2'd1, 0, 56'hABCD_E000);

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
