// tb_plic_virt: self-checking test of the virtualization-aware PLIC.
//
// Configuration: 2 harts, 2 VS contexts per hart (4 contexts per hart), 3
// devices, 2 injection blocks of 3 registers, 3-bit physical priorities.
// Source 4 and 5 are the management interrupts of blocks 1 and 2.
// Checked against values worked out by hand in the testbench:
//  - priority, enable, threshold, vcibir, viir, ibmsr registers read back
//  - gateway/pending/claim/complete flow of a physical interrupt, including
//    no re-pending before complete while the device line stays high
//  - threshold masking of the line but not of the claim
//  - highest priority wins, ties go to the lower ID
//  - a device routed to a VS context drives that hart's guest line
//  - virtual injection: pending, claim sets in-flight, complete clears the
//    ID and in-flight bit (priority field is left as written)
//  - virtual vs physical priority ordering in one context
//  - one block attached to two contexts (a VM on two harts)
//  - management events: no VIIR pending, complete of a non-present ID
module tb_plic_virt;
  import hv_pkg::*;

  localparam int NH = 2, NG = 2, ND = 3, NB = 2, NV = 3, PB = 3;
  localparam int CPH = 2 + NG;

  logic clk = 0, rst_n = 0;
  logic [ND:1] dev_irq = '0;
  logic        req_valid = 0, req_write = 0;
  logic [27:0] req_addr = '0;
  logic [31:0] req_wdata = '0, rdata;
  logic [NH-1:0] meip, seip;
  logic [NH-1:0][NG:1] geip;
  int checks = 0, failures = 0;

  plic_virt #(.NHARTS(NH), .NGUEST(NG), .NDEV(ND), .NVIRT_BLKS(NB), .NVIIR(NV), .PRIO_BITS(PB)) dut (
    .clk, .rst_n, .dev_irq, .req_valid, .req_write, .req_addr, .req_wdata,
    .rsp_rdata(rdata), .meip, .seip, .geip
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(logic [27:0] a, logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  task automatic rd(logic [27:0] a, output logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = a;
    #1 d = rdata;
    @(negedge clk);
    req_valid = 0;
  endtask

  function automatic logic [27:0] a_prio(int s);      return 28'(4 * s); endfunction
  function automatic logic [27:0] a_enable(int c);    return 28'('h2000 + 'h80 * c); endfunction
  function automatic logic [27:0] a_thresh(int c);    return 28'('h200000 + 'h1000 * c); endfunction
  function automatic logic [27:0] a_claim(int c);     return 28'('h200004 + 'h1000 * c); endfunction
  function automatic logic [27:0] a_vcibir(int c);    return 28'('h4000000 + 4 * c); endfunction
  function automatic logic [27:0] a_viir(int n, int j); return 28'('h4010000 + 'h1000 * n + 4 * j); endfunction
  function automatic logic [27:0] a_ibmsr(int n);     return 28'('h4110000 + 4 * n); endfunction
  function automatic logic [31:0] viir(int prio, int id, bit fl);
    return {11'd0, 10'(prio), 10'(id), fl};
  endfunction

  int c_m0, c_s0, c_g01, c_g02, c_m1, c_s1, c_g11, c_g12;
  logic [31:0] v;

  initial begin
    c_m0 = 0; c_s0 = 1; c_g01 = 2; c_g02 = 3;
    c_m1 = CPH; c_s1 = CPH + 1; c_g11 = CPH + 2; c_g12 = CPH + 3;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------- register access
    wr(a_prio(1), 32'hFFFF_FFF5);
    rd(a_prio(1), v);                 check("priority masked to 3 bits", v, 5);
    wr(a_prio(2), 3); wr(a_prio(3), 5);
    wr(a_enable(c_m0), 32'b1110);
    rd(a_enable(c_m0), v);            check("enable readback", v, 32'b1110);
    wr(a_thresh(c_m0), 0);
    check("no interrupt yet", 32'(meip), 0);

    // ---------------------------------------------- physical claim/complete
    dev_irq[1] = 1;
    @(negedge clk);
    rd(28'h1000, v);                  check("pending bit of source 1", v, 32'b10);
    check("meip0 raised", 32'(meip[0]), 1);
    check("not on hart 1", 32'(meip[1]), 0);
    rd(a_claim(c_m0), v);             check("claim returns 1", v, 1);
    rd(28'h1000, v);                  check("pending cleared by claim", v, 0);
    check("meip0 low after claim", 32'(meip[0]), 0);
    repeat (3) @(negedge clk);
    rd(28'h1000, v);                  check("line high, no re-pend before complete", v, 0);
    rd(a_claim(c_m0), v);             check("second claim returns 0", v, 0);
    wr(a_claim(c_m0), 1);             // complete
    @(negedge clk);
    rd(28'h1000, v);                  check("re-pend after complete", v, 32'b10);
    dev_irq[1] = 0;

    // threshold masks the line, not the claim
    wr(a_thresh(c_m0), 5);
    check("threshold 5 masks priority 5", 32'(meip[0]), 0);
    wr(a_thresh(c_m0), 4);
    check("threshold 4 passes priority 5", 32'(meip[0]), 1);
    wr(a_thresh(c_m0), 7);
    rd(a_thresh(c_m0), v);            check("threshold readback", v, 7);
    rd(a_claim(c_m0), v);             check("claim ignores threshold", v, 1);
    wr(a_claim(c_m0), 1);
    wr(a_thresh(c_m0), 0);

    // priority order and ties: sources 1 (5), 2 (3), 3 (5)
    dev_irq = 3'b111;
    repeat (2) @(negedge clk);
    dev_irq = 3'b000;
    rd(a_claim(c_m0), v);             check("tie 5/5 goes to lower ID", v, 1);
    rd(a_claim(c_m0), v);             check("next highest", v, 3);
    rd(a_claim(c_m0), v);             check("lowest last", v, 2);
    wr(a_claim(c_m0), 1); wr(a_claim(c_m0), 2); wr(a_claim(c_m0), 3);
    rd(a_claim(c_m0), v);             check("nothing left", v, 0);

    // ----------------------------------------------- VS context, direct
    wr(a_enable(c_m0), 0);
    wr(a_enable(c_g12), 32'b1000);    // device 3 to hart 1, guest 2
    dev_irq[3] = 1;
    repeat (2) @(negedge clk);
    check("guest line hart1 g2", 32'(geip[1]), 32'b10);
    check("other lines quiet", 32'({geip[0], meip, seip}), 0);
    rd(a_claim(c_g12), v);            check("guest claims device 3", v, 3);
    check("guest line low after claim", 32'(geip[1]), 0);
    dev_irq[3] = 0;
    wr(a_claim(c_g12), 3);

    // ----------------------------------------------- virtual injection
    wr(a_vcibir(c_g01), 1);
    rd(a_vcibir(c_g01), v);           check("vcibir readback", v, 1);
    wr(a_viir(1, 0), viir(6, 100, 0));
    rd(a_viir(1, 0), v);              check("viir readback", v, viir(6, 100, 0));
    check("virtual interrupt raises guest line", 32'(geip[0]), 32'b01);
    wr(a_thresh(c_g01), 6);
    check("virtual masked by threshold", 32'(geip[0]), 0);
    wr(a_thresh(c_g01), 0);
    rd(a_claim(c_g01), v);            check("claim returns virtual ID", v, 100);
    rd(a_viir(1, 0), v);              check("claim sets in-flight", v, viir(6, 100, 1));
    check("guest line low while in flight", 32'(geip[0]), 0);
    wr(a_claim(c_g01), 100);
    rd(a_viir(1, 0), v);              check("complete frees register (ID cleared)", v, viir(6, 0, 0));

    // virtual and physical in one context: physical device 2 priority 3
    wr(a_enable(c_g01), 32'b0100);
    wr(a_viir(1, 1), viir(2, 200, 0));
    wr(a_viir(1, 2), viir(4, 300, 0));
    dev_irq[2] = 1;
    repeat (2) @(negedge clk);
    dev_irq[2] = 0;
    rd(a_claim(c_g01), v);            check("virtual prio 4 beats physical 3", v, 300);
    rd(a_claim(c_g01), v);            check("physical 3 beats virtual 2", v, 2);
    rd(a_claim(c_g01), v);            check("then virtual 2", v, 200);
    wr(a_claim(c_g01), 2);            // physical complete
    wr(a_claim(c_g01), 300);
    wr(a_claim(c_g01), 200);
    rd(a_viir(1, 1), v);              check("reg 1 freed", v, viir(2, 0, 0));
    rd(a_viir(1, 2), v);              check("reg 2 freed", v, viir(4, 0, 0));

    // one block, two contexts (same VM on two harts)
    wr(a_vcibir(c_g11), 1);
    wr(a_viir(1, 0), viir(1, 77, 0));
    check("hart 0 guest 1 sees it", 32'(geip[0][1]), 1);
    check("hart 1 guest 1 sees it", 32'(geip[1][1]), 1);
    rd(a_claim(c_g11), v);            check("hart 1 claims", v, 77);
    check("gone from hart 0 too", 32'(geip[0][1]), 0);
    rd(a_claim(c_g01), v);            check("hart 0 claim empty", v, 0);
    wr(a_claim(c_g11), 77);

    // detached context no longer sees the block
    wr(a_vcibir(c_g11), 0);
    wr(a_viir(1, 0), viir(1, 78, 0));
    check("detached context quiet", 32'(geip[1][1]), 0);
    check("attached context sees", 32'(geip[0][1]), 1);
    rd(a_claim(c_g01), v);  wr(a_claim(c_g01), 78);

    // ----------------------------------------------- management interrupts
    wr(a_prio(4), 7); wr(a_prio(5), 7);
    wr(a_enable(c_s0), 32'b110000);   // hypervisor context takes sources 4, 5
    // bad complete on block 1
    wr(a_ibmsr(1), 32'b10);
    wr(a_claim(c_g01), 555);
    rd(a_ibmsr(1), v);                check("bad complete status and ID", v, {6'd0, 10'd555, 6'd0, 1'b1, 1'b1, 6'd0, 2'b10});
    @(negedge clk);
    check("block 1 management interrupt to HS", 32'(seip[0]), 1);
    rd(a_claim(c_s0), v);             check("management ID of block 1", v, ND + 1);
    wr(a_ibmsr(1), 32'h202);          // clear status, keep enable
    rd(a_ibmsr(1), v);                check("status cleared, last bad ID kept", v, {6'd0, 10'd555, 16'h0102});
    wr(a_claim(c_s0), ND + 1);
    @(negedge clk);
    check("no re-pend once cleared", 32'(seip[0]), 0);
    // no-pending event on block 2
    wr(a_ibmsr(2), 32'b01);
    @(negedge clk);
    rd(a_claim(c_s0), v);             check("no-pending event of block 2", v, ND + 2);
    wr(a_ibmsr(2), 32'b00);
    wr(a_claim(c_s0), ND + 2);
    // no-pending drops when the block holds a pending register
    wr(a_vcibir(c_g02), 2);
    wr(a_viir(2, 0), viir(3, 9, 0));
    wr(a_ibmsr(2), 32'b01);
    rd(a_ibmsr(2), v);                check("block 2 has pending: NP status 0", v, 32'h001);
    rd(a_claim(c_g02), v);            check("guest 2 claims from block 2", v, 9);
    rd(a_ibmsr(2), v);                check("in flight only: NP status 1", v, 32'h101);

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
