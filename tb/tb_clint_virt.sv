// tb_clint_virt: self-checking test of the virtualization-aware CLINT.
//
// Drives rtc_tick and the register port of a six-hart CLINT and checks, against
// values computed in the testbench: mtime counting and writes, the read-only
// stime and vstime (mtime + htimedelta) replicas, msip bits in both lanes,
// partial (32-bit) writes, and that mtip, stip and vstip rise exactly in the
// tick where the time reaches the compare value (>=) and fall when a larger
// compare value is written.
module tb_clint_virt;
  import hv_pkg::*;

  localparam int NH = 6;

  logic clk = 0, rst_n = 0, tick = 0;
  logic        req_valid = 0, req_write = 0;
  logic [17:0] req_addr = '0;
  logic [63:0] req_wdata = '0;
  logic [7:0]  req_wstrb = '0;
  logic [63:0] rdata, mtime_o;
  logic [NH-1:0] msip, mtip, stip, vstip;

  int checks = 0, failures = 0;

  clint_virt #(.NHARTS(NH)) dut (
    .clk, .rst_n, .rtc_tick(tick),
    .req_valid, .req_write, .req_addr, .req_wdata, .req_wstrb,
    .rsp_rdata(rdata), .msip, .mtip, .stip, .vstip, .mtime_o
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [17:0] a, logic [63:0] d, logic [7:0] s = 8'hFF);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = a; req_wdata = d; req_wstrb = s;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  task automatic rd(logic [17:0] a, output logic [63:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = a;
    #1 d = rdata;
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic ticks(int n);
    repeat (n) begin
      @(negedge clk); tick = 1;
      @(negedge clk); tick = 0;
    end
  endtask

  logic [63:0] v, t0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    rd(CLINT_MTIME, v);          check("mtime reset", v, 0);
    check("mtip at reset (cmp 0)", 64'(mtip), {58'd0, 6'h3F});

    // mtime counts rtc ticks only
    ticks(5);
    rd(CLINT_MTIME, v);          check("mtime after 5 ticks", v, 5);
    repeat (4) @(negedge clk);
    rd(CLINT_MTIME, v);          check("mtime holds without tick", v, 5);
    rd(CLINT_STIME, v);          check("stime replica", v, 5);

    // stime is read only
    wr(CLINT_STIME, 64'h1234);
    rd(CLINT_MTIME, v);          check("stime write ignored", v, 5);

    // mtime write, then upper half only
    wr(CLINT_MTIME, 64'd100);
    rd(CLINT_MTIME, v);          check("mtime write", v, 100);
    wr(CLINT_MTIME, 64'h0000_0002_0000_0000, 8'hF0);
    rd(CLINT_MTIME, v);          check("mtime high-half write", v, 64'h0000_0002_0000_0064);
    wr(CLINT_MTIME, 64'd1000);

    // msip for hart 0 (lane 0) and hart 3 (lane 1)
    wr(CLINT_MSIP_BASE + 18'd0, 64'd1, 8'h0F);
    wr(CLINT_MSIP_BASE + 18'd8, 64'h0000_0001_0000_0000, 8'hF0);
    check("msip bits", 64'(msip), 64'b001001);
    rd(CLINT_MSIP_BASE + 18'd8, v); check("msip readback hart 3", v, 64'h0000_0001_0000_0000);
    wr(CLINT_MSIP_BASE + 18'd0, 64'd0, 8'h0F);
    check("msip clear hart 0", 64'(msip), 64'b001000);

    // machine timer of hart 2: rises exactly when mtime reaches mtimecmp
    wr(CLINT_MTIMECMP_BASE + 18'(8 * 2), 64'd1003);
    check("mtip2 low before", 64'(mtip[2]), 0);
    ticks(2);  check("mtip2 low at 1002", 64'(mtip[2]), 0);
    ticks(1);  check("mtip2 high at 1003", 64'(mtip[2]), 1);
    rd(CLINT_MTIMECMP_BASE + 18'(8 * 2), v); check("mtimecmp2 readback", v, 1003);

    // supervisor timer of hart 4
    wr(CLINT_STIMECMP_BASE + 18'(8 * 4), 64'd1010);
    check("stip4 cleared by larger cmp", 64'(stip[4]), 0);
    check("stip other harts still set", 64'(stip[1]), 1);
    ticks(6);  check("stip4 low at 1009", 64'(stip[4]), 0);
    ticks(1);  check("stip4 high at 1010", 64'(stip[4]), 1);
    rd(CLINT_STIMECMP_BASE + 18'(8 * 4), v); check("stimecmp4 readback", v, 1010);

    // virtual supervisor timer of hart 5 with a time delta
    wr(CLINT_HTIMEDELTA_BASE + 18'(8 * 5), 64'd5000);
    rd(CLINT_MTIME, t0);
    rd(CLINT_VSTIME_BASE + 18'(8 * 5), v); check("vstime = mtime + delta", v, t0 + 5000);
    rd(CLINT_VSTIME_BASE + 18'(8 * 1), v); check("vstime no delta", v, t0);
    rd(CLINT_HTIMEDELTA_BASE + 18'(8 * 5), v); check("htimedelta readback", v, 5000);
    wr(CLINT_VSTIMECMP_BASE + 18'(8 * 5), t0 + 5000 + 3);
    check("vstip5 low after write", 64'(vstip[5]), 0);
    ticks(2);  check("vstip5 low 1 before", 64'(vstip[5]), 0);
    ticks(1);  check("vstip5 high at cmp", 64'(vstip[5]), 1);
    // vstip of a hart without delta would need mtime itself to reach cmp
    wr(CLINT_VSTIMECMP_BASE + 18'(8 * 1), t0 + 3);
    check("vstip1 set (mtime >= cmp)", 64'(vstip[1]), 1);
    wr(CLINT_VSTIMECMP_BASE + 18'(8 * 1), t0 + 4000);
    check("vstip1 cleared", 64'(vstip[1]), 0);
    // changing the delta moves vstime and the interrupt
    wr(CLINT_HTIMEDELTA_BASE + 18'(8 * 1), 64'd4000);
    check("vstip1 set by delta", 64'(vstip[1]), 1);
    rd(CLINT_VSTIMECMP_BASE + 18'(8 * 5), v); check("vstimecmp5 readback", v, t0 + 5003);

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
