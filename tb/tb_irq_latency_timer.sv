// tb_irq_latency_timer: self-checking test of the latency-measurement timer.
//
// Checks that time counts one per clock, that the interrupt rises in the
// first cycle with time > timecmp (and not while disabled), that it stays up
// until acknowledged through the enable register, that the latency read by a
// late "handler" equals time - timecmp, and that with auto-restart the next
// interrupt comes exactly timecmp+1 cycles after the acknowledge.
module tb_irq_latency_timer;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_write = 0;
  logic [4:0]  req_addr = '0;
  logic [63:0] req_wdata = '0, rdata;
  logic irq;
  int checks = 0, failures = 0;

  irq_latency_timer dut (.clk, .rst_n, .req_valid, .req_write, .req_addr, .req_wdata,
                         .rsp_rdata(rdata), .irq);

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [4:0] a, logic [63:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  task automatic rd(logic [4:0] a, output logic [63:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = a;
    #1 d = rdata;
    @(negedge clk);
    req_valid = 0;
  endtask

  logic [63:0] t1, t2;
  int n;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(5'h00, t1); rd(5'h00, t2);
    check("time counts per clock", t2 - t1, 2);

    // disabled: no interrupt even past timecmp
    wr(5'h08, 64'd50);
    wr(5'h00, 64'd0);
    repeat (80) @(negedge clk);
    check("no irq while disabled", 64'(irq), 0);

    // restart the count, enable, and watch the line rise
    wr(5'h00, 64'd0);
    wr(5'h10, 64'd1);
    req_addr = 5'h00;          // keep the time register on the read mux
    n = 0;
    while (!irq && n < 200) begin @(negedge clk); n++; end
    check("time when the line is first seen = timecmp+2", rdata, 64'd52);
    repeat (20) @(negedge clk);
    check("irq held", 64'(irq), 1);
    rd(5'h00, t1);
    check("cycles since the line rose = time - timecmp - 2", t1 - 64'd50 - 64'd2, 64'd21);
    rd(5'h10, t2);
    check("pending visible", t2, 64'b101);

    // auto-restart: acknowledge restarts the count from 0
    wr(5'h10, 64'd3);         // enable + auto-restart
    wr(5'h10, 64'd3);         // acknowledge with auto-restart active
    check("cleared by acknowledge", 64'(irq), 0);
    n = 0;
    while (!irq && n < 200) begin @(negedge clk); n++; end
    check("periodic interval timecmp+2 edges", 64'(n), 52);
    wr(5'h10, 64'd0);
    check("disabled and cleared", 64'(irq), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
