// tb_plic_gateway: self-checking test of one PLIC interrupt gateway.
//
// Checks that a raised device line produces a request, that the request stays
// up until the claim/complete side is ready, that the gateway then blocks
// (no new request while the line stays high) until complete, and that after
// complete a still-high line requests again while a low line does not.
module tb_plic_gateway;
  logic clk = 0, rst_n = 0;
  logic irq = 0, ready = 0, complete = 0, valid;
  int checks = 0, failures = 0;

  plic_gateway dut (.clk, .rst_n, .irq, .valid, .ready, .complete);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); check("idle", valid, 0);
    irq = 1; #1 check("request on line high", valid, 1);
    repeat (3) @(negedge clk); check("request held while not ready", valid, 1);
    ready = 1; @(negedge clk); ready = 0;
    check("blocked after handshake", valid, 0);
    repeat (3) @(negedge clk); check("still blocked, line high", valid, 0);
    complete = 1; @(negedge clk); complete = 0;
    check("requests again after complete", valid, 1);
    ready = 1; @(negedge clk); ready = 0;
    irq = 0;
    complete = 1; @(negedge clk); complete = 0;
    check("no request after complete, line low", valid, 0);
    irq = 1; #1 check("new edge requests", valid, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
