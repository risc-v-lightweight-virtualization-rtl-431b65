// plic_gateway: level-sensitive interrupt gateway of one PLIC source.
//
// The gateway turns a device's interrupt line into a single request towards
// the claim/complete logic. While the line is high and no request of this
// source is in service, valid is asserted; the request is taken when the
// claim/complete logic raises ready (ready is the inverse of the source's
// pending bit). From that handshake on, the gateway is blocked: it asserts no
// new request until the context that claimed the interrupt writes its ID back
// to the complete register, which pulses complete. This follows the
// valid/ready/complete interface that the design description gives for the
// gateway; treating the device line as level-sensitive is this design's
// choice. Timing: valid is combinational from irq and the in-service flag;
// the flag changes at the clock edge after the handshake or the complete.
module plic_gateway (
  input  logic clk,
  input  logic rst_n,
  input  logic irq,       // device interrupt line
  output logic valid,     // request to the claim/complete logic
  input  logic ready,     // claim/complete logic can take the request
  input  logic complete   // handling of this source finished
);
  logic in_service;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                in_service <= 1'b0;
    else if (valid && ready)   in_service <= 1'b1;
    else if (complete)         in_service <= 1'b0;
  end

  assign valid = irq && !in_service;

endmodule
