// irq_latency_timer: memory-mapped timer used to measure interrupt latency.
//
// A 64-bit counter (time) advances every clock. When the interrupt is enabled
// and time passes the compare value (time > timecmp), a sticky pending flag
// is set and drives the interrupt line, which goes to a PLIC source. The
// handler reads time T; the line rose T - timecmp - 2 cycles earlier (it is
// set at the clock edge after the one where time reached timecmp+1). Writing
// the enable register
// acknowledges: it clears the pending flag, and when the auto-restart bit is
// set it also restarts time from zero, so that the line rises again
// timecmp+2 clock edges after the acknowledge without reprogramming (a
// periodic tick).
//
// Registers (byte offsets, 64-bit, 8-byte aligned):
//   time     0x00  R/W   counter value
//   timecmp  0x08  R/W   compare value
//   enable   0x10  R/W   [0] interrupt enable, [1] auto-restart;
//                        reads also show [2] = pending flag
// The three registers, the "time > timecmp" condition, the interrupt line and
// an auto-restart feature follow the design description; the offsets, the
// sticky flag, acknowledging through the enable register and what the
// auto-restart restarts are this design's own choices. Register port as in
// the CLINT: single cycle, combinational read data, writes at the clock edge.
module irq_latency_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic        req_write,
  input  logic [4:0]  req_addr,
  input  logic [63:0] req_wdata,
  output logic [63:0] rsp_rdata,
  output logic        irq
);
  logic [63:0] time_q, timecmp;
  logic [1:0]  enable;
  logic        pend;
  logic        wr;
  logic [1:0]  sel;

  assign wr  = req_valid && req_write;
  assign sel = req_addr[4:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      time_q  <= '0;
      timecmp <= '0;
      enable  <= '0;
      pend    <= 1'b0;
    end else begin
      time_q <= time_q + 64'd1;
      if (enable[0] && time_q > timecmp) pend <= 1'b1;
      if (wr) begin
        unique case (sel)
          2'd0: time_q  <= req_wdata;
          2'd1: timecmp <= req_wdata;
          2'd2: begin
            enable <= req_wdata[1:0];
            pend   <= 1'b0;
            if (enable[1]) time_q <= '0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (sel)
      2'd0:    rsp_rdata = time_q;
      2'd1:    rsp_rdata = timecmp;
      2'd2:    rsp_rdata = {61'd0, pend, enable};
      default: rsp_rdata = '0;
    endcase
  end

  assign irq = pend;

endmodule
