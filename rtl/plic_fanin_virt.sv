// plic_fanin_virt: per-context interrupt selection over injection registers.
//
// Physical sources and virtual interrupts reach this block in one format: an
// array of injection registers (priority, interrupt ID, in-flight flag), where
// the physical ones come first, converted from the pending bits and priority
// registers. An entry competes when it is pending (ID non-zero and not in
// flight) and enabled for the context, and its priority is non-zero. The
// block returns the largest priority, the interrupt ID of the winner and the
// index of the winning register, which the claim/complete logic needs to tell
// a virtual interrupt from a physical one. On equal priorities the entry with
// the lower index wins, so physical sources win over virtual ones of the same
// priority. With no competitor, max_prio and int_id are 0 and hit is low.
// This follows the search the design description gives for its PLICFanIn;
// the linear scan (instead of a comparison tree) is this design's choice and
// gives the same result. Purely combinational.
module plic_fanin_virt #(
  parameter int unsigned NREGS = 4,
  localparam int unsigned IW   = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  hv_pkg::viir_t [NREGS-1:0] inj,
  input  logic [NREGS-1:0]          enable,
  output logic [9:0]                max_prio,
  output logic [9:0]                int_id,
  output logic [IW-1:0]             reg_idx,
  output logic                      hit
);
  import hv_pkg::*;

  always_comb begin
    max_prio = '0;
    int_id   = '0;
    reg_idx  = '0;
    hit      = 1'b0;
    for (int unsigned i = 0; i < NREGS; i++) begin
      if (viir_pending(inj[i]) && enable[i] && inj[i].prio > max_prio) begin
        max_prio = inj[i].prio;
        int_id   = inj[i].int_id;
        reg_idx  = IW'(i);
        hit      = 1'b1;
      end
    end
  end

endmodule
