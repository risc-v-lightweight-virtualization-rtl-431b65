// tb_plic_fanin_virt: self-checking test of the per-context fan-in.
//
// Applies directed cases (no competitor, ties, in-flight and disabled
// entries, priority 0) and 2000 random injection-register sets to a 7-entry
// fan-in, and compares max_prio, int_id, reg_idx and hit with a reference
// computed in two passes: the largest priority among pending, enabled,
// non-zero-priority entries, then the lowest index holding it.
module tb_plic_fanin_virt;
  import hv_pkg::*;
  localparam int N = 7;

  viir_t [N-1:0] inj;
  logic  [N-1:0] en;
  logic  [9:0]   max_prio, int_id;
  logic  [2:0]   reg_idx;
  logic          hit;
  int checks = 0, failures = 0;

  plic_fanin_virt #(.NREGS(N)) dut (.inj, .enable(en), .max_prio, .int_id, .reg_idx, .hit);

  task automatic compare(string what);
    int best; int idx;
    best = 0; idx = -1;
    for (int i = 0; i < N; i++)
      if (inj[i].int_id != 0 && !inj[i].in_flight && en[i] && int'(inj[i].prio) > best)
        best = int'(inj[i].prio);
    for (int i = N - 1; i >= 0; i--)
      if (best > 0 && inj[i].int_id != 0 && !inj[i].in_flight && en[i] && int'(inj[i].prio) == best)
        idx = i;
    #1;
    checks++;
    if (int'(max_prio) != best || hit != (idx >= 0) ||
        (idx >= 0 && (int'(reg_idx) != idx || int_id != inj[idx].int_id)) ||
        (idx < 0 && int_id != 0)) begin
      failures++;
      $display("FAIL %s: got prio %0d id %0d idx %0d hit %b, expected prio %0d idx %0d",
               what, max_prio, int_id, reg_idx, hit, best, idx);
    end
  endtask

  function automatic viir_t mk(int prio, int id, bit fl);
    viir_t r; r = '0; r.prio = 10'(prio); r.int_id = 10'(id); r.in_flight = fl; return r;
  endfunction

  initial begin
    inj = '0; en = '1;
    compare("empty");
    inj[3] = mk(5, 33, 0);                     compare("single");
    if (int_id != 33 || reg_idx != 3) begin failures++; $display("FAIL single direct"); end
    checks++;
    inj[5] = mk(5, 40, 0);                     compare("tie keeps lower index");
    inj[5] = mk(6, 40, 0);                     compare("higher wins");
    inj[5].in_flight = 1;                      compare("in flight ignored");
    en[3] = 0;                                 compare("disabled ignored");
    inj = '0; inj[1] = mk(0, 7, 0);            compare("priority 0 never wins");
    inj[6] = mk(1023, 1023, 0);                compare("max priority");
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < N; i++)
        inj[i] = mk($urandom_range(0, 7), ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 1023),
                    $urandom_range(0, 3) == 0);
      en = N'($urandom);
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
