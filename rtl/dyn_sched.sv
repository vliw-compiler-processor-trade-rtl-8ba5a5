// dyn_sched: the dynamic scheduler (DS) of one functional unit.
//
// Every cycle the DS compares the dpre vector of the instruction at the head
// of its queue with the counters of its DC, one comparator per other unit:
//   d_k = (dpre[k] == 0) || (C_k > 0)
// and forms the check signal as the AND of all d_k, as the document gives it.
// The instruction is issued when the check signal is 1 and the unit is free
// (no resource collision); otherwise the unit stalls. On issue the DC
// decrements the counters named by dpre (done in dep_counter).
//
// A speculative store is also held back until its branch resolves, because
// only the register file and DCs have a temporary copy, not memory; this
// rule is this design's own.
//
// Purely combinational; `issue` is meant to be registered by the unit.
module dyn_sched
  import disvliw_pkg::*;
(
  input  logic                        head_valid,
  input  iq_entry_t                   head,
  input  logic [DEP_W-1:0][CNT_W-1:0] cnt,
  input  logic                        fu_ready,
  output logic [DEP_W-1:0]            d,
  output logic                        check,
  output logic                        issue,
  output logic                        dep_stall,   // waiting on a counter
  output logic                        res_stall,   // unit busy
  output logic                        spec_stall   // speculative store held
);
  always_comb begin
    for (int k = 0; k < DEP_W; k++)
      d[k] = !head.slot.dpre[k] || (cnt[k] != '0);
  end

  assign check      = &d;
  assign spec_stall = head_valid && head.spec && head.slot.ins.op == OP_SW;
  assign issue      = head_valid && check && fu_ready && !spec_stall;
  assign dep_stall  = head_valid && !check;
  assign res_stall  = head_valid && check && !fu_ready;
endmodule
