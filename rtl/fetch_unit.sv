// fetch_unit: the fetch (F) stage and the branch speculation control.
//
// Each cycle the unit reads one long instruction at `pc` from the instruction
// cache, splits it into its slots and writes each slot to the queue of its
// functional unit. NOP slots are not written (the compacted code may still
// hold some). If any queue is full, or the cache misses, the long
// instruction waits, as in the document. A HALT slot stops fetching.
//
// The BTB is looked up with the same `pc`; for a long instruction holding a
// branch the unit follows its prediction (target if taken, PC+1 otherwise)
// and enters speculative mode: every slot fetched after the branch is
// written with its speculation tag set. When the branch resolves in its
// functional unit the unit compares the real next address with the predicted
// one and raises, for one cycle, either `commit` (prediction right: the
// temporary register file and DC copies become the real ones, tags are
// cleared) or `mispredict` (the copies are discarded, tagged queue entries
// and tagged instructions in execution are dropped, fetching restarts at
// the right address). The BTB is updated in both cases.
//
// Only one branch may be unresolved at a time: a second long instruction
// with a branch waits until the first resolves. That limit, the NOP/HALT
// handling and the spec tags are this design's choices; the document
// describes the temporary copies but not how older and younger instructions
// are told apart.
module fetch_unit
  import disvliw_pkg::*;
#(
  parameter logic [PC_W-1:0] RESET_PC = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction cache
  output logic                  ic_req,
  output logic [PC_W-1:0]       pc,
  input  logic                  ic_hit,
  input  long_instr_t           ic_rdata,
  // branch target buffer
  input  logic                  bp_taken,
  input  logic [PC_W-1:0]       bp_target,
  output logic                  btb_upd,
  output logic [PC_W-1:0]       btb_upd_pc,
  output logic                  btb_upd_taken,
  output logic [PC_W-1:0]       btb_upd_target,
  // instruction queues
  input  logic [N_FU-1:0]       iq_full,
  output logic [N_FU-1:0]       iq_push,
  output iq_entry_t [N_FU-1:0]  iq_wdata,
  // branch resolution from the functional units
  input  logic [N_FU-1:0]       br_valid,
  input  logic [N_FU-1:0]       br_taken,
  input  logic [N_FU-1:0][PC_W-1:0] br_target,
  // speculation control
  output logic                  commit,
  output logic                  mispredict,
  output logic                  spec_active,
  output logic                  halted,
  // events
  output logic                  fetched,      // a long instruction left the cache
  output logic                  full_stall,   // held because a queue was full
  output logic                  branch_hold   // held behind an unresolved branch
);
  logic            has_branch, has_halt, any_full, res_valid, res_taken;
  logic [PC_W-1:0] res_target, actual_next, next_pc, br_pc, br_pred_next;

  always_comb begin
    has_branch = 1'b0;
    has_halt   = 1'b0;
    for (int f = 0; f < N_FU; f++) begin
      if (is_branch(ic_rdata[f].ins.op)) has_branch = 1'b1;
      if (ic_rdata[f].ins.op == OP_HALT) has_halt   = 1'b1;
    end
    res_valid  = 1'b0;
    res_taken  = 1'b0;
    res_target = '0;
    for (int f = 0; f < N_FU; f++) begin
      if (br_valid[f]) begin
        res_valid  = 1'b1;
        res_taken  = br_taken[f];
        res_target = br_target[f];
      end
    end
  end

  assign any_full    = |iq_full;
  assign actual_next = res_taken ? res_target : br_pc + 1'b1;
  assign commit      = res_valid && actual_next == br_pred_next;
  assign mispredict  = res_valid && actual_next != br_pred_next;

  assign ic_req      = !halted;
  assign branch_hold = ic_hit && has_branch && spec_active;
  assign full_stall  = ic_hit && any_full;
  assign fetched     = ic_hit && !any_full && !branch_hold && !mispredict;
  assign next_pc     = (has_branch && bp_taken) ? bp_target : pc + 1'b1;

  always_comb begin
    for (int f = 0; f < N_FU; f++) begin
      iq_push[f]            = fetched && ic_rdata[f].ins.op != OP_NOP &&
                              ic_rdata[f].ins.op != OP_HALT;
      iq_wdata[f].slot      = ic_rdata[f];
      iq_wdata[f].spec      = spec_active && !commit;
    end
  end

  assign btb_upd        = res_valid;
  assign btb_upd_pc     = br_pc;
  assign btb_upd_taken  = res_taken;
  assign btb_upd_target = res_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc           <= RESET_PC;
      spec_active  <= 1'b0;
      halted       <= 1'b0;
      br_pc        <= '0;
      br_pred_next <= '0;
    end else begin
      if (res_valid) spec_active <= 1'b0;
      if (mispredict) begin
        pc     <= actual_next;
        halted <= 1'b0;
      end else if (fetched) begin
        if (has_halt) begin
          halted <= 1'b1;
        end else begin
          pc <= next_pc;
        end
        if (has_branch) begin
          spec_active  <= 1'b1;
          br_pc        <= pc;
          br_pred_next <= next_pc;
        end
      end
    end
  end

  a_one_resolve: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(br_valid));
  a_resolve_pending: assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> spec_active);
endmodule
